// rmac_top -- reconfigurable 64-bit Vedic multiply-and-accumulate unit.
//
// Each clock cycle the unit multiplies a by b and adds the result into the
// 136-bit accumulator acc. The mode select s chooses the precision:
//   00  one 64x64 MAC:   acc            += a * b
//   01  two 32x32 MACs:  acc[68k+67:68k] += a[32k+31:32k] * b[32k+31:32k]
//   10  four 16x16 MACs: acc[34k+33:34k] += a[16k+15:16k] * b[16k+15:16k]
// (11 behaves as 00.) The precision controller decodes s; the Vedic
// multiplier core produces the full or packed lane products from the same
// four 32x32 blocks; the accumulator adds them through a segmented adder
// whose carry-break logic keeps lanes apart. Ports, widths and modes follow
// the source design.
//
// Timing: a, b and s are sampled at a rising edge, and acc shows the new sum
// after that edge (single-cycle MAC, no pipeline). reset is synchronous and
// active high; clear the accumulator when changing mode, as the lane layout
// changes with it.
module rmac_top
  import rmac_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [1:0]        s,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [ACC_W-1:0]  acc
);

  prec_cfg_t         cfg;
  logic [PROD_W-1:0] prod;

  precision_ctrl      u_ctrl (.mode_sel(s), .cfg(cfg));
  reconfig_multiplier u_mul  (.a(a), .b(b), .mode(cfg.mode), .prod(prod));
  rmac_accumulator    u_acc  (.clk(clk), .reset(reset), .cfg(cfg),
                              .prod(prod), .acc(acc));

endmodule
