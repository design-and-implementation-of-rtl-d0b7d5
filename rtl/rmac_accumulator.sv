// rmac_accumulator -- 136-bit accumulator register with guard bits and its
// feedback through the segmented product adder.
//
// Every rising clock edge the register loads acc + prod, formed by
// adder_logic with the carry chain cut according to cfg, so that in the SIMD
// modes each lane accumulates independently. reset is synchronous and active
// high and clears the register to zero. The register width, the feedback and
// the synchronous reset follow the source design; accumulating on every
// cycle without an enable and keeping the contents across a mode change are
// this design's choices.
//
// Interface: clk, reset, cfg, prod (128) -> acc (136). acc changes one cycle
// after prod is presented (one MAC per lane per cycle).
module rmac_accumulator
  import rmac_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  prec_cfg_t         cfg,
  input  logic [PROD_W-1:0] prod,
  output logic [ACC_W-1:0]  acc
);

  logic [ACC_W-1:0] sum;

  adder_logic u_add (.a(prod), .b(acc), .cfg(cfg), .y(sum));

  always_ff @(posedge clk) begin
    if (reset) acc <= '0;
    else       acc <= sum;
  end

endmodule
