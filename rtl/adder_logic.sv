// adder_logic -- segmented 136-bit product adder with carry-break logic.
//
// The 128-bit product vector a is first aligned to the accumulator lanes:
// each lane product is zero-extended into its lane, which leaves guard bits
// above it (full: 128 -> 136 bits, dual: 64 -> 68, quad: 32 -> 34). The sum
// y = aligned(a) + b is then formed by one adder cut into four 34-bit
// segments. The carry out of segment i enters segment i+1 unless
// cfg.carry_break[i] is set, so the same adder performs one 136-bit, two
// 68-bit or four 34-bit independent additions. The carry out of the top of
// each lane is dropped: a lane that overflows its guard bits wraps.
// Lane widths and carry isolation follow the source design; building it as
// one segmented adder (rather than separate adders and a mux) follows its
// text, and the wrap on overflow is this design's choice.
//
// Interface: a (128), b (136), cfg (prec_cfg_t) -> y (136). Combinational.
module adder_logic
  import rmac_pkg::*;
(
  input  logic [PROD_W-1:0] a,
  input  logic [ACC_W-1:0]  b,
  input  prec_cfg_t         cfg,
  output logic [ACC_W-1:0]  y
);

  logic [ACC_W-1:0] addend;        // product aligned to accumulator lanes
  logic [SEGS-1:0]  carry;         // carry into each segment

  always_comb begin
    unique case (cfg.mode)
      MODE_DUAL: addend = {4'b0, a[127:64], 4'b0, a[63:0]};
      MODE_QUAD: addend = {2'b0, a[127:96], 2'b0, a[95:64],
                           2'b0, a[63:32],  2'b0, a[31:0]};
      default:   addend = {8'b0, a};
    endcase
  end

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < SEGS; i++) begin : g_seg
    logic [SEG_W:0] seg_sum;       // segment sum with its carry out

    always_comb begin
      seg_sum = {1'b0, addend[i*SEG_W +: SEG_W]}
              + {1'b0, b[i*SEG_W +: SEG_W]}
              + {{SEG_W{1'b0}}, carry[i]};
      y[i*SEG_W +: SEG_W] = seg_sum[SEG_W-1:0];
    end

    // carry-break: kill the carry at a lane boundary. The carry out of the
    // top segment leaves the accumulator and is dropped.
    if (i < SEGS - 1) begin : g_link
      assign carry[i+1] = seg_sum[SEG_W] & ~cfg.carry_break[i];
    end
  end

endmodule
