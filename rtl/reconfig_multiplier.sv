// reconfig_multiplier -- 64x64 Vedic multiplier core whose four 32x32 blocks
// also serve as the two 32-bit and four 16-bit SIMD lane multipliers.
//
// Four 32x32 Vedic blocks compute a_lo*b_lo (u1), a_lo*b_hi (u2),
// a_hi*b_lo (u3) and a_hi*b_hi (u4). The 128-bit output vector depends on
// the mode:
//   MODE_FULL  a*b = u1 + ((u2 + u3) << 32) + (u4 << 64)
//   MODE_DUAL  {u4, u1}: lane k = a[32k+31:32k] * b[32k+31:32k] at [64k+63:64k]
//   MODE_QUAD  {u4.hh, u4.ll, u1.hh, u1.ll}: lane k = a[16k+15:16k] *
//              b[16k+15:16k] at [32k+31:32k]
// The 16x16 lane products are the vertical sub-products inside u1 and u4, so
// no multiplier is duplicated for the SIMD modes. The four 32x32 blocks and
// the mode-selected product follow the source design; the assignment of the
// cross products to u2/u3 and the lane packing are this design's reading of
// it (the packing reproduces the source's published results). Any code other
// than dual or quad gives the full product.
//
// Interface: a, b (64 bits), mode -> prod (128 bits). Combinational.
module reconfig_multiplier
  import rmac_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  mode_t             mode,
  output logic [PROD_W-1:0] prod
);

  localparam int unsigned HW = DATA_W / 2;   // 32

  logic [2*HW-1:0] p1, p2, p3, p4;           // 64-bit sub-products
  logic [HW-1:0]   q1_ll, q1_hh, q4_ll, q4_hh;  // 16x16 lane products

  vedic_mul #(.WIDTH(HW)) u1 (.a(a[HW-1:0]),      .b(b[HW-1:0]),
                              .p(p1), .p_ll(q1_ll), .p_hh(q1_hh));
  vedic_mul #(.WIDTH(HW)) u2 (.a(a[HW-1:0]),      .b(b[DATA_W-1:HW]),
                              .p(p2), .p_ll(),      .p_hh());
  vedic_mul #(.WIDTH(HW)) u3 (.a(a[DATA_W-1:HW]), .b(b[HW-1:0]),
                              .p(p3), .p_ll(),      .p_hh());
  vedic_mul #(.WIDTH(HW)) u4 (.a(a[DATA_W-1:HW]), .b(b[DATA_W-1:HW]),
                              .p(p4), .p_ll(q4_ll), .p_hh(q4_hh));

  logic [2*HW:0]     xsum;      // p2 + p3 (65 bits)
  logic [PROD_W-1:0] full_prod;

  always_comb begin
    xsum     = {1'b0, p2} + {1'b0, p3};
    full_prod = {{(2*HW){1'b0}}, p1}
              + {{(HW-1){1'b0}}, xsum, {HW{1'b0}}}
              + {p4, {(2*HW){1'b0}}};
    unique case (mode)
      MODE_DUAL: prod = {p4, p1};
      MODE_QUAD: prod = {q4_hh, q4_ll, q1_hh, q1_ll};
      default:   prod = full_prod;
    endcase
  end

endmodule
