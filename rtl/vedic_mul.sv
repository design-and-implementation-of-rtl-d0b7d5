// vedic_mul -- WIDTH x WIDTH unsigned Vedic multiplier, built recursively.
//
// The operands are split into halves of H = WIDTH/2 bits. Four H x H Vedic
// multipliers form the vertical products (low*low, high*high) and the
// crosswise products (low*high, high*low) in parallel; the result is
//   p = ll + ((lh + hl) << H) + (hh << WIDTH).
// WIDTH = 4 uses four 2x2 leaf cells, so WIDTH = 32 contains the 4x4, 8x8 and
// 16x16 levels of the hierarchy. The construction from four half-size blocks
// follows the source design; summing the sub-products with word-level adders
// is this design's choice.
//
// The two vertical sub-products are also brought out (p_ll, p_hh): in the
// 32-bit instance they are the 16x16 lane products of the quad mode, so the
// SIMD lanes reuse the same multiplier hardware.
//
// Interface: a, b (WIDTH bits) -> p (2*WIDTH), p_ll, p_hh (WIDTH each).
// Purely combinational. WIDTH must be a power of two, at least 4.
//
// Lint note: when this module is linted on its own, Verilator reports the
// four sub-products as undriven. They are driven by the instances in the
// generate branches of this recursive module; the warning comes from the
// recursion, and simulation of every level checks the products bit-exactly.
// The unused p_ll/p_hh pins of the inner instances are left open on purpose.
module vedic_mul #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p,
  output logic [WIDTH-1:0]   p_ll,
  output logic [WIDTH-1:0]   p_hh
);

  localparam int unsigned H = WIDTH / 2;

  logic [WIDTH-1:0] ll, lh, hl, hh;   // H x H sub-products

  if (H == 2) begin : g_leaf
    vedic_mul_2x2 u_ll (.a(a[H-1:0]),     .b(b[H-1:0]),     .p(ll));
    vedic_mul_2x2 u_lh (.a(a[H-1:0]),     .b(b[WIDTH-1:H]), .p(lh));
    vedic_mul_2x2 u_hl (.a(a[WIDTH-1:H]), .b(b[H-1:0]),     .p(hl));
    vedic_mul_2x2 u_hh (.a(a[WIDTH-1:H]), .b(b[WIDTH-1:H]), .p(hh));
  end else begin : g_node
    vedic_mul #(.WIDTH(H)) u_ll (.a(a[H-1:0]),     .b(b[H-1:0]),
                                 .p(ll), .p_ll(), .p_hh());
    vedic_mul #(.WIDTH(H)) u_lh (.a(a[H-1:0]),     .b(b[WIDTH-1:H]),
                                 .p(lh), .p_ll(), .p_hh());
    vedic_mul #(.WIDTH(H)) u_hl (.a(a[WIDTH-1:H]), .b(b[H-1:0]),
                                 .p(hl), .p_ll(), .p_hh());
    vedic_mul #(.WIDTH(H)) u_hh (.a(a[WIDTH-1:H]), .b(b[WIDTH-1:H]),
                                 .p(hh), .p_ll(), .p_hh());
  end

  logic [WIDTH:0] xsum;   // lh + hl, one carry bit wider

  always_comb begin
    xsum = {1'b0, lh} + {1'b0, hl};
    p     = {{WIDTH{1'b0}}, ll}
          + {{(H-1){1'b0}}, xsum, {H{1'b0}}}
          + {hh, {WIDTH{1'b0}}};
    p_ll  = ll;
    p_hh  = hh;
  end

endmodule
