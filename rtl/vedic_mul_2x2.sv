// vedic_mul_2x2 -- 2x2-bit Urdhva Tiryagbhyam ("vertically and crosswise")
// multiplier, the leaf cell of the Vedic multiplier hierarchy.
//
// The vertical products a0*b0 and a1*b1 and the crosswise products a0*b1 and
// a1*b0 are formed with AND gates in parallel. One half adder sums the two
// crosswise terms; a second half adder adds its carry to a1*b1. Building the
// cell from AND gates and half adders follows the source design; the exact
// wiring is the standard form of this cell.
//
// Interface: a, b (2 bits, unsigned) -> p (4 bits). Purely combinational.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic pp00, pp01, pp10, pp11;   // partial products a_i & b_j
  logic c1;                       // carry of the crosswise half adder

  always_comb begin
    pp00 = a[0] & b[0];
    pp01 = a[0] & b[1];
    pp10 = a[1] & b[0];
    pp11 = a[1] & b[1];
    // vertical: bit 0
    p[0] = pp00;
    // crosswise: half adder on the two cross terms
    p[1] = pp01 ^ pp10;
    c1   = pp01 & pp10;
    // vertical: half adder on a1b1 and the crosswise carry
    p[2] = pp11 ^ c1;
    p[3] = pp11 & c1;
  end

endmodule
