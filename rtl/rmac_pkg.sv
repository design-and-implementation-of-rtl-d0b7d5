// rmac_pkg -- shared widths, mode encoding and lane geometry of the
// reconfigurable 64-bit Vedic multiply-and-accumulate unit (RMAC).
//
// The unit multiplies two 64-bit operands and accumulates into a 136-bit
// register. A 2-bit mode code splits the datapath into 1, 2 or 4 lanes:
//   00  one 64x64 lane : 128-bit product, 136-bit accumulator (8 guard bits)
//   01  two 32x32 lanes: 64-bit products, 68-bit accumulator lanes (4 guard)
//   10  four 16x16 lanes: 32-bit products, 34-bit accumulator lanes (2 guard)
// The mode codes and the widths 64/128/136 and 68/34 follow the source
// design. Treating code 11 as full precision is this design's choice.
package rmac_pkg;

  localparam int unsigned DATA_W = 64;           // operand width
  localparam int unsigned PROD_W = 2 * DATA_W;   // 128-bit product vector
  localparam int unsigned ACC_W  = 136;          // accumulator width
  localparam int unsigned SEGS   = 4;            // adder segments (quad lanes)
  localparam int unsigned SEG_W  = ACC_W / SEGS; // 34-bit adder segment

  typedef enum logic [1:0] {
    MODE_FULL = 2'b00,   // 1 x 64-bit
    MODE_DUAL = 2'b01,   // 2 x 32-bit
    MODE_QUAD = 2'b10    // 4 x 16-bit
  } mode_t;

  // Decoded configuration handed from the precision controller to the
  // datapath. carry_break[i] kills the carry from adder segment i into
  // segment i+1 (boundaries at accumulator bits 34, 68 and 102).
  typedef struct packed {
    mode_t      mode;
    logic [2:0] lanes;         // 1, 2 or 4 active MAC lanes
    logic [2:0] carry_break;
  } prec_cfg_t;

endpackage
