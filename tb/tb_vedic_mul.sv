// tb_vedic_mul -- self-check of the recursive Vedic multiplier: an 8x8
// instance exhaustively (its 4x4 sub-blocks through p_ll/p_hh) and a 32x32
// instance, which holds the 4x4, 8x8 and 16x16 levels, with corner and
// random operands. The full product and the two vertical half products
// (p_ll, p_hh) are compared with the simulator's own multiplication.
// Operands change at each falling edge of a free-running clock and are
// checked at the next rising edge; a watchdog ends a hung run.
module tb_vedic_mul;

  localparam int unsigned N_EXH  = 65536;   // all 8-bit operand pairs
  localparam int unsigned N_RAND = 20000;
  localparam logic [31:0] CORNER_A [6] = '{32'h0, 32'hFFFF_FFFF, 32'hFFFF_FFFF,
                                           32'hAAAA_AAAA, 32'h5555_5555, 32'h8000_0000};
  localparam logic [31:0] CORNER_B [6] = '{32'h0, 32'hFFFF_FFFF, 32'h1,
                                           32'h5555_5555, 32'h5555_5555, 32'hFFFF_FFFF};

  logic clk = 1'b0;
  int   idx = 0;
  int   checks = 0, failures = 0;

  logic [7:0]  a8,  b8;   logic [15:0] p8;  logic [7:0]  l8,  h8;
  logic [31:0] a32, b32;  logic [63:0] p32; logic [31:0] l32, h32;

  vedic_mul #(.WIDTH(8))  d8  (.a(a8),  .b(b8),  .p(p8),  .p_ll(l8),  .p_hh(h8));
  vedic_mul #(.WIDTH(32)) d32 (.a(a32), .b(b32), .p(p32), .p_ll(l32), .p_hh(h32));

  always #5 clk = ~clk;

  // stimulus
  always @(negedge clk) begin
    logic [31:0] x, y;
    if (idx < N_EXH) begin
      a8 = 8'(idx >> 8); b8 = 8'(idx);
      x = {$urandom}; y = {$urandom};
    end else if (idx < N_EXH + 6) begin
      x = CORNER_A[idx - N_EXH]; y = CORNER_B[idx - N_EXH];
    end else begin
      x = $urandom; y = $urandom;
    end
    a32 = x; b32 = y;
  end

  function automatic int mism(logic [63:0] got, logic [63:0] exp);
    return (got !== exp) ? 1 : 0;
  endfunction

  // checker
  always @(posedge clk) begin
    int bad;
    bad = 0;
    if (idx < N_EXH) begin
      bad += mism(64'(p8), 64'(a8) * 64'(b8));
      bad += mism(64'(l8), 64'(a8[3:0]) * 64'(b8[3:0]));
      bad += mism(64'(h8), 64'(a8[7:4]) * 64'(b8[7:4]));
      checks += 3;
    end
    bad += mism(p32, 64'(a32) * 64'(b32));
    bad += mism(64'(l32), 64'(a32[15:0]) * 64'(b32[15:0]));
    bad += mism(64'(h32), 64'(a32[31:16]) * 64'(b32[31:16]));
    checks += 3;
    if (bad != 0) begin
      failures += bad;
      if (failures < 20)
        $display("FAIL idx %0d: a8=%h b8=%h p8=%h a32=%h b32=%h p32=%h",
                 idx, a8, b8, p8, a32, b32, p32);
    end
    idx++;
    if (idx == N_EXH + 6 + N_RAND) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin : watchdog
    repeat (N_EXH + N_RAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
