// tb_adder_logic -- self-check of the segmented product adder.
// For each mode the expected sum is built lane by lane from the lane
// products (zero-extended into lanes of 136, 68 or 34 bits) with each lane
// wrapping at its own width, independently of the adder's segment
// structure. Directed cases put a carry right at every segment boundary:
// it must cross in full mode and be killed at lane boundaries otherwise.
module tb_adder_logic;
  import rmac_pkg::*;

  logic [PROD_W-1:0] a;
  logic [ACC_W-1:0]  b, y;
  logic [1:0]        mode_sel;
  prec_cfg_t         cfg;
  int checks = 0, failures = 0;

  precision_ctrl u_ctrl (.mode_sel(mode_sel), .cfg(cfg));
  adder_logic    dut    (.a(a), .b(b), .cfg(cfg), .y(y));

  // reference: lanes of LW bits holding products of PW bits
  function automatic logic [ACC_W-1:0] ref_sum(logic [PROD_W-1:0] p,
                                                logic [ACC_W-1:0] acc,
                                                logic [1:0] code);
    int nl, lw, pw;
    logic [ACC_W-1:0] r, lane, lmask, pmask;
    nl = (code == 2'b01) ? 2 : (code == 2'b10) ? 4 : 1;
    lw = ACC_W / nl;
    pw = PROD_W / nl;
    r  = '0;
    lmask = (nl == 1) ? '1 : ((136'd1 << lw) - 1);
    pmask = (136'd1 << pw) - 1;
    for (int k = 0; k < nl; k++) begin
      lane = (((acc >> (k * lw)) & lmask) + ((ACC_W'(p) >> (k * pw)) & pmask)) & lmask;
      r |= lane << (k * lw);
    end
    return r;
  endfunction

  function automatic logic [ACC_W-1:0] rnd136();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic apply(logic [PROD_W-1:0] p, logic [ACC_W-1:0] acc, logic [1:0] code);
    logic [ACC_W-1:0] exp;
    a = p; b = acc; mode_sel = code;
    #1;
    exp = ref_sum(p, acc, code);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL mode %b a=%h b=%h y=%h exp=%h", code, p, acc, y, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      // carry into each segment boundary: accumulator all ones plus 1
      apply(128'd1, '1, 2'(m));
      // lane-wise all ones plus all ones (each lane overflows its guard bits)
      apply('1, '1, 2'(m));
      apply('0, '0, 2'(m));
      // a carry generated just below each 34-bit boundary
      for (int k = 1; k < 4; k++) begin
        apply(PROD_W'(1), ACC_W'((136'd1 << (34 * k)) - 1), 2'(m));
        apply({4{32'hFFFF_FFFF}}, ACC_W'({4{34'h3_0000_0001}}), 2'(m));
      end
      for (int i = 0; i < 3000; i++) apply(rnd136()[127:0], rnd136(), 2'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
