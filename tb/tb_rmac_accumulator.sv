// tb_rmac_accumulator -- self-check of the accumulator loop.
// Random product vectors are fed every cycle in each mode; a lane-wise
// model (lanes of 136/68/34 bits wrapping at their width) predicts acc after
// every rising edge. Also checks the synchronous reset (acc is cleared at
// the edge where reset is high, not before) and the one-cycle update.
module tb_rmac_accumulator;
  import rmac_pkg::*;

  logic              clk = 1'b0;
  logic              reset;
  logic [1:0]        mode_sel;
  prec_cfg_t         cfg;
  logic [PROD_W-1:0] prod;
  logic [ACC_W-1:0]  acc, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  precision_ctrl   u_ctrl (.mode_sel(mode_sel), .cfg(cfg));
  rmac_accumulator dut    (.clk(clk), .reset(reset), .cfg(cfg), .prod(prod), .acc(acc));

  function automatic logic [ACC_W-1:0] ref_sum(logic [PROD_W-1:0] p,
                                                logic [ACC_W-1:0] r0,
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
      lane = (((r0 >> (k * lw)) & lmask) + ((ACC_W'(p) >> (k * pw)) & pmask)) & lmask;
      r |= lane << (k * lw);
    end
    return r;
  endfunction

  task automatic check(string what, logic [ACC_W-1:0] exp);
    checks++;
    if (acc !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: acc=%h exp=%h", what, acc, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; mode_sel = 2'b00; prod = '0;
    @(posedge clk); #1;
    check("after reset", '0);
    for (int m = 0; m < 3; m++) begin
      // synchronous clear
      @(negedge clk);
      reset = 1'b1; mode_sel = 2'(m); prod = '1;
      @(posedge clk); #1;
      check("sync reset", '0);
      @(negedge clk);
      reset = 1'b0;
      model = '0;
      for (int i = 0; i < 400; i++) begin
        prod = (i % 50 == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        #1;
        // acc must not move before the edge
        check("hold before edge", model);
        model = ref_sum(prod, model, 2'(m));
        @(posedge clk); #1;
        check("accumulate", model);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
