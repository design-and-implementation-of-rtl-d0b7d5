// tb_rmac_top -- end-to-end self-check of the reconfigurable Vedic MAC at its
// default configuration.
//
// The unit is reset, then run in full (00), dual (01) and quad (10) mode and
// back, with corner operands (zero, all ones, alternating bits), random
// operands and the published example operands of each mode. A lane-wise
// model computed with the simulator's own multiplier predicts acc after
// every rising edge. The test also counts each mechanism of the design and
// fails if one never happened:
//   - MACs issued in each of the three modes, and the unused code 11,
//   - mode switches with and without an intervening reset,
//   - carry-break events: a carry out of a non-top SIMD lane that had to be
//     killed at the lane boundary,
//   - full-mode carries across a 34-bit segment boundary,
//   - guard-bit use: a lane sum that grew beyond its product width,
//   - lane wrap: a lane that overflowed its guard bits.
// Timing: one MAC per cycle; acc must change only at the rising edge after
// the operands are applied.
module tb_rmac_top;
  import rmac_pkg::*;

  logic              clk = 1'b0;
  logic              reset;
  logic [1:0]        s;
  logic [DATA_W-1:0] a, b;
  logic [ACC_W-1:0]  acc, model;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_mode[4];
  int n_switch_reset = 0, n_switch_live = 0;
  int n_carry_break = 0, n_full_cross = 0, n_guard = 0, n_wrap = 0, n_reset = 0;

  always #5 clk = ~clk;

  rmac_top dut (.clk(clk), .reset(reset), .s(s), .a(a), .b(b), .acc(acc));

  // Lane-wise reference MAC, also records which mechanisms the step used.
  function automatic logic [ACC_W-1:0] ref_mac(logic [ACC_W-1:0] r0,
                                                logic [DATA_W-1:0] x,
                                                logic [DATA_W-1:0] y,
                                                logic [1:0] code);
    int nl, lw, ow;
    logic [ACC_W:0]   lane;
    logic [ACC_W-1:0] r, lmask;
    logic [PROD_W-1:0] omask, p;
    nl = (code == 2'b01) ? 2 : (code == 2'b10) ? 4 : 1;
    lw = ACC_W / nl;          // lane width in the accumulator
    ow = DATA_W / nl;         // operand width of a lane
    lmask = (nl == 1) ? '1 : ((136'd1 << lw) - 1);
    omask = (128'd1 << ow) - 1;
    r = '0;
    for (int k = 0; k < nl; k++) begin
      p    = ((PROD_W'(x) >> (k * ow)) & omask) * ((PROD_W'(y) >> (k * ow)) & omask);
      lane = (ACC_W + 1)'((r0 >> (k * lw)) & lmask) + (ACC_W + 1)'(p);
      if (lane >> lw != 0) begin
        n_wrap++;
        if (k < nl - 1) n_carry_break++;
      end
      if (((lane & (ACC_W + 1)'(lmask)) >> (2 * ow)) != 0) n_guard++;
      r |= (ACC_W'(lane) & lmask) << (k * lw);
    end
    if (nl == 1) begin
      // did a carry cross one of the 34-bit segment boundaries?
      logic [ACC_W-1:0] sum_x;
      sum_x = r0 ^ ACC_W'(p) ^ r;   // carry-in vector of every bit
      if (sum_x[34] | sum_x[68] | sum_x[102]) n_full_cross++;
    end
    return r;
  endfunction

  task automatic check(string what, logic [ACC_W-1:0] exp);
    checks++;
    if (acc !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: acc=%0d exp=%0d", what, acc, exp);
    end
  endtask

  // one MAC: apply at the falling edge, check hold, check after rising edge
  task automatic mac(logic [1:0] code, logic [DATA_W-1:0] x, logic [DATA_W-1:0] y);
    @(negedge clk);
    reset = 1'b0; s = code; a = x; b = y;
    #1;
    check("hold before edge", model);
    model = ref_mac(model, x, y, code);
    n_mode[code]++;
    @(posedge clk); #1;
    check("mac", model);
  endtask

  task automatic do_reset(logic [1:0] code);
    @(negedge clk);
    reset = 1'b1; s = code; a = '1; b = '1;
    @(posedge clk); #1;
    model = '0;
    n_reset++;
    check("reset", '0);
  endtask

  task automatic burst(logic [1:0] code, int n);
    mac(code, '0, '0);
    mac(code, '1, '1);
    mac(code, 64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555);
    mac(code, 64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA);
    for (int i = 0; i < n; i++) mac(code, {$urandom, $urandom}, {$urandom, $urandom});
    // drive every lane to the top so the guard bits fill and lanes wrap
    for (int i = 0; i < 300; i++) mac(code, '1, '1);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; s = 2'b00; a = '0; b = '0; model = '0;
    foreach (n_mode[i]) n_mode[i] = 0;
    @(posedge clk); #1;
    check("power-on reset", '0);

    // published example, full mode: two products accumulated from zero
    do_reset(2'b00);
    mac(2'b00, 64'd195166238489842377, 64'd10864115919497026454);
    checks++;
    if (acc !== 136'(128'd195166238489842377 * 128'd10864115919497026454)) failures++;
    burst(2'b00, 2000);

    // published example, dual mode, from a cleared accumulator
    do_reset(2'b01);
    n_switch_reset++;
    mac(2'b01, 64'd12923933653580990373, 64'd3522177804678951749);
    checks++;
    if (acc !== 136'd728326275905393500396409719211934510713) begin
      failures++;
      $display("FAIL dual example: acc=%0d", acc);
    end
    burst(2'b01, 2000);

    // published example, quad mode, from a cleared accumulator
    do_reset(2'b10);
    n_switch_reset++;
    mac(2'b10, 64'd2078314362, 64'd1515911804);
    checks++;
    if (acc !== 136'd12601409309807649560) begin
      failures++;
      $display("FAIL quad example: acc=%0d", acc);
    end
    burst(2'b10, 2000);

    // switch modes without a reset: the accumulator keeps its bits and the
    // next MAC uses the new lane layout
    for (int i = 0; i < 300; i++) begin
      logic [1:0] code;
      code = 2'($urandom_range(0, 3));
      if (code != s) n_switch_live++;
      mac(code, {$urandom, $urandom}, {$urandom, $urandom});
    end
    do_reset(2'b00);
    mac(2'b11, '1, '1);
    mac(2'b00, 64'd1, 64'd1);

    $display("mechanisms: full=%0d dual=%0d quad=%0d code11=%0d resets=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_reset);
    $display("  switches with reset=%0d live=%0d carry_break=%0d full_cross=%0d guard=%0d wrap=%0d",
             n_switch_reset, n_switch_live, n_carry_break, n_full_cross, n_guard, n_wrap);
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0) failures++;
    if (n_switch_reset == 0 || n_switch_live == 0 || n_reset == 0) failures++;
    if (n_carry_break == 0 || n_full_cross == 0 || n_guard == 0 || n_wrap == 0) failures++;
    checks += 3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
