// tb_precision_ctrl -- checks the decode of all four mode-select codes:
// mode, active lane count and the carry-break vector (bit i kills the carry
// at accumulator bit 34*(i+1)).
module tb_precision_ctrl;
  import rmac_pkg::*;

  logic [1:0] mode_sel;
  prec_cfg_t  cfg;
  int checks = 0, failures = 0;

  precision_ctrl dut (.mode_sel(mode_sel), .cfg(cfg));

  task automatic expect_cfg(logic [1:0] code, mode_t m, int lanes, logic [2:0] brk);
    mode_sel = code;
    #1;
    checks++;
    if (cfg.mode !== m || int'(cfg.lanes) != lanes || cfg.carry_break !== brk) begin
      failures++;
      $display("FAIL code %b: mode %b lanes %0d break %b", code, cfg.mode,
               cfg.lanes, cfg.carry_break);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_cfg(2'b00, MODE_FULL, 1, 3'b000);
    expect_cfg(2'b01, MODE_DUAL, 2, 3'b010);
    expect_cfg(2'b10, MODE_QUAD, 4, 3'b111);
    expect_cfg(2'b11, MODE_FULL, 1, 3'b000);
    expect_cfg(2'b10, MODE_QUAD, 4, 3'b111);
    expect_cfg(2'b00, MODE_FULL, 1, 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
