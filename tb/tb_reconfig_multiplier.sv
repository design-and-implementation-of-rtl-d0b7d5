// tb_reconfig_multiplier -- self-check of the 64x64 Vedic multiplier core in
// all mode codes. Expected vectors are computed with the simulator's own
// 128-bit multiplier: the full product in mode 00 and 11, two packed 32x32
// lane products in mode 01, four packed 16x16 lane products in mode 10.
// Operands change at each falling clock edge and are checked at the rising
// edge; corner operands come first, then random ones.
module tb_reconfig_multiplier;
  import rmac_pkg::*;

  localparam int unsigned N_VEC = 4000;

  logic              clk = 1'b0;
  logic [DATA_W-1:0] a, b;
  logic [1:0]        code;
  logic [PROD_W-1:0] prod;
  int idx = 0, checks = 0, failures = 0;

  reconfig_multiplier dut (.a(a), .b(b), .mode(mode_t'(code)), .prod(prod));

  always #5 clk = ~clk;

  function automatic logic [PROD_W-1:0] ref_prod(logic [DATA_W-1:0] x,
                                                  logic [DATA_W-1:0] y,
                                                  logic [1:0] c);
    logic [PROD_W-1:0] r;
    r = '0;
    unique case (c)
      2'b01:
        for (int k = 0; k < 2; k++)
          r[64*k +: 64] = 64'(x[32*k +: 32]) * 64'(y[32*k +: 32]);
      2'b10:
        for (int k = 0; k < 4; k++)
          r[32*k +: 32] = 32'(x[16*k +: 16]) * 32'(y[16*k +: 16]);
      default:
        r = 128'(x) * 128'(y);
    endcase
    return r;
  endfunction

  always @(negedge clk) begin
    code = 2'(idx);
    unique case (idx / 4)
      0:       begin a = '0; b = '0; end
      1:       begin a = '1; b = '1; end
      2:       begin a = 64'hAAAA_AAAA_AAAA_AAAA; b = 64'h5555_5555_5555_5555; end
      3:       begin a = '1; b = 64'd1; end
      4:       begin a = 64'hFFFF_0000_FFFF_0000; b = 64'h0000_FFFF_FFFF_FFFF; end
      default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
    endcase
  end

  always @(posedge clk) begin
    logic [PROD_W-1:0] exp;
    exp = ref_prod(a, b, code);
    checks++;
    if (prod !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL mode %b a=%h b=%h prod=%h exp=%h", code, a, b, prod, exp);
    end
    idx++;
    if (idx == N_VEC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin : watchdog
    repeat (N_VEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
