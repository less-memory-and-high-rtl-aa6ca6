// tb_lns_cotrans_rom -- reads every word of F1, F2 and F3 and compares it with
// log2(2^x - 1) computed here in double precision (within one unit of 2^-27).
module tb_lns_cotrans_rom;
  import lns_pkg::*;

  logic clk = 1'b0;
  logic en;
  logic [7:0] a, b, c;
  cval_t f1, f2, f3;

  int checks = 0, failures = 0;

  lns_cotrans_rom dut (.clk, .en, .a, .b, .c, .f1, .f2, .f3);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real want(input real x);
    real y, e;
    y = x * 0.6931471805599453;
    if (y < 1.0e-3) e = y + y * y / 2.0 + y * y * y / 6.0 + y * y * y * y / 24.0;
    else            e = $exp(y) - 1.0;
    return $ln(e) / 0.6931471805599453 * 134217728.0;
  endfunction

  task automatic cmp(input string what, input longint got, input real w, input int k);
    real e;
    e = real'(got) - w;
    checks++;
    if (e > 1.0 || e < -1.0) begin
      failures++;
      if (failures < 10) $display("%s[%0d] = %0d, expected %f", what, k, got, w);
    end
  endtask

  initial begin
    en = 1'b0; a = '0; b = '0; c = '0;
    @(negedge clk);
    for (int k = 1; k < 256; k++) begin
      en = 1'b1; a = 8'(k); b = 8'(255 - k + 1); c = 8'(k);
      @(negedge clk);
      en = 1'b0; a = '0; b = '0; c = '0;
      @(negedge clk);
      cmp("F1", f1, want(real'(k) / 128.0), k);
      cmp("F2", f2, want(real'(256 - k) / 32768.0), 256 - k);
      cmp("F3", f3, want(real'(k) / 8388608.0), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
