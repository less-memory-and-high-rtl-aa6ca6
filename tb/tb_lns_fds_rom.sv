// tb_lns_fds_rom -- reads every word of the addition and subtraction F, D, S tables
// and compares it with the Newton coefficients computed here in double precision
// from log2(1 +- 2^-r) on the segment grid (within one unit of 2^-27). Also checks the
// one-cycle read latency and that the top segment reads S = 0.
module tb_lns_fds_rom;
  import lns_pkg::*;

  logic clk = 1'b0;
  logic en;
  logic [2:0] seg;
  logic [IDXW-1:0] idx;
  logic signed [FW-1:0] fa, fs;
  logic signed [DW-1:0] da, ds;
  logic signed [SW-1:0] sa, ss;

  int checks = 0, failures = 0;

  lns_fds_rom #(.FN(FUNC_ADD)) dut_a (.clk, .en, .seg, .idx, .f(fa), .d(da), .s(sa));
  lns_fds_rom #(.FN(FUNC_SUB)) dut_s (.clk, .en, .seg(seg), .idx, .f(fs), .d(ds), .s(ss));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real L2 = 0.6931471805599453;

  function automatic real fx(input bit sub, input real r);
    return (sub ? $ln(1.0 - $pow(2.0, -r)) : $ln(1.0 + $pow(2.0, -r))) / L2 * 134217728.0;
  endfunction

  task automatic cmp(input string what, input longint got, input real want, input int g, input int k);
    real e;
    e = real'(got) - want;
    checks++;
    if (e > 1.0 || e < -1.0) begin
      failures++;
      if (failures < 10) $display("%s seg %0d word %0d: %0d, expected %f", what, g, k, got, want);
    end
  endtask

  initial begin
    en = 1'b0; seg = '0; idx = '0;
    @(negedge clk);
    for (int g = 0; g < 6; g++) begin
      for (int k = 0; k < 256; k++) begin
        real h, r0, a0, a1, a2, s0, s1, s2;
        h  = (g <= 1) ? 1.0 / 256.0 : $pow(2.0, real'(g - 1)) / 256.0;
        r0 = ((g == 0) ? 0.0 : $pow(2.0, real'(g - 1))) + real'(k) * h;
        a0 = fx(0, r0); a1 = fx(0, r0 + h); a2 = fx(0, r0 + 2.0 * h);
        s0 = (g >= 2) ? fx(1, r0) : 0.0;
        s1 = (g >= 2) ? fx(1, r0 + h) : 0.0;
        s2 = (g >= 2) ? fx(1, r0 + 2.0 * h) : 0.0;
        // the subtraction tables start at segment 2; present a legal segment to both
        en = 1'b1; seg = 3'(g); idx = 8'(k);
        @(negedge clk);
        en = 1'b0; seg = 3'd0;                 // outputs must hold with en low
        @(negedge clk);
        cmp("Fa", fa, a0, g, k);
        cmp("Da", da, a1 - a0, g, k);
        cmp("Sa", sa, (g == 5) ? 0.0 : (a2 - 2.0 * a1 + a0) / 2.0, g, k);
        if (g >= 2) begin
          cmp("Fs", fs, s0, g, k);
          cmp("Ds", ds, s1 - s0, g, k);
          cmp("Ss", ss, (g == 5) ? 0.0 : (s2 - 2.0 * s1 + s0) / 2.0, g, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
