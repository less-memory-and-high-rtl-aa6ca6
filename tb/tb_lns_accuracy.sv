// tb_lns_accuracy -- accuracy sweep of the LNS adder/subtractor at its default size.
// Measures, separately for addition and subtraction, the largest positive and negative
// relative error of the result, (result - exact) / exact, in units of 2^-23, over
// arguments spread across every segment of r and densely over the co-transformation
// region 0 < r < 2. The target is "better than floating point": every relative error
// must stay below 0.5, the worst-case rounding error of a 23-bit-fraction float.
module tb_lns_accuracy;
  import lns_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, in_op, out_valid, out_ready, out_ovf, out_unf;
  lns_t in_a, in_b, out_y;

  int checks = 0, failures = 0;
  localparam int  NPER = 200000;          // operations per function
  localparam real LIM  = 0.5;
  real add_hi = 0.0, add_lo = 0.0, sub_hi = 0.0, sub_lo = 0.0;

  lns_addsub dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real L2 = 0.6931471805599453;

  function automatic real pm1(input real x);            // 2^x - 1
    real y;
    y = x * L2;
    if (y < 1.0e-3) return y + y * y / 2.0 + y * y * y / 6.0 + y * y * y * y / 24.0;
    return $exp(y) - 1.0;
  endfunction

  task automatic one(input logic [LOGW-1:0] la, input logic [LOGW:0] rr, input logic sub);
    logic [LOGW-1:0] lb;
    real r, exact, rel;
    lb = la - LOGW'(rr);
    r  = real'(rr) / 8388608.0;
    if (sub) exact = real'($signed(lb)) / 8388608.0 + $ln(pm1(r)) / L2;
    else     exact = real'($signed(la)) / 8388608.0 + $ln(1.0 + $pow(2.0, -r)) / L2;
    @(negedge clk);
    in_valid = 1'b1; in_a = {1'b0, la}; in_b = {1'b0, lb}; in_op = sub;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    // relative error of 2^y against 2^exact: 2^(y - exact) - 1
    rel = pm1(real'($signed(out_y[LOGW-1:0])) / 8388608.0 - exact) * 8388608.0;
    checks++;
    if (sub) begin
      if (rel > sub_hi) sub_hi = rel;
      if (rel < sub_lo) sub_lo = rel;
    end else begin
      if (rel > add_hi) add_hi = rel;
      if (rel < add_lo) add_lo = rel;
    end
    if (rel >= LIM || rel <= -LIM || out_y[31]) begin
      failures++;
      if (failures < 10) $display("a=%h r=%h op=%0d rel=%f", la, rr, sub, rel);
    end
  endtask

  initial begin
    in_valid = 1'b0; in_a = '0; in_b = '0; in_op = 1'b0; out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int fn = 0; fn < 2; fn++) begin
      for (int n = 0; n < NPER; n++) begin
        logic [LOGW:0] rr;
        logic [LOGW-1:0] la;
        int g;
        g = $urandom_range(0, 7);
        // g 0..2: 0 < r < 2 at three scales; 3..7: one segment from [1,2) to [16,32)
        case (g)
          0:       rr = (LOGW + 1)'($urandom_range(1, 1 << 16));
          1:       rr = (LOGW + 1)'($urandom_range(1, 1 << 20));
          2:       rr = (LOGW + 1)'($urandom_range(1, (1 << 24) - 1));
          default: rr = (LOGW + 1)'($urandom_range(1 << (23 + g - 3), (1 << (24 + g - 3)) - 1));
        endcase
        if (fn == 0 && n % 4 == 0) rr = (LOGW + 1)'($urandom_range(0, (1 << 23) - 1));  // [0,1)
        if (fn == 1 && rr == '0) rr = 1;
        la = LOGW'($urandom_range(0, 1 << 28)) - LOGW'(1 << 27);
        one(la, rr, 1'(fn));
      end
    end
    $display("relative error, units of 2^-23: add %f / %f   sub %f / %f",
             add_hi, add_lo, sub_hi, sub_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
