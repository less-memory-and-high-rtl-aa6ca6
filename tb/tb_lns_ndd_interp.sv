// tb_lns_ndd_interp -- checks both interpolator variants against log2(1 +- 2^-r)
// computed in double precision, over segment edges and random arguments.
// Streams one argument per cycle and checks the two-cycle latency.
module tb_lns_ndd_interp;
  import lns_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  va, vs;
  rarg_t ra, rs;
  logic  oa, os;
  fval_t fa, fs;

  int checks = 0, failures = 0;
  real max_err_a = 0.0, max_err_s = 0.0;
  localparam real TOL = 4.0;           // units of 2^-27
  // a result registered two edges after the sampling edge is seen by this
  // checker one edge later again
  localparam int  LAT = 3;

  lns_ndd_interp #(.FN(FUNC_ADD)) dut_a (.clk, .rst_n, .in_valid(va), .r(ra), .out_valid(oa), .f(fa));
  lns_ndd_interp #(.FN(FUNC_SUB)) dut_s (.clk, .rst_n, .in_valid(vs), .r(rs), .out_valid(os), .f(fs));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_f(input bit sub, input rarg_t r);
    real x, e;
    x = real'(r) / 134217728.0;
    e = $pow(2.0, -x);
    return (sub ? $ln(1.0 - e) : $ln(1.0 + e)) / 0.6931471805599453 * 134217728.0;
  endfunction

  // reference pipeline: arguments queued, compared when the DUT says valid
  rarg_t qa[$], qs[$];
  int    cyc = 0, issue_a[$], issue_s[$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && oa) begin
      real err;
      rarg_t r0;
      int c0;
      r0 = qa.pop_front();
      c0 = issue_a.pop_front();
      err = real'(fa) - ref_f(1'b0, r0);
      if (err < 0) err = -err;
      if (err > max_err_a) max_err_a = err;
      checks++;
      if (err > TOL || cyc - c0 != LAT) begin
        failures++;
        if (failures < 10) $display("ADD r=%h f=%0d err=%f lat=%0d", r0, fa, err, cyc - c0);
      end
    end
    if (rst_n && os) begin
      real err;
      rarg_t r0;
      int c0;
      r0 = qs.pop_front();
      c0 = issue_s.pop_front();
      err = real'(fs) - ref_f(1'b1, r0);
      if (err < 0) err = -err;
      if (err > max_err_s) max_err_s = err;
      checks++;
      if (err > TOL || cyc - c0 != LAT) begin
        failures++;
        if (failures < 10) $display("SUB r=%h f=%0d err=%f lat=%0d", r0, fs, err, cyc - c0);
      end
    end
  end

  task automatic drive(input rarg_t a, input rarg_t s);
    va <= 1'b1; ra <= a; vs <= 1'b1; rs <= s;
    qa.push_back(a); qs.push_back(s);
    issue_a.push_back(cyc + 1); issue_s.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    va = 0; vs = 0; ra = '0; rs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // segment edges
    for (int g = 0; g < 6; g++) begin
      rarg_t base, sbase;
      base  = (g == 0) ? '0 : rarg_t'(1) << (W + g - 1);
      sbase = (g < 2) ? rarg_t'(2) << W : base;
      drive(base, sbase);
      drive(base + 1, sbase + 1);
      drive((rarg_t'(1) << (W + g)) - 1, (rarg_t'(1) << (W + ((g < 2) ? 2 : g))) - 1);
    end
    // random arguments, log-uniform over the segments
    for (int n = 0; n < 20000; n++) begin
      int g, gs;
      rarg_t a, s;
      g  = $urandom_range(0, 5);
      gs = $urandom_range(2, 5);
      a  = (g == 0) ? rarg_t'($urandom) % (rarg_t'(1) << W)
                          : (rarg_t'(1) << (W + g - 1)) | (rarg_t'($urandom) % (rarg_t'(1) << (W + g - 1)));
      s  = (rarg_t'(1) << (W + gs - 1)) | (rarg_t'($urandom) % (rarg_t'(1) << (W + gs - 1)));
      drive(a, s);
    end
    va <= 1'b0; vs <= 1'b0;
    repeat (5) @(posedge clk);
    if (qa.size() != 0 || qs.size() != 0) begin
      failures++;
      $display("missing results");
    end
    $display("max error: add %f, sub %f (2^-27 units)", max_err_a, max_err_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
