// tb_lns_cotrans -- checks the co-transformation result T = log2(2^r - 1) for
// 0 < r < 2 against a double-precision reference, with the addition interpolator
// attached as in the full unit. Covers every combination of zero and non-zero
// fields a | b | c and checks the start-to-done latency (2, 4 or 6 clock edges after the edge that takes start).
module tb_lns_cotrans;
  import lns_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, fa_req, fa_valid;
  logic [23:0] r;
  xlog_t t;
  rarg_t fa_r;
  fval_t fa_f;

  int checks = 0, failures = 0;
  int n_none = 0, n_one = 0, n_two = 0;
  real max_err = 0.0;
  localparam real TOL = 8.0;            // units of 2^-27

  lns_cotrans dut (.clk, .rst_n, .start, .r, .busy, .done, .t, .fa_req, .fa_r, .fa_valid, .fa_f);
  lns_ndd_interp #(.FN(FUNC_ADD)) u_fa (.clk, .rst_n, .in_valid(fa_req), .r(fa_r),
                                        .out_valid(fa_valid), .f(fa_f));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // log2(2^x - 1) in 2^-27 units, with a series for small x
  function automatic real ref_t(input logic [23:0] rr);
    real x, y, e;
    x = real'(rr) / 8388608.0;
    y = x * 0.6931471805599453;
    if (y < 1.0e-3) e = y + y * y / 2.0 + y * y * y / 6.0 + y * y * y * y / 24.0;
    else            e = $exp(y) - 1.0;
    return $ln(e) / 0.6931471805599453 * 134217728.0;
  endfunction

  task automatic run(input logic [23:0] rr);
    int cyc, nz, exp_lat;
    real err;
    @(negedge clk);
    start = 1'b1; r = rr;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    nz = (rr[23:16] != 0) + (rr[15:8] != 0) + (rr[7:0] != 0);
    exp_lat = (nz <= 1) ? 2 : (nz == 2 ? 4 : 6);
    if (nz == 1) n_none++; else if (nz == 2) n_one++; else n_two++;
    err = real'(t) - ref_t(rr);
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > TOL || cyc - 1 != exp_lat) begin
      failures++;
      if (failures < 10) $display("r=%h t=%0d ref=%f lat=%0d exp=%0d", rr, t, ref_t(rr), cyc, exp_lat);
    end
  endtask

  initial begin
    start = 1'b0; r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // smallest, largest and single-field values
    run(24'h000001); run(24'hFFFFFF); run(24'h010000); run(24'h000100);
    run(24'hFF0000); run(24'h00FF00); run(24'h0000FF); run(24'h800000);
    for (int n = 0; n < 6000; n++) begin
      logic [23:0] x;
      x = 24'($urandom);
      case (n % 7)
        0: x[23:16] = 8'd0;
        1: x[15:8]  = 8'd0;
        2: x[7:0]   = 8'd0;
        3: x[23:8]  = 16'd0;
        4: x[15:0]  = 16'd0;
        5: begin x[23:16] = 8'd0; x[7:0] = 8'd0; end
        default: ;
      endcase
      if (x == 24'd0) x = 24'd1;
      run(x);
    end
    if (n_none == 0 || n_one == 0 || n_two == 0) failures++;
    $display("max error %f (2^-27 units); no/one/two additions: %0d %0d %0d", max_err, n_none, n_one, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
