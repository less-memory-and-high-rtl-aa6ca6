// tb_lns_addsub -- end-to-end test of the LNS adder/subtractor at its default size.
// Random additions and subtractions over every region of r (interpolated addition,
// interpolated subtraction, the co-transformation region with zero, one or two inner
// additions, r >= 32, the top segment without S table), zero operands, exact
// cancellation, overflow and underflow, and output back-pressure. Each result is
// compared with the exactly rounded log2|a +- b| computed in double precision: the
// log must be within TOL units in the last place, the sign and flags exact, and the
// latency must match the documented cycle count. Every mechanism must occur.
module tb_lns_addsub;
  import lns_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, in_op, out_valid, out_ready, out_ovf, out_unf;
  lns_t in_a, in_b, out_y;

  int checks = 0, failures = 0;
  real max_ulp = 0.0;
  localparam real TOL = 0.75;             // units in the last place (2^-23)
  localparam int  NOPS = 30000;

  // mechanism counters
  int n_add = 0, n_sub = 0, n_cot0 = 0, n_cot1 = 0, n_cot2 = 0, n_far = 0, n_top = 0;
  int n_zop = 0, n_cancel = 0, n_ovf = 0, n_unf = 0, n_stall = 0;

  lns_addsub dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real L2 = 0.6931471805599453;

  function automatic real expm1_2(input real x);   // 2^x - 1
    real y;
    y = x * L2;
    if (y < 1.0e-3) return y + y * y / 2.0 + y * y * y / 6.0 + y * y * y * y / 24.0;
    return $exp(y) - 1.0;
  endfunction

  function automatic logic signed [LOGW-1:0] lg(input lns_t x);
    return x[LOGW-1:0];
  endfunction

  // one operation: drive, wait, check
  task automatic op(input lns_t a, input lns_t b, input logic sub, input int stall);
    logic signed [LOGW-1:0] la, lb, li, lj;
    logic sa, sbe, eff_sub, exp_sgn, exp_zero, exp_ovf, exp_unf;
    real r, exact, err;
    int cyc, exp_lat, nz;
    lns_t y;
    la = lg(a); lb = lg(b);
    sa = a[31]; sbe = b[31] ^ sub;
    eff_sub = sa ^ sbe;
    li = (la >= lb) ? la : lb;
    lj = (la >= lb) ? lb : la;
    exp_sgn = (la >= lb) ? sa : sbe;
    r = real'(longint'(li) - longint'(lj)) / 8388608.0;
    exp_zero = 1'b0; exp_ovf = 1'b0; exp_unf = 1'b0; exact = 0.0; exp_lat = 3;
    nz = 0;
    if (a[LOGW-1:0] == ZERO_LOG || b[LOGW-1:0] == ZERO_LOG) begin
      n_zop++; exp_lat = 1;
      if (a[LOGW-1:0] == ZERO_LOG && b[LOGW-1:0] == ZERO_LOG) exp_zero = 1'b1;
      else if (a[LOGW-1:0] == ZERO_LOG) begin exact = real'(lb) / 8388608.0; exp_sgn = sbe; end
      else begin exact = real'(la) / 8388608.0; exp_sgn = sa; end
    end else if (eff_sub && li == lj) begin
      n_cancel++; exp_zero = 1'b1; exp_lat = 1;
    end else begin
      if (r >= 32.0) begin
        n_far++; exp_lat = 1;
      end else if (!eff_sub) n_add++;
      else if (r >= 2.0) n_sub++;
      else begin
        logic [23:0] rb;
        rb = 24'(li - lj);
        nz = (rb[23:16] != 0) + (rb[15:8] != 0) + (rb[7:0] != 0);
        if (nz <= 1) begin n_cot0++; exp_lat = 4; end
        else if (nz == 2) begin n_cot1++; exp_lat = 6; end
        else begin n_cot2++; exp_lat = 8; end
      end
      if (r >= 16.0 && r < 32.0) n_top++;
      if (eff_sub) exact = real'(lj) / 8388608.0 + $ln(expm1_2(r)) / L2;
      else         exact = real'(li) / 8388608.0 + $ln(1.0 + $pow(2.0, -r)) / L2;
      if (exact * 8388608.0 > real'(MAX_LOG) + 0.5) begin exp_ovf = 1'b1; n_ovf++; end
      if (exact * 8388608.0 < -real'(MAX_LOG) + 0.5) begin exp_unf = 1'b1; exp_zero = 1'b1; n_unf++; end
    end
    // drive
    @(negedge clk);
    in_valid = 1'b1; in_a = a; in_b = b; in_op = sub;
    out_ready = (stall == 0);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    cyc = 1;
    while (!out_valid && cyc < 100) begin @(negedge clk); cyc++; end
    if (stall != 0) begin
      y = out_y;
      repeat (stall) begin
        @(negedge clk);
        checks++;
        if (!out_valid || out_y != y) failures++;
      end
      n_stall++;
      out_ready = 1'b1;
    end
    y = out_y;
    @(negedge clk);
    out_ready = 1'b1;
    // compare
    checks++;
    if (exp_zero) begin
      if (y[LOGW-1:0] != ZERO_LOG || out_unf != exp_unf || cyc != exp_lat) begin
        failures++;
        if (failures < 10) $display("FAIL zero a=%h b=%h op=%0d y=%h lat=%0d/%0d", a, b, sub, y, cyc, exp_lat);
      end
    end else if (exp_ovf) begin
      if (y != {exp_sgn, MAX_LOG} || !out_ovf || cyc != exp_lat) begin
        failures++;
        if (failures < 10) $display("FAIL ovf a=%h b=%h op=%0d y=%h", a, b, sub, y);
      end
    end else begin
      err = real'(lg(y)) - exact * 8388608.0;
      if (err < 0) err = -err;
      if (err > max_ulp) max_ulp = err;
      if (err > TOL || y[31] != exp_sgn || out_ovf || out_unf || cyc != exp_lat) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h op=%0d y=%h exact=%f err=%f ulp lat=%0d/%0d", a, b, sub, y,
                   exact * 8388608.0, err, cyc, exp_lat);
      end
    end
  endtask

  function automatic lns_t rnd_lns(input int span);   // |log| below 2^span ulps
    lns_t x;
    x[31] = 1'($urandom);
    x[LOGW-1:0] = LOGW'($signed(int'($urandom) >>> (32 - span)));
    if (x[LOGW-1:0] == ZERO_LOG) x[LOGW-1:0] = '0;
    return x;
  endfunction

  initial begin
    in_valid = 1'b0; in_a = '0; in_b = '0; in_op = 1'b0; out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed corner cases
    op(32'h0000_0000, 32'h0000_0000, 1'b0, 0);               // 1 + 1 = 2
    op(32'h0080_0000, 32'h0000_0000, 1'b1, 0);               // 2 - 1 = 1
    op(32'h0000_0000, 32'h0000_0000, 1'b1, 0);               // 1 - 1 = 0
    op({1'b0, ZERO_LOG}, 32'h0080_0000, 1'b1, 0);            // 0 - 2
    op(32'h0080_0000, {1'b0, ZERO_LOG}, 1'b0, 0);            // 2 + 0
    op({1'b0, ZERO_LOG}, {1'b1, ZERO_LOG}, 1'b0, 0);         // 0 + 0
    op({1'b0, MAX_LOG}, {1'b0, MAX_LOG}, 1'b0, 0);           // overflow
    op({1'b0, MIN_LOG}, {1'b0, MIN_LOG + 31'd1}, 1'b1, 0);   // underflow
    op(32'h0000_0001, 32'h0000_0000, 1'b1, 3);               // r = 2^-23, stalled output
    op(32'h1000_0000, 32'h0000_0000, 1'b0, 0);               // r = 32
    for (int n = 0; n < NOPS; n++) begin
      lns_t a, b;
      int kind;
      kind = $urandom_range(0, 9);
      a = rnd_lns(31);
      b = a;
      case (kind)
        0, 1, 2: b[LOGW-1:0] = a[LOGW-1:0] - LOGW'($urandom_range(1, 1 << 24));           // r < 2
        3:       b[LOGW-1:0] = a[LOGW-1:0] - LOGW'($urandom_range(1, 255) << 16);         // a field only
        4:       b[LOGW-1:0] = a[LOGW-1:0] + LOGW'($urandom_range(1, 65535));             // r < 2^-7
        5, 6:    b[LOGW-1:0] = a[LOGW-1:0] - LOGW'($urandom_range(1 << 24, 1 << 28));     // 2 <= r < 32
        7:       b[LOGW-1:0] = a[LOGW-1:0] + LOGW'($urandom_range(1 << 27, 1 << 28));     // top segment
        default: b = rnd_lns(31);
      endcase
      if (b[LOGW-1:0] == ZERO_LOG) b[LOGW-1:0] = '0;
      // keep the random operands clear of the range limits; those are tested above
      if ($signed(a[LOGW-1:0]) > 31'sh3E00_0000 || $signed(a[LOGW-1:0]) < -31'sh3E00_0000 ||
          $signed(b[LOGW-1:0]) > 31'sh3E00_0000 || $signed(b[LOGW-1:0]) < -31'sh3E00_0000) begin
        a[LOGW-1:0] = a[LOGW-1:0] >>> 1;
        b[LOGW-1:0] = a[LOGW-1:0] - 31'd1000;
      end
      op(a, b, 1'($urandom), (n % 97 == 0) ? 2 : 0);
    end
    $display("max error %f ulp", max_ulp);
    $display("add %0d sub %0d cot(0/1/2 additions) %0d/%0d/%0d far %0d top-segment %0d",
             n_add, n_sub, n_cot0, n_cot1, n_cot2, n_far, n_top);
    $display("zero-operand %0d cancel %0d ovf %0d unf %0d stalled %0d",
             n_zop, n_cancel, n_ovf, n_unf, n_stall);
    if (n_add == 0 || n_sub == 0 || n_cot0 == 0 || n_cot1 == 0 || n_cot2 == 0 || n_far == 0 ||
        n_top == 0 || n_zop == 0 || n_cancel == 0 || n_ovf == 0 || n_unf == 0 || n_stall == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
