// tb_pv_unit: self-checking testbench of the pseudo-Voigt arithmetic unit
// and its controller.
//
// Two units run side by side, one with the default 10 iterations of the
// exponential and one with 30. For angles across a 25..35 deg scan and a
// range of peak shapes, each result is compared with a double-precision
// model of the same calculation (truncated series for exp), within the
// rounding error single precision allows. The 30-iteration unit is also
// compared with the exact function. The testbench checks the latency of
// every evaluation (76 + 32 * iterations clocks) and counts how often
// the three parallel operations of step 4 and the two of step 5 really
// were in flight together.
module tb_pv_unit;
  import fom_pkg::*;
  import fp_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  float_t     x = '0;
  pv_params_t p = '0;
  logic       busy_a, done_a, busy_b, done_b;
  float_t     y_a, y_b;
  int checks = 0, failures = 0;
  int n_step4 = 0, n_step5 = 0;

  pv_unit dut_a (.clk, .rst_n, .start, .x, .p, .busy(busy_a), .done(done_a), .y(y_a));
  pv_unit #(.EXP_ITERS(30)) dut_b (.clk, .rst_n, .start, .x, .p, .busy(busy_b), .done(done_b), .y(y_b));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // parallel operations: step 4 starts two adders and the multiplier at
  // once; in step 5 divider 0 (Cauchy part) is busy while the exponential
  // series uses divider 1
  always @(posedge clk) begin
    if (dut_a.add_start[0] && dut_a.add_start[1] && dut_a.mul_start) n_step4++;
    if (dut_a.div_start[1] && dut_a.g_dup[0].u_div.busy) n_step5++;
  end

  function automatic real pv_model(input real xx, input real i0, input real x0,
                                   input real w, input real eta, input int iters);
    real t2, c, term, sum;
    t2 = ((xx - x0) / w) ** 2;
    c  = $ln(2.0) * t2;
    if (iters < 0) return i0 * (eta / (1.0 + t2) + (1.0 - eta) * $exp(-c));
    term = 1.0; sum = 1.0;
    for (int k = 1; k <= iters; k++) begin
      term = term * c / real'(k);
      sum  = sum + term;
    end
    return i0 * (eta / (1.0 + t2) + (1.0 - eta) / sum);
  endfunction

  task automatic check_val(input string tag, input float_t got, input real ref_, input real scale);
    real g, tol;
    g   = to_real(got);
    tol = 1.0e-4 * (ref_ < 0 ? -ref_ : ref_) + 1.0e-6 * scale;
    checks++;
    if ((g - ref_) > tol || (ref_ - g) > tol) begin
      failures++;
      $display("FAIL %s: got %g expected %g", tag, g, ref_);
    end
  endtask

  task automatic run(input real xx, input real i0, input real x0, input real w, input real eta);
    int na, nb;
    float_t ra, rb;
    bit got_a, got_b;
    @(negedge clk);
    x = to_single(xx);
    p = '{i0: to_single(i0), x0: to_single(x0), w: to_single(w), eta: to_single(eta)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    na = 0; nb = 0; got_a = 0; got_b = 0;
    for (int c = 1; c < 3000 && !(got_a && got_b); c++) begin
      if (done_a && !got_a) begin na = c; ra = y_a; got_a = 1; end
      if (done_b && !got_b) begin nb = c; rb = y_b; got_b = 1; end
      @(negedge clk);
    end
    checks++;
    if (na != 76 + 32 * 10 || nb != 76 + 32 * 30) begin
      failures++;
      $display("FAIL latency %0d / %0d, expected %0d / %0d", na, nb, 76 + 320, 76 + 960);
    end
    // the model uses the single-precision inputs the units really see
    check_val("10 iterations", ra, pv_model(to_real(x), to_real(p.i0), to_real(p.x0),
                                            to_real(p.w), to_real(p.eta), 10), i0);
    check_val("30 iterations", rb, pv_model(to_real(x), to_real(p.i0), to_real(p.x0),
                                            to_real(p.w), to_real(p.eta), 30), i0);
    check_val("exact", rb, pv_model(to_real(x), to_real(p.i0), to_real(p.x0),
                                    to_real(p.w), to_real(p.eta), -1), i0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // the benchmark's first peak: maximum, half width, tails
    run(30.0, 1000.0, 30.0, 0.2, 0.5);
    run(30.2, 1000.0, 30.0, 0.2, 0.5);
    run(29.8, 1000.0, 30.0, 0.2, 0.5);
    run(25.0, 1000.0, 30.0, 0.2, 0.5);
    run(35.0, 500.0, 30.5, 0.2, 0.5);
    // pure Gauss and pure Cauchy shapes
    run(30.1, 800.0, 30.0, 0.15, 0.0);
    run(30.1, 800.0, 30.0, 0.15, 1.0);
    // scan of angles and random shapes
    for (int i = 0; i < 40; i++)
      run(25.0 + 0.25 * i, 200.0 + real'($urandom % 1000), 29.0 + real'($urandom % 200) / 100.0,
          0.05 + real'($urandom % 40) / 100.0, real'($urandom % 101) / 100.0);
    checks++;
    if (n_step4 == 0 || n_step5 == 0) begin
      failures++;
      $display("FAIL parallel steps not seen: step4 %0d step5 %0d", n_step4, n_step5);
    end
    $display("parallel step 4: %0d times, step 5: %0d times", n_step4, n_step5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
