// tb_fom_exp_iterations: the benchmark run with 10 and with 30 iterations
// of the exponential series, the two settings whose precision and speed
// are traded against each other.
//
// Two processors, one at the default EXP_ITERS = 10 and one at 30, compute
// the figure of merit of the same candidate over the whole 501-point
// benchmark scan. A slightly perturbed candidate (peaks moved by 0.01 deg)
// is used, so that the Gaussian tails, where the truncated series differs
// most, matter. Each result is compared with the double-precision model at
// the same iteration count, and each run must take 6 + n*(4*(76+32*K)+52)
// clocks. The two figures of merit and run times are printed side by side.
module tb_fom_exp_iterations;
  import fom_pkg::*;
  import fp_ref_pkg::*;
  import fom_ref_pkg::*;

  localparam int N = 501;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  float_t       x_start, x_step, bg0, bg1;
  peak_params_t peaks [2];
  logic         busy10, rdy10, busy30, rdy30;
  float_t       merit10, merit30;
  int checks = 0, failures = 0;
  int counts [];

  fom_processor dut10 (.clk, .rst_n, .start, .n_points(10'(N)), .x_start, .x_step, .peaks,
                       .bg0, .bg1, .busy(busy10), .fitness_rdy(rdy10), .merit(merit10));
  fom_processor #(.EXP_ITERS(30)) dut30 (.clk, .rst_n, .start, .n_points(10'(N)), .x_start,
                       .x_step, .peaks, .bg0, .bg1, .busy(busy30), .fitness_rdy(rdy30),
                       .merit(merit30));

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input float_t got, input real ref_,
                       input int cyc, input int exp_cyc);
    real g;
    g = to_real(got);
    checks++;
    if ((g - ref_) > 1.0e-4 * ref_ || (ref_ - g) > 1.0e-4 * ref_) begin
      failures++;
      $display("FAIL %s merit %f expected %f", tag, g, ref_);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL %s took %0d clocks, expected %0d", tag, cyc, exp_cyc);
    end
  endtask

  initial begin
    peak_params_t bench [];
    logic [12:0] rom [512];
    int c10, c30, cyc;
    real r10, r30;
    $readmemh("rtl/profile_rom.hex", rom);
    counts = new[512];
    foreach (counts[i]) counts[i] = int'(rom[i]);
    benchmark(bench, bg0, bg1);
    foreach (bench[j]) begin
      bench[j].x01 = to_single(to_real(bench[j].x01) + 0.01);
      bench[j].x02 = to_single(to_real(bench[j].x02) + 0.01);
    end
    peaks[0] = bench[0];
    peaks[1] = bench[1];
    x_start = to_single(25.0);
    x_step  = to_single(0.02);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; c10 = 0; c30 = 0;
    while ((c10 == 0 || c30 == 0) && cyc < 3000000) begin
      if (rdy10 && c10 == 0) c10 = cyc;
      if (rdy30 && c30 == 0) c30 = cyc;
      @(negedge clk);
      cyc++;
    end
    r10 = chi2_ref(N, counts, x_start, x_step, bench, bg0, bg1, 10);
    r30 = chi2_ref(N, counts, x_start, x_step, bench, bg0, bg1, 30);
    check("10 iterations", merit10, r10, c10, 6 + N * (4 * (76 + 32 * 10) + 52));
    check("30 iterations", merit30, r30, c30, 6 + N * (4 * (76 + 32 * 30) + 52));
    $display("10 iterations: merit %f in %0d clocks; 30 iterations: merit %f in %0d clocks",
             to_real(merit10), c10, to_real(merit30), c30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
