// tb_fom_processor: end-to-end testbench of the figure-of-merit processor
// at its default parameters, on short scans and on the whole stored
// benchmark profile.
//
// Each run loads a candidate and a scan, pulses start and waits for
// fitness_rdy; the figure of merit is compared with a double-precision
// model (fom_ref_pkg) fed with the same profile file. Runs: the benchmark
// candidate on the first points and on the whole 501-point scan, a scan
// longer than the memory (cut to 512 points), perturbed random candidates over the
// peak region, an empty scan, and two runs back to back. The testbench
// checks that fitness_rdy is low while a run is in progress, that each run
// takes the clock count the schedule gives, and counts the mechanisms of
// the design: the three- and two-way parallel steps of the pV unit, the
// background computed on the main units while the pV unit is busy, the
// alpha2 components, the empty scan and the scan cut to the memory size.
module tb_fom_processor;
  import fom_pkg::*;
  import fp_ref_pkg::*;
  import fom_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [9:0]   n_points = '0;
  float_t       x_start = '0, x_step = '0, bg0 = '0, bg1 = '0;
  peak_params_t peaks [2];
  logic         busy, fitness_rdy;
  float_t       merit;
  int checks = 0, failures = 0;
  int counts [];
  int n_step4 = 0, n_step5 = 0, n_bg_overlap = 0, n_alpha2 = 0, n_empty = 0, n_clip = 0;

  fom_processor dut (.clk, .rst_n, .start, .n_points, .x_start, .x_step, .peaks,
                     .bg0, .bg1, .busy, .fitness_rdy, .merit);

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_pv.add_start[0] && dut.u_pv.add_start[1] && dut.u_pv.mul_start) n_step4++;
    if (dut.u_pv.div_start[1] && dut.u_pv.g_dup[0].u_div.busy) n_step5++;
    if (dut.add_start && dut.pv_busy && dut.u_ctrl.state == dut.u_ctrl.M_P4) n_bg_overlap++;
    if (dut.pv_start && dut.pv_p.x0 != peaks[0].x01 && dut.pv_p.x0 != peaks[1].x01) n_alpha2++;
  end

  // clocks of one run: per point 4 pV evaluations of 396 clocks and the
  // main-unit steps around them, plus the start-up steps
  function automatic int run_clocks(input int n);
    return 6 + n * (4 * 396 + 52);
  endfunction

  task automatic run(input int n, input real xs, input real dx, input peak_params_t pk[],
                     input float_t b0, input float_t b1);
    run_n(n, n, xs, dx, pk, b0, b1);
  endtask

  // n points requested, m points expected to be used
  task automatic run_n(input int n, input int m, input real xs, input real dx, input peak_params_t pk[],
                     input float_t b0, input float_t b1);
    real    ref_, got, tol;
    int     cyc;
    @(negedge clk);
    n_points = 10'(n);
    x_start  = to_single(xs);
    x_step   = to_single(dx);
    peaks[0] = pk[0];
    peaks[1] = pk[1];
    bg0 = b0; bg1 = b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    checks++;
    if (fitness_rdy) begin
      failures++;
      $display("FAIL fitness_rdy high during a run");
    end
    while (!fitness_rdy && cyc < 2000000) begin
      @(negedge clk);
      cyc++;
    end
    if (n == 0) n_empty++;
    if (m < n) n_clip++;
    ref_ = chi2_ref(m, counts, x_start, x_step, pk, b0, b1, 10);
    got  = to_real(merit);
    tol  = 1.0e-4 * ref_ + 1.0e-3;
    checks++;
    if ((got - ref_) > tol || (ref_ - got) > tol) begin
      failures++;
      $display("FAIL n=%0d merit %f expected %f", n, got, ref_);
    end else begin
      $display("n=%0d merit %f (model %f), %0d clocks", n, got, ref_, cyc);
    end
    checks++;
    if (cyc != run_clocks(m)) begin
      failures++;
      $display("FAIL n=%0d took %0d clocks, expected %0d", n, cyc, run_clocks(m));
    end
  endtask

  initial begin
    peak_params_t bench [], cand [];
    float_t b0, b1;
    logic [12:0] rom [512];
    $readmemh("rtl/profile_rom.hex", rom);
    counts = new[512];
    foreach (counts[i]) counts[i] = int'(rom[i]);
    benchmark(bench, b0, b1);
    cand = new[2];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run(12, 25.0, 0.02, bench, b0, b1);
    run(0, 25.0, 0.02, bench, b0, b1);
    for (int r = 0; r < 3; r++) begin
      foreach (cand[j]) begin
        cand[j] = bench[j];
        cand[j].i0  = to_single(to_real(bench[j].i0) * (0.8 + real'($urandom % 40) / 100.0));
        cand[j].x01 = to_single(to_real(bench[j].x01) + real'(int'($urandom % 21) - 10) / 100.0);
        cand[j].x02 = to_single(to_real(cand[j].x01) + 0.0765);
        cand[j].w   = to_single(0.1 + real'($urandom % 20) / 100.0);
        cand[j].eta = to_single(real'($urandom % 101) / 100.0);
      end
      // model peaks fall inside the scan: large misfit against the stored counts
      run(6, 29.85 + 0.03 * r, 0.02, cand, b0, to_single(-0.3));
    end
    // the whole benchmark scan, 25.00 to 35.00 deg in 0.02 deg steps
    run(501, 25.0, 0.02, bench, b0, b1);
    // a scan longer than the memory is cut to its 512 words
    run_n(600, 512, 25.0, 0.02, bench, b0, b1);
    // back-to-back runs on the same candidate give the same result
    run(5, 25.0, 0.02, bench, b0, b1);
    run(5, 25.0, 0.02, bench, b0, b1);

    checks++;
    if (n_step4 == 0 || n_step5 == 0 || n_bg_overlap == 0 || n_alpha2 == 0 || n_empty == 0 ||
        n_clip == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("pV step 4 parallel: %0d, step 5 parallel: %0d, background beside pV: %0d, alpha2 components: %0d, empty scans: %0d, scans cut to the memory: %0d",
             n_step4, n_step5, n_bg_overlap, n_alpha2, n_empty, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
