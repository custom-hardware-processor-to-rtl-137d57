// tb_profile_rom: self-checking testbench of the profile ROM. Reads every
// address, checks the one-clock read latency, compares each word with the
// initialisation file read here on its own, and compares it with a value
// computed here from the benchmark model (two pseudo-Voigt peaks with
// their alpha2 companions on a falling linear background): the stored
// counts carry Poisson noise, so each word must lie within six standard
// deviations of the model, and the peak maximum must sit near 30 deg.
module tb_profile_rom;

  logic        clk = 1'b0;
  logic [8:0]  addr = '0;
  logic [12:0] rdata;
  int checks = 0, failures = 0;

  profile_rom dut (.clk, .addr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pv(input real x, input real i0, input real x0,
                             input real w, input real eta);
    real t;
    t = ((x - x0) / w) ** 2;
    return i0 * (eta / (1.0 + t) + (1.0 - eta) * $exp(-$ln(2.0) * t));
  endfunction

  function automatic real model(input real x);
    return 100.0 - 10.0 * (x / 25.0 - 1.0)
         + pv(x, 1000.0, 30.0, 0.2, 0.5) + pv(x, 500.0, 30.0764, 0.2, 0.5)
         + pv(x, 500.0, 30.5, 0.2, 0.5) + pv(x, 250.0, 30.5778, 0.2, 0.5);
  endfunction

  initial begin
    int   maxv, maxi;
    real  m, x;
    logic [12:0] file_words [512];
    $readmemh("rtl/profile_rom.hex", file_words);
    maxv = 0; maxi = 0;
    @(negedge clk);
    for (int i = 0; i < 512; i++) begin
      addr = 9'(i);
      @(posedge clk);
      #1;
      x = 25.0 + 0.02 * i;
      m = model(x);
      checks++;
      if (rdata !== file_words[i]) begin
        failures++;
        $display("FAIL addr %0d: %0d, file holds %0d", i, rdata, file_words[i]);
      end
      checks++;
      if ((real'(rdata) - m) ** 2 > 36.0 * m) begin
        failures++;
        $display("FAIL addr %0d: %0d, model %f", i, rdata, m);
      end
      if (int'(rdata) > maxv) begin
        maxv = int'(rdata);
        maxi = i;
      end
      @(negedge clk);
    end
    checks++;
    if (maxi < 245 || maxi > 258) begin
      failures++;
      $display("FAIL maximum at address %0d", maxi);
    end
    // read latency: data changes only on the clock edge
    addr = 9'd250;
    @(posedge clk); #1;
    addr = 9'd0;
    #2;
    checks++;
    if (rdata < 13'd1000) begin
      failures++;
      $display("FAIL read not registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
