// tb_fp_div: self-checking testbench of the single-precision divider.
// The reference is the double quotient rounded to single. Random operands,
// directed cases (exact quotients, quotient below one, division by zero,
// zero dividend) and a check that done comes exactly 29 clocks after start
// with busy high in between.
module tb_fp_div;
  import fp_ref_pkg::*;

  localparam int LATENCY = 29;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        busy, done;
  logic [31:0] y;
  int checks = 0, failures = 0;

  fp_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp);
    int n;
    @(negedge clk);
    a = ta; b = tb_; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 100) begin
      if (!busy) begin
        failures++;
        $display("FAIL busy low during division");
      end
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", n, LATENCY);
    end
    checks++;
    if (y !== exp && !(y[30:0] == 31'd0 && exp[30:0] == 31'd0)) begin
      failures++;
      $display("FAIL %h / %h = %h expected %h", ta, tb_, y, exp);
    end
  endtask

  task automatic run_r(input logic [31:0] ta, input logic [31:0] tb_);
    run(ta, tb_, to_single(to_real(ta) / to_real(tb_)));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h40C00000, 32'h40000000, 32'h40400000);  // 6 / 2 = 3
    run(32'h3F800000, 32'h40400000, 32'h3EAAAAAB);  // 1 / 3
    run(32'h3F800000, 32'h00000000, 32'h7F800000);  // 1 / 0 = inf
    run(32'h00000000, 32'h40400000, 32'h00000000);  // 0 / 3 = 0
    run(32'hC1200000, 32'h40A00000, 32'hC0000000);  // -10 / 5 = -2
    run_r(32'h3F000000, 32'h3F7FFFFF);
    for (int i = 0; i < 3000; i++)
      run_r(rand_single(70, 180), rand_single(70, 180));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
