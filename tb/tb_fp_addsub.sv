// tb_fp_addsub: self-checking testbench of the single-precision
// adder/subtracter. Random operands with nearby exponents (so the exact
// sum is representable in a double and the reference rounding is exact),
// plus directed cases: cancellation to zero, large exponent gaps, carry
// out, rounding ties. Checks the one-cycle latency of every operation.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        sub = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        done;
  logic [31:0] y;
  int checks = 0, failures = 0;

  fp_addsub dut (.clk, .rst_n, .start, .sub, .a, .b, .done, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    logic [31:0] exp;
    real r;
    r   = ts ? (to_real(ta) - to_real(tb_)) : (to_real(ta) + to_real(tb_));
    exp = to_single(r);
    @(negedge clk);
    a = ta; b = tb_; sub = ts; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL latency: done not high one cycle after start");
    end
    checks++;
    if (y !== exp && !(y[30:0] == 31'd0 && exp[30:0] == 31'd0)) begin
      failures++;
      $display("FAIL %h %s %h = %h expected %h", ta, ts ? "-" : "+", tb_, y, exp);
    end
  endtask

  initial begin
    logic [31:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed
    run(32'h3F800000, 32'h3F800000, 1'b0);  // 1+1
    run(32'h3F800000, 32'h3F800000, 1'b1);  // 1-1 = 0
    run(32'h3F800000, 32'h30800000, 1'b0);  // 1 + 2^-30
    run(32'h3F800000, 32'h33800000, 1'b0);  // 1 + 2^-24 : tie, to even
    run(32'h3F800001, 32'h33800000, 1'b0);  // tie, rounds up
    run(32'h3F7FFFFF, 32'h33800000, 1'b0);  // 0.99999994 + 2^-24
    run(32'h447A0000, 32'h42C80000, 1'b1);  // 1000 - 100
    run(32'h00000000, 32'hC1200000, 1'b0);  // 0 + -10
    run(32'h41F00000, 32'h41F00001, 1'b1);  // close cancellation
    // random, nearby exponents
    for (int i = 0; i < 4000; i++) begin
      x = rand_single(110, 150);
      run(x, {1'($urandom), 8'(int'(x[30:23]) + int'($urandom % 41) - 20), 23'($urandom)},
          1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
