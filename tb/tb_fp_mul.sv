// tb_fp_mul: self-checking testbench of the single-precision multiplier.
// The exact product of two singles fits in a double, so the reference is
// the double product rounded to single. Random operands, directed cases
// (zero operand, rounding carry into the exponent, underflow, overflow)
// and a check of the one-cycle latency.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        done;
  logic [31:0] y;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .start, .a, .b, .done, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] exp;
    exp = to_single(to_real(ta) * to_real(tb_));
    @(negedge clk);
    a = ta; b = tb_; start = 1'b1;
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
      $display("FAIL %h * %h = %h expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h3F800000, 32'h40490FDB);  // 1 * pi
    run(32'h00000000, 32'h40490FDB);  // 0 * pi
    run(32'h3FFFFFFF, 32'h3FFFFFFF);  // carry into the exponent
    run(32'h3F317218, 32'h41200000);  // ln2 * 10
    run(32'h0C000000, 32'h0C000000);  // underflow to zero
    run(32'h7E000000, 32'h7E000000);  // overflow to infinity
    run(32'hC0400000, 32'h3F000000);  // -3 * 0.5
    for (int i = 0; i < 4000; i++)
      run(rand_single(70, 180), rand_single(70, 180));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
