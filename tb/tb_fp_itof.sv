// tb_fp_itof: self-checking testbench of the integer-to-single converter.
// Small integers (profile counts, loop indices) must convert exactly; large
// ones are checked against the double value rounded to single. Also checks
// negative numbers, zero and the one-cycle latency.
module tb_fp_itof;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0;
  logic        done;
  logic [31:0] y;
  int checks = 0, failures = 0;

  fp_itof dut (.clk, .rst_n, .start, .a, .done, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] ta);
    logic [31:0] exp;
    exp = to_single(real'($signed(ta)));
    @(negedge clk);
    a = ta; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL latency: done not high one cycle after start");
    end
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL itof(%0d) = %h expected %h", $signed(ta), y, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'd0);
    run(32'd1);
    run(32'd1000);
    run(32'd8191);
    run(-32'sd7);
    run(32'h7FFFFFFF);
    run(32'h80000000);
    run(32'h01000001);   // 2^24 + 1: tie, rounds to even
    run(32'h01000003);   // 2^24 + 3: tie, rounds up
    for (int i = 0; i < 1024; i++) run(32'(i));
    for (int i = 0; i < 3000; i++) run($urandom >> ($urandom % 32));
    for (int i = 0; i < 500; i++) run(-($urandom >> ($urandom % 32)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
