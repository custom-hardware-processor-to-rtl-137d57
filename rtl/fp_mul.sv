// fp_mul: IEEE-754 single-precision multiplier.
//
// Computes y = a * b rounded to nearest even. The two 24-bit significands
// (hidden bit included) are multiplied into a 48-bit product, which is
// normalised by at most one place; the bits below the kept 24 give the
// guard and sticky bits for rounding. Subnormal inputs are read as zero,
// underflow flushes to zero, overflow and infinite inputs give infinity.
//
// Interface and timing: operands are sampled when start is high; y is
// valid with done high one clock later (latency 1, fully pipelined).
//
// The original processor took its 32-bit multiplier from the FPGA vendor's
// core generator; the function is the document's, the implementation,
// latency and special-value handling are this design's.
module fp_mul
  import fom_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  float_t a,
  input  float_t b,
  output logic   done,
  output float_t y
);

  float_t res;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic signed [11:0] e;

    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = $signed({4'd0, ea}) + $signed({4'd0, eb}) - 12'sd127;
    if (ea == 8'd0 || eb == 8'd0) begin
      res = {s, 31'd0};
    end else if (ea == 8'hFF || eb == 8'hFF) begin
      res = {s, 8'hFF, 23'd0};
    end else if (p[47]) begin
      res = fp_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    end else begin
      res = fp_pack(s, e, p[46:23], p[22], |p[21:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      y    <= FP_ZERO;
    end else begin
      done <= start;
      if (start) y <= res;
    end
  end

endmodule
