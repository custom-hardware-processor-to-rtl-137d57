// fp_addsub: IEEE-754 single-precision adder/subtracter.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest
// even. The operand of smaller magnitude is aligned to the larger one with
// three extra bits (guard, round, sticky); like signs add, unlike signs
// subtract and the difference is renormalised with a leading-zero count.
// Subnormal inputs are read as zero, results below the normal range flush
// to zero and overflow gives infinity; NaN inputs are not treated apart.
//
// Interface and timing: operands are sampled when start is high and the
// result appears on y with done high one clock later (latency 1, a new
// operation may start every cycle). y holds until the next operation.
//
// The original processor used a 32-bit adder/subtracter core from the FPGA
// vendor's generator; only its function (single-precision add/subtract) is
// taken from there. The one-cycle latency and the flush-to-zero handling
// are this design's choices.
module fp_addsub
  import fom_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   sub,
  input  float_t a,
  input  float_t b,
  output logic   done,
  output float_t y
);

  float_t res;

  always_comb begin
    logic        sa, sb, sl;
    logic [7:0]  ea, eb, el, es;
    logic [23:0] ma, mb, ml, ms;
    logic [7:0]  d;
    logic [26:0] xl, xs;
    logic        stk;
    logic [27:0] sum;
    logic [26:0] v;
    logic [4:0]  lz;
    logic signed [11:0] e;

    stk = 1'b0;
    sum = '0;
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // order the operands by magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sl = sa; el = ea; ml = ma; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb; es = ea; ms = ma;
    end

    // align the smaller operand, keeping a sticky bit
    d  = el - es;
    xl = {ml, 3'b000};
    if (d >= 8'd27) begin
      xs = {26'd0, |ms};
    end else begin
      xs  = {ms, 3'b000} >> d;
      stk = |({ms, 3'b000} & ~(27'h7FF_FFFF << d));
      xs[0] = xs[0] | stk;
    end

    e   = {4'd0, el};
    v   = '0;
    lz  = '0;
    res = FP_ZERO;
    if (sa == sb) begin
      sum = {1'b0, xl} + {1'b0, xs};
      if (sum[27]) begin
        v = sum[27:1];
        v[0] = v[0] | sum[0];
        e = e + 12'sd1;
      end else begin
        v = sum[26:0];
      end
    end else begin
      sum = {1'b0, xl} - {1'b0, xs};
      v   = sum[26:0];
      for (int i = 0; i <= 26; i++) begin
        if (v[i]) lz = 5'(26 - i);
      end
      v = v << lz;
      e = e - 12'(lz);
    end

    if (ml == 24'd0 && ms == 24'd0) begin
      res = {sa & sb, 31'd0};
    end else if (v == 27'd0) begin
      res = FP_ZERO;
    end else if (el == 8'hFF) begin
      res = {sl, 8'hFF, 23'd0};
    end else begin
      res = fp_pack(sl, e, v[26:3], v[2], v[1] | v[0]);
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
