// fp_itof: converter from a 32-bit two's-complement integer to an IEEE-754
// single-precision number.
//
// The magnitude of the integer is normalised with a leading-zero count and
// its top 24 bits become the significand; the bits shifted out are rounded
// to nearest even, so integers of up to 24 bits convert exactly.
//
// Interface and timing: the integer a is sampled when start is high; y is
// valid with done high one clock later (latency 1, fully pipelined).
//
// The original processor used a vendor core for this conversion (profile
// counts and loop indices are integers); the function is the document's,
// the implementation and the latency are this design's.
module fp_itof
  import fom_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  output logic        done,
  output float_t      y
);

  float_t res;

  always_comb begin
    logic        s;
    logic [31:0] mag;
    logic [31:0] v;
    logic [4:0]  lz;

    s   = a[31];
    mag = s ? (~a + 32'd1) : a;
    lz  = '0;
    for (int i = 0; i <= 31; i++) begin
      if (mag[i]) lz = 5'(31 - i);
    end
    v = mag << lz;
    if (mag == 32'd0)
      res = FP_ZERO;
    else
      res = fp_pack(s, 12'sd158 - 12'(lz), v[31:8], v[7], |v[6:0]);
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
