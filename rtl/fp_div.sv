// fp_div: IEEE-754 single-precision divider.
//
// Computes y = a / b rounded to nearest even with a radix-2 restoring
// division of the significands: one quotient bit per clock, 27 bits in
// all (the integer bit, 23 fraction bits, and enough below them for the
// guard bit even when the quotient is below 1), the final remainder
// giving the sticky bit. Subnormal inputs are read as zero; x/0 and an
// infinite dividend give infinity, 0/x and x/infinity give zero.
//
// Interface and timing: operands are sampled when start is high while
// busy is low. busy is high during the division and done pulses for one
// clock with the result on y, 29 clocks after start. One
// division at a time; a start while busy is ignored.
//
// The original processor took its divider from the FPGA vendor's core
// generator; the function is the document's, the restoring algorithm and
// its latency are this design's.
module fp_div
  import fom_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  float_t a,
  input  float_t b,
  output logic   busy,
  output logic   done,
  output float_t y
);

  localparam int unsigned QBITS = 27;

  logic               sign_q;
  logic signed [11:0] exp_q;
  logic [24:0]        rem_q;
  logic [23:0]        div_q;
  logic [QBITS-1:0]   quo_q;
  logic [4:0]         cnt_q;
  logic               special_q;
  float_t             special_res_q;

  // one restoring step
  logic [24:0] rem_sub;
  logic        qbit;
  assign qbit    = (rem_q >= {1'b0, div_q});
  assign rem_sub = qbit ? (rem_q - {1'b0, div_q}) : rem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      done          <= 1'b0;
      y             <= FP_ZERO;
      sign_q        <= 1'b0;
      exp_q         <= '0;
      rem_q         <= '0;
      div_q         <= '0;
      quo_q         <= '0;
      cnt_q         <= '0;
      special_q     <= 1'b0;
      special_res_q <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy          <= 1'b1;
          sign_q        <= a[31] ^ b[31];
          exp_q         <= $signed({4'd0, a[30:23]}) - $signed({4'd0, b[30:23]}) + 12'sd127;
          rem_q         <= {1'b0, 1'b1, a[22:0]};
          div_q         <= {1'b1, b[22:0]};
          quo_q         <= '0;
          cnt_q         <= '0;
          special_q     <= 1'b1;
          if (a[30:23] == 8'hFF || (b[30:23] == 8'd0 && a[30:23] != 8'd0))
            special_res_q <= {a[31] ^ b[31], 8'hFF, 23'd0};
          else if (a[30:23] == 8'd0 || b[30:23] == 8'hFF)
            special_res_q <= {a[31] ^ b[31], 31'd0};
          else
            special_q <= 1'b0;
        end
      end else if (cnt_q < 5'(QBITS)) begin
        quo_q <= {quo_q[QBITS-2:0], qbit};
        rem_q <= rem_sub << 1;
        cnt_q <= cnt_q + 5'd1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (special_q)
          y <= special_res_q;
        else if (quo_q[QBITS-1])
          y <= fp_pack(sign_q, exp_q, quo_q[26:3], quo_q[2],
                       quo_q[1] | quo_q[0] | (rem_q != 25'd0));
        else
          y <= fp_pack(sign_q, exp_q - 12'sd1, quo_q[25:2], quo_q[1],
                       quo_q[0] | (rem_q != 25'd0));
      end
    end
  end

endmodule
