// pv_controller: sequencer of the pseudo-Voigt arithmetic unit.
//
// Evaluates Eq. (3),
//   pV(x) = i0 * [ eta/(1+t^2) + (1-eta)*exp(-ln2*t^2) ],  t = (x-x0)/w,
// on six single-precision units it does not own (two adder/subtracters,
// two dividers, one multiplier, one integer-to-float converter), issuing
// independent operations in the same step so that they run in parallel.
// The calculation takes eight steps:
//   1  d  = x - x0                     (adder 0)
//   2  t  = d / w                      (divider 0)
//   3  t2 = t * t                      (multiplier)
//   4  a  = 1 + t2  |  b = 1 - eta  |  c = ln2 * t2      (3 in parallel)
//   5a L  = eta / a                    (divider 0)   } in parallel
//   5b G  = exp(-c)                    (iterative)   }
//   6  g  = b * G                      (multiplier)
//   7  s  = L + g                      (adder 0)
//   8  y  = i0 * s                     (multiplier)
// The eight steps, the three parallel operations of step 4 and the two of
// step 5 follow the original design. Step 5b is an iterative algorithm with
// a fixed number of iterations EXP_ITERS; the original does not say which
// algorithm. Here it is the truncated series
//   e^c = sum_{k=0..EXP_ITERS} c^k / k!,   G = 1 / e^c,
// whose terms are all positive, so many iterations never lose accuracy and
// far from the peak G simply tends to zero. Each iteration converts k to a
// float while it multiplies the running term by c, divides by k, and adds
// the term to the sum while the next iteration's conversion and product
// are already under way. More iterations give a more accurate Gaussian at
// the cost of about 32 clocks each (the divider dominates).
//
// Interface and timing: parameters and x are sampled when start is high
// and busy is low; busy stays high until done pulses with pV(x) on y.
// With the units' latencies (adders, multiplier and converter 1 clock,
// dividers 29 clocks) one evaluation takes 76 + 32*EXP_ITERS clocks from
// start to done.
module pv_controller
  import fom_pkg::*;
#(
  parameter int unsigned EXP_ITERS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  // request
  input  logic       start,
  input  float_t     x,
  input  pv_params_t p,
  output logic       busy,
  output logic       done,
  output float_t     y,
  // adder/subtracters
  output logic       add_start [2],
  output logic       add_sub   [2],
  output float_t     add_a     [2],
  output float_t     add_b     [2],
  input  logic       add_done  [2],
  input  float_t     add_y     [2],
  // multiplier
  output logic       mul_start,
  output float_t     mul_a,
  output float_t     mul_b,
  input  logic       mul_done,
  input  float_t     mul_y,
  // dividers
  output logic       div_start [2],
  output float_t     div_a     [2],
  output float_t     div_b     [2],
  input  logic       div_done  [2],
  input  float_t     div_y     [2],
  // integer to float converter
  output logic       itof_start,
  output logic [31:0] itof_a,
  input  logic       itof_done,
  input  float_t     itof_y
);

  typedef enum logic [3:0] {
    S_IDLE,
    S1_SUB,      // d = x - x0
    S2_DIV,      // t = d / w
    S3_SQR,      // t2 = t * t
    S4_PAR,      // a = 1 + t2, b = 1 - eta, c = ln2 * t2
    S5_EXPA,     // start L = eta / a; itof(1) and term*c
    S5_EXPB,     // term = prod / k
    S5_EXPC,     // sum += term; itof(k+1) and term*c
    S5_EXPF,     // G = 1 / sum
    S5_WAIT,     // wait for L
    S6_MUL,      // g = b * G
    S7_ADD,      // s = L + g
    S8_MUL       // y = i0 * s
  } state_t;

  // unit indices in the pending/done vectors
  localparam int U_ADD0 = 0, U_ADD1 = 1, U_MUL = 2, U_DIV0 = 3, U_DIV1 = 4, U_ITOF = 5;
  localparam logic [5:0] DIV0_BIT = 6'b00_1000;

  state_t     state;
  logic       issued;
  logic [5:0] pend;
  logic [5:0] issue;      // units started in this cycle
  logic [5:0] dones;
  logic       l_pend;     // step 5a still running
  localparam int K_W = $clog2(EXP_ITERS + 2);
  logic [K_W-1:0] k;

  float_t     xr;
  pv_params_t pr;
  float_t     d_r, t_r, t2_r, a_r, b_r, c_r, l_r, g_r, s_r;
  float_t     term_r, sum_r, fk_r, prod_r, ge_r;

  assign dones = {itof_done, div_done[1], div_done[0], mul_done, add_done[1], add_done[0]};
  assign busy  = (state != S_IDLE);

  logic step_done;
  assign step_done = issued && ((pend & ~dones) == 6'd0);

  logic last_iter;
  assign last_iter = (32'(k) >= EXP_ITERS);

  // operation issue: start pulses and operands, a function of the state
  always_comb begin
    issue = '0;
    add_sub = '{default: 1'b0};
    add_a   = '{default: FP_ZERO};
    add_b   = '{default: FP_ZERO};
    mul_a   = FP_ZERO;
    mul_b   = FP_ZERO;
    div_a   = '{default: FP_ZERO};
    div_b   = '{default: FP_ONE};
    itof_a  = '0;
    unique case (state)
      S1_SUB: begin
        issue[U_ADD0] = 1'b1;
        add_a[0] = xr; add_b[0] = pr.x0; add_sub[0] = 1'b1;
      end
      S2_DIV: begin
        issue[U_DIV0] = 1'b1;
        div_a[0] = d_r; div_b[0] = pr.w;
      end
      S3_SQR: begin
        issue[U_MUL] = 1'b1;
        mul_a = t_r; mul_b = t_r;
      end
      S4_PAR: begin
        issue[U_ADD0] = 1'b1;
        add_a[0] = FP_ONE; add_b[0] = t2_r;
        issue[U_ADD1] = 1'b1;
        add_a[1] = FP_ONE; add_b[1] = pr.eta; add_sub[1] = 1'b1;
        issue[U_MUL] = 1'b1;
        mul_a = FP_LN2; mul_b = t2_r;
      end
      S5_EXPA: begin
        issue[U_DIV0] = 1'b1;
        div_a[0] = pr.eta; div_b[0] = a_r;
        issue[U_ITOF] = 1'b1;
        itof_a = 32'(k);
        issue[U_MUL] = 1'b1;
        mul_a = term_r; mul_b = c_r;
      end
      S5_EXPB: begin
        issue[U_DIV1] = 1'b1;
        div_a[1] = prod_r; div_b[1] = fk_r;
      end
      S5_EXPC: begin
        issue[U_ADD1] = 1'b1;
        add_a[1] = sum_r; add_b[1] = term_r;
        if (!last_iter) begin
          issue[U_ITOF] = 1'b1;
          itof_a = 32'(k) + 32'd1;
          issue[U_MUL] = 1'b1;
          mul_a = term_r; mul_b = c_r;
        end
      end
      S5_EXPF: begin
        issue[U_DIV1] = 1'b1;
        div_a[1] = FP_ONE; div_b[1] = sum_r;
      end
      S6_MUL: begin
        issue[U_MUL] = 1'b1;
        mul_a = b_r; mul_b = ge_r;
      end
      S7_ADD: begin
        issue[U_ADD0] = 1'b1;
        add_a[0] = l_r; add_b[0] = g_r;
      end
      S8_MUL: begin
        issue[U_MUL] = 1'b1;
        mul_a = pr.i0; mul_b = s_r;
      end
      default: ;
    endcase
    if (issued) issue = '0;
    add_start[0] = issue[U_ADD0];
    add_start[1] = issue[U_ADD1];
    mul_start    = issue[U_MUL];
    div_start[0] = issue[U_DIV0];
    div_start[1] = issue[U_DIV1];
    itof_start   = issue[U_ITOF];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      issued <= 1'b0;
      pend   <= '0;
      l_pend <= 1'b0;
      k      <= '0;
      done   <= 1'b0;
      y      <= FP_ZERO;
      xr     <= FP_ZERO;
      pr     <= '0;
      d_r    <= FP_ZERO; t_r  <= FP_ZERO; t2_r <= FP_ZERO;
      a_r    <= FP_ZERO; b_r  <= FP_ZERO; c_r  <= FP_ZERO;
      l_r    <= FP_ZERO; g_r  <= FP_ZERO; s_r  <= FP_ZERO;
      term_r <= FP_ZERO; sum_r <= FP_ZERO; fk_r <= FP_ZERO;
      prod_r <= FP_ZERO; ge_r <= FP_ZERO;
    end else begin
      done <= 1'b0;

      // bookkeeping of the operations of the current step
      if (!issued && state != S_IDLE) begin
        issued <= 1'b1;
        // in step 5 divider 0 is tracked by l_pend, not by the step
        pend   <= (state == S5_EXPA) ? (issue & ~DIV0_BIT) : issue;
        if (state == S5_EXPA) l_pend <= 1'b1;
      end else begin
        pend <= pend & ~dones;
      end

      // step 5a runs beside the exponential: collect it whenever it ends
      if (l_pend && div_done[0]) begin
        l_pend <= 1'b0;
        l_r    <= div_y[0];
      end

      unique case (state)
        S_IDLE: if (start) begin
          xr     <= x;
          pr     <= p;
          issued <= 1'b0;
          state  <= S1_SUB;
        end
        S1_SUB: if (step_done) begin
          d_r <= add_y[0]; issued <= 1'b0; state <= S2_DIV;
        end
        S2_DIV: if (step_done) begin
          t_r <= div_y[0]; issued <= 1'b0; state <= S3_SQR;
        end
        S3_SQR: if (step_done) begin
          t2_r <= mul_y; issued <= 1'b0; state <= S4_PAR;
          k      <= K_W'(1);
          term_r <= FP_ONE;
          sum_r  <= FP_ONE;
        end
        S4_PAR: if (step_done) begin
          a_r <= add_y[0]; b_r <= add_y[1]; c_r <= mul_y;
          issued <= 1'b0; state <= S5_EXPA;
        end
        S5_EXPA: if (step_done) begin
          fk_r <= itof_y; prod_r <= mul_y;
          issued <= 1'b0; state <= S5_EXPB;
        end
        S5_EXPB: if (step_done) begin
          term_r <= div_y[1];
          issued <= 1'b0; state <= S5_EXPC;
        end
        S5_EXPC: if (step_done) begin
          sum_r  <= add_y[1];
          issued <= 1'b0;
          if (last_iter) begin
            state <= S5_EXPF;
          end else begin
            fk_r  <= itof_y;
            prod_r <= mul_y;
            k     <= k + K_W'(1);
            state <= S5_EXPB;
          end
        end
        S5_EXPF: if (step_done) begin
          ge_r <= div_y[1]; issued <= 1'b0; state <= S5_WAIT;
        end
        S5_WAIT: if (!l_pend) begin
          issued <= 1'b0; state <= S6_MUL;
        end
        S6_MUL: if (step_done) begin
          g_r <= mul_y; issued <= 1'b0; state <= S7_ADD;
        end
        S7_ADD: if (step_done) begin
          s_r <= add_y[0]; issued <= 1'b0; state <= S8_MUL;
        end
        S8_MUL: if (step_done) begin
          y <= mul_y; done <= 1'b1; issued <= 1'b0; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a unit is never restarted while the controller still waits for it
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 (issue & pend) == 6'd0);
  // step 5a is collected before its divider is used again
  a_l_before_reuse: assert property (@(posedge clk) disable iff (!rst_n)
                                     div_start[0] |-> !l_pend);

endmodule
