// merit_controller: control unit of the figure-of-merit processor.
//
// Computes the weighted chi-squared figure of merit of Eq. (4),
//   chi2 = sum_{i=0..n-1} (yobs_i - ycal_i)^2 / yobs_i,
// i.e. with Poisson weights p_i = 1/yobs_i, for one candidate solution.
// yobs_i is the count stored at address i of the profile ROM; the model
// value ycal_i at the angle x_i = x_start + i*x_step is the sum of a linear
// background bg0 + bg1*x_i and, for every peak, two pseudo-Voigt
// components: CuK-alpha1 (intensity i0 at x01) and CuK-alpha2 (intensity
// i0/2 at x02), both with the peak's width w and shape eta.
//
// It drives one single-precision adder/subtracter, one multiplier, one
// divider and one integer-to-float converter (the processor's main set of
// units) and the pseudo-Voigt unit. Per profile point:
//   P0  f = float(i)                       converter; ROM address = i
//   P1  yobs = float(rom[i]) | q = f*x_step  converter and multiplier
//   P2  x = x_start + q                    adder
//   P3  pV(component 0) starts | r = bg1*x multiplier, beside the pV unit
//   P4  ycal = bg0 + r                     adder, beside the pV unit
//   P5  for each component: wait for pV, ycal += pV, start the next pV
//   P6  e = yobs - ycal                    adder
//   P7  e2 = e*e                           multiplier
//   P8  r = e2 / yobs                      divider
//   P9  chi2 += r                          adder
// Before the first point the alpha2 intensities i0/2 are formed once per
// peak with the multiplier. The main units compute the background while
// the pV unit works, so only the pV evaluations and the chi-squared tail
// are on the critical path. That split of work between the units is this
// design's choice: the original gives the units and the role of the
// controller but not its schedule.
//
// Interface and timing: the run parameters are sampled when start is high
// and busy is low. fitness_rdy goes low at start and high with the result
// on merit when the sum is complete; both hold until the next start. A
// point takes NPEAKS*2 pV evaluations plus about 50 clocks.
module merit_controller
  import fom_pkg::*;
#(
  parameter int unsigned NPEAKS    = 2,
  parameter int unsigned ROM_DEPTH = 512,
  parameter int unsigned ROM_WIDTH = 13
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // run control and parameters
  input  logic                         start,
  input  logic [$clog2(ROM_DEPTH):0]   n_points,
  input  float_t                       x_start,
  input  float_t                       x_step,
  input  peak_params_t                 peaks [NPEAKS],
  input  float_t                       bg0,
  input  float_t                       bg1,
  output logic                         busy,
  output logic                         fitness_rdy,
  output float_t                       merit,
  // profile ROM
  output logic [$clog2(ROM_DEPTH)-1:0] rom_addr,
  input  logic [ROM_WIDTH-1:0]         rom_data,
  // main floating-point units
  output logic                         add_start,
  output logic                         add_sub,
  output float_t                       add_a,
  output float_t                       add_b,
  input  logic                         add_done,
  input  float_t                       add_y,
  output logic                         mul_start,
  output float_t                       mul_a,
  output float_t                       mul_b,
  input  logic                         mul_done,
  input  float_t                       mul_y,
  output logic                         div_start,
  output float_t                       div_a,
  output float_t                       div_b,
  input  logic                         div_done,
  input  float_t                       div_y,
  output logic                         itof_start,
  output logic [31:0]                  itof_a,
  input  logic                         itof_done,
  input  float_t                       itof_y,
  // pseudo-Voigt unit
  output logic                         pv_start,
  output float_t                       pv_x,
  output pv_params_t                   pv_p,
  input  logic                         pv_done,
  input  float_t                       pv_y
);

  localparam int unsigned NCOMP = 2 * NPEAKS;
  localparam int AW = $clog2(ROM_DEPTH);
  localparam int CW = $clog2(NCOMP + 1);

  typedef enum logic [3:0] {
    M_IDLE,
    M_HALF,    // i0/2 of one peak
    M_P0,      // float(i)
    M_P1,      // float(rom[i]), float(i)*x_step
    M_P2,      // x
    M_P3,      // start first pV, bg1*x
    M_P4,      // bg0 + bg1*x
    M_PVW,     // wait for the running pV
    M_ACC,     // ycal += pV, start the next one
    M_P6,      // yobs - ycal
    M_P7,      // squared
    M_P8,      // weighted
    M_P9,      // accumulated
    M_END
  } state_t;

  localparam int U_ADD = 0, U_MUL = 1, U_DIV = 2, U_ITOF = 3;

  state_t       state;
  logic         issued;
  logic [3:0]   pend, issue, dones;
  logic         pv_issue, pv_pend;
  logic [AW:0]  idx;
  logic [AW:0]  n_r;
  logic [CW-1:0] comp, comp_next;
  localparam int PW = (NPEAKS > 1) ? $clog2(NPEAKS) : 1;
  logic [PW-1:0] hp;

  float_t       x0_r, dx_r, bg0_r, bg1_r;
  peak_params_t pk_r [NPEAKS];
  float_t       i0h_r [NPEAKS];
  float_t       fi_r, yobs_r, q_r, x_r, r_r, ycal_r, pv_r, e_r, e2_r, w_r, chi_r;

  assign dones     = {itof_done, div_done, mul_done, add_done};
  assign busy      = (state != M_IDLE);
  assign rom_addr  = idx[AW-1:0];

  logic step_done;
  assign step_done = issued && ((pend & ~dones) == 4'd0);

  // parameters of pseudo-Voigt component c: even = alpha1, odd = alpha2
  function automatic pv_params_t comp_params(input logic [CW-1:0] c);
    pv_params_t r;
    logic [PW-1:0] pk;
    pk    = PW'(c >> 1);
    r.i0  = c[0] ? i0h_r[pk] : pk_r[pk].i0;
    r.x0  = c[0] ? pk_r[pk].x02 : pk_r[pk].x01;
    r.w   = pk_r[pk].w;
    r.eta = pk_r[pk].eta;
    return r;
  endfunction

  assign comp_next = comp + CW'(1);

  always_comb begin
    issue    = '0;
    pv_issue = 1'b0;
    add_sub  = 1'b0;
    add_a    = FP_ZERO;
    add_b    = FP_ZERO;
    mul_a    = FP_ZERO;
    mul_b    = FP_ZERO;
    div_a    = FP_ZERO;
    div_b    = FP_ONE;
    itof_a   = '0;
    pv_x     = x_r;
    pv_p     = comp_params(comp);
    unique case (state)
      M_HALF: begin
        issue[U_MUL] = 1'b1;
        mul_a = pk_r[hp].i0; mul_b = FP_HALF;
      end
      M_P0: begin
        issue[U_ITOF] = 1'b1;
        itof_a = 32'(idx);
      end
      M_P1: begin
        issue[U_ITOF] = 1'b1;
        itof_a = 32'(rom_data);
        issue[U_MUL] = 1'b1;
        mul_a = fi_r; mul_b = dx_r;
      end
      M_P2: begin
        issue[U_ADD] = 1'b1;
        add_a = x0_r; add_b = q_r;
      end
      M_P3: begin
        pv_issue = 1'b1;
        pv_p = comp_params('0);
        issue[U_MUL] = 1'b1;
        mul_a = bg1_r; mul_b = x_r;
      end
      M_P4: begin
        issue[U_ADD] = 1'b1;
        add_a = bg0_r; add_b = r_r;
      end
      M_ACC: begin
        issue[U_ADD] = 1'b1;
        add_a = ycal_r; add_b = pv_r;
        if (32'(comp_next) < NCOMP) begin
          pv_issue = 1'b1;
          pv_p = comp_params(comp_next);
        end
      end
      M_P6: begin
        issue[U_ADD] = 1'b1;
        add_a = yobs_r; add_b = ycal_r; add_sub = 1'b1;
      end
      M_P7: begin
        issue[U_MUL] = 1'b1;
        mul_a = e_r; mul_b = e_r;
      end
      M_P8: begin
        issue[U_DIV] = 1'b1;
        div_a = e2_r; div_b = yobs_r;
      end
      M_P9: begin
        issue[U_ADD] = 1'b1;
        add_a = chi_r; add_b = w_r;
      end
      default: ;
    endcase
    if (issued) begin
      issue    = '0;
      pv_issue = 1'b0;
    end
    add_start  = issue[U_ADD];
    mul_start  = issue[U_MUL];
    div_start  = issue[U_DIV];
    itof_start = issue[U_ITOF];
    pv_start   = pv_issue;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= M_IDLE;
      issued      <= 1'b0;
      pend        <= '0;
      pv_pend     <= 1'b0;
      idx         <= '0;
      n_r         <= '0;
      comp        <= '0;
      hp          <= '0;
      fitness_rdy <= 1'b0;
      merit       <= FP_ZERO;
      x0_r  <= FP_ZERO; dx_r <= FP_ZERO; bg0_r <= FP_ZERO; bg1_r <= FP_ZERO;
      pk_r  <= '{default: '0};
      i0h_r <= '{default: FP_ZERO};
      fi_r  <= FP_ZERO; yobs_r <= FP_ZERO; q_r <= FP_ZERO; x_r <= FP_ZERO;
      r_r   <= FP_ZERO; ycal_r <= FP_ZERO; pv_r <= FP_ZERO; e_r <= FP_ZERO;
      e2_r  <= FP_ZERO; w_r <= FP_ZERO; chi_r <= FP_ZERO;
    end else begin
      if (!issued && state != M_IDLE) begin
        issued <= 1'b1;
        pend   <= issue;
      end else begin
        pend <= pend & ~dones;
      end
      if (pv_issue) pv_pend <= 1'b1;
      if (pv_pend && pv_done) begin
        pv_pend <= 1'b0;
        pv_r    <= pv_y;
      end

      unique case (state)
        M_IDLE: if (start) begin
          fitness_rdy <= 1'b0;
          x0_r   <= x_start;
          dx_r   <= x_step;
          bg0_r  <= bg0;
          bg1_r  <= bg1;
          pk_r   <= peaks;
          n_r    <= (n_points > (AW+1)'(ROM_DEPTH)) ? (AW+1)'(ROM_DEPTH) : n_points;
          idx    <= '0;
          hp     <= '0;
          chi_r  <= FP_ZERO;
          issued <= 1'b0;
          state  <= M_HALF;
        end
        M_HALF: if (step_done) begin
          i0h_r[hp] <= mul_y;
          issued    <= 1'b0;
          hp        <= hp + PW'(1);
          if (32'(hp) == NPEAKS - 1)
            state <= (n_r == '0) ? M_END : M_P0;
        end
        M_P0: if (step_done) begin
          fi_r <= itof_y; issued <= 1'b0; state <= M_P1;
        end
        M_P1: if (step_done) begin
          yobs_r <= itof_y; q_r <= mul_y; issued <= 1'b0; state <= M_P2;
        end
        M_P2: if (step_done) begin
          x_r <= add_y; issued <= 1'b0; state <= M_P3;
        end
        M_P3: if (step_done) begin
          r_r <= mul_y; comp <= '0; issued <= 1'b0; state <= M_P4;
        end
        M_P4: if (step_done) begin
          ycal_r <= add_y; issued <= 1'b0; state <= M_PVW;
        end
        M_PVW: if (!pv_pend) begin
          issued <= 1'b0; state <= M_ACC;
        end
        M_ACC: if (step_done) begin
          ycal_r <= add_y;
          issued <= 1'b0;
          if (32'(comp_next) < NCOMP) begin
            comp  <= comp_next;
            state <= M_PVW;
          end else begin
            state <= M_P6;
          end
        end
        M_P6: if (step_done) begin
          e_r <= add_y; issued <= 1'b0; state <= M_P7;
        end
        M_P7: if (step_done) begin
          e2_r <= mul_y; issued <= 1'b0; state <= M_P8;
        end
        M_P8: if (step_done) begin
          w_r <= div_y; issued <= 1'b0; state <= M_P9;
        end
        M_P9: if (step_done) begin
          chi_r  <= add_y;
          issued <= 1'b0;
          idx    <= idx + 1'b1;
          state  <= (idx + 1'b1 == n_r) ? M_END : M_P0;
        end
        M_END: begin
          merit       <= chi_r;
          fitness_rdy <= 1'b1;
          issued      <= 1'b0;
          state       <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // the pV unit is started only when no evaluation is outstanding
  a_pv_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
                                       pv_start |-> !pv_pend);
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 (issue & pend) == 4'd0);

endmodule
