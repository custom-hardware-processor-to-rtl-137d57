// fom_processor: processor computing the chi-squared figure of merit of a
// model of an X-ray diffraction profile (top level).
//
// An evolutionary search for the peaks of an overlapped diffraction
// profile needs, for every candidate solution, the weighted chi-squared
// distance between the measured profile and the profile the candidate
// predicts. This processor computes that number in single-precision
// floating point. Its parts follow the original top-level architecture:
//   - profile_rom       the measured counts, 512 x 13 bits, from a file
//   - main FP units     one adder/subtracter, one multiplier, one divider,
//                       one integer-to-float converter
//   - merit_controller  the control unit: walks the profile, feeds the
//                       units and the pV unit, accumulates chi-squared
//   - pv_unit           the pseudo-Voigt arithmetic unit, with its own
//                       six FP units and controller
//
// Interface: the candidate (per peak: i0, x01, x02, w, eta; background
// bg0 + bg1*x), the scan (x_start, x_step, n_points) and start come from
// the circuit that runs the search; fitness_rdy rises with the figure of
// merit on merit when the run is over and both hold until the next start.
// Timing: about NPEAKS*2*(76 + 32*EXP_ITERS) + 50 clocks per profile
// point, some 1640 clocks per point with the defaults.
module fom_processor
  import fom_pkg::*;
#(
  parameter int unsigned NPEAKS    = 2,
  parameter int unsigned EXP_ITERS = 10,
  parameter int unsigned ROM_DEPTH = 512,
  parameter int unsigned ROM_WIDTH = 13,
  parameter string       ROM_FILE  = "rtl/profile_rom.hex"
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(ROM_DEPTH):0] n_points,
  input  float_t                     x_start,
  input  float_t                     x_step,
  input  peak_params_t               peaks [NPEAKS],
  input  float_t                     bg0,
  input  float_t                     bg1,
  output logic                       busy,
  output logic                       fitness_rdy,
  output float_t                     merit
);

  logic [$clog2(ROM_DEPTH)-1:0] rom_addr;
  logic [ROM_WIDTH-1:0]         rom_data;

  logic   add_start, add_sub, add_done;
  float_t add_a, add_b, add_y;
  logic   mul_start, mul_done;
  float_t mul_a, mul_b, mul_y;
  logic   div_start, div_busy, div_done;
  float_t div_a, div_b, div_y;
  logic   itof_start, itof_done;
  logic [31:0] itof_a;
  float_t itof_y;

  logic       pv_start, pv_busy, pv_done;
  float_t     pv_x, pv_y;
  pv_params_t pv_p;

  profile_rom #(.DEPTH(ROM_DEPTH), .WIDTH(ROM_WIDTH), .INIT_FILE(ROM_FILE)) u_rom (
    .clk, .addr(rom_addr), .rdata(rom_data)
  );

  merit_controller #(.NPEAKS(NPEAKS), .ROM_DEPTH(ROM_DEPTH), .ROM_WIDTH(ROM_WIDTH)) u_ctrl (
    .clk, .rst_n, .start, .n_points, .x_start, .x_step, .peaks, .bg0, .bg1,
    .busy, .fitness_rdy, .merit,
    .rom_addr, .rom_data,
    .add_start, .add_sub, .add_a, .add_b, .add_done, .add_y,
    .mul_start, .mul_a, .mul_b, .mul_done, .mul_y,
    .div_start, .div_a, .div_b, .div_done, .div_y,
    .itof_start, .itof_a, .itof_done, .itof_y,
    .pv_start, .pv_x, .pv_p, .pv_done, .pv_y
  );

  fp_addsub u_add (.clk, .rst_n, .start(add_start), .sub(add_sub), .a(add_a), .b(add_b),
                   .done(add_done), .y(add_y));
  fp_mul    u_mul (.clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
                   .done(mul_done), .y(mul_y));
  fp_div    u_div (.clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
                   .busy(div_busy), .done(div_done), .y(div_y));
  fp_itof   u_itof (.clk, .rst_n, .start(itof_start), .a(itof_a),
                    .done(itof_done), .y(itof_y));

  pv_unit #(.EXP_ITERS(EXP_ITERS)) u_pv (
    .clk, .rst_n, .start(pv_start), .x(pv_x), .p(pv_p),
    .busy(pv_busy), .done(pv_done), .y(pv_y)
  );

  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  a_pv_idle:  assert property (@(posedge clk) disable iff (!rst_n) pv_start |-> !pv_busy);

endmodule
