// pv_unit: the pseudo-Voigt arithmetic unit.
//
// Computes one value of the pseudo-Voigt function, Eq. (3), for an angle x
// and a parameter set (i0, x0, w, eta). As in the original design it holds
// its own floating-point units, two adder/subtracters, two dividers, one
// multiplier and one integer-to-float converter, so that the sequencer
// (pv_controller) can run independent operations of the calculation at the
// same time. Duplicated units are cheap and shorten the calculation.
//
// Interface and timing: x and p are sampled when start is high and busy is
// low; done pulses for one clock with pV(x) on y, 76 + 32*EXP_ITERS clocks
// after start (396 clocks at the default of 10 iterations of the
// exponential).
module pv_unit
  import fom_pkg::*;
#(
  parameter int unsigned EXP_ITERS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  float_t     x,
  input  pv_params_t p,
  output logic       busy,
  output logic       done,
  output float_t     y
);

  logic   add_start [2], add_sub [2], add_done [2];
  float_t add_a [2], add_b [2], add_y [2];
  logic   mul_start, mul_done;
  float_t mul_a, mul_b, mul_y;
  logic   div_start [2], div_busy [2], div_done [2];
  float_t div_a [2], div_b [2], div_y [2];
  logic   itof_start, itof_done;
  logic [31:0] itof_a;
  float_t itof_y;

  pv_controller #(.EXP_ITERS(EXP_ITERS)) u_ctrl (
    .clk, .rst_n, .start, .x, .p, .busy, .done, .y,
    .add_start, .add_sub, .add_a, .add_b, .add_done, .add_y,
    .mul_start, .mul_a, .mul_b, .mul_done, .mul_y,
    .div_start, .div_a, .div_b, .div_done, .div_y,
    .itof_start, .itof_a, .itof_done, .itof_y
  );

  for (genvar i = 0; i < 2; i++) begin : g_dup
    fp_addsub u_add (
      .clk, .rst_n, .start(add_start[i]), .sub(add_sub[i]),
      .a(add_a[i]), .b(add_b[i]), .done(add_done[i]), .y(add_y[i])
    );
    fp_div u_div (
      .clk, .rst_n, .start(div_start[i]), .a(div_a[i]), .b(div_b[i]),
      .busy(div_busy[i]), .done(div_done[i]), .y(div_y[i])
    );
  end

  fp_mul u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
    .done(mul_done), .y(mul_y)
  );

  fp_itof u_itof (
    .clk, .rst_n, .start(itof_start), .a(itof_a),
    .done(itof_done), .y(itof_y)
  );

  for (genvar i = 0; i < 2; i++) begin : g_chk
    a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 div_start[i] |-> !div_busy[i]);
  end

endmodule
