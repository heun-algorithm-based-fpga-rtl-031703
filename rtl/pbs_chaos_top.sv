// pbs_chaos_top: Pandey-Baghel-Singh chaotic signal generator.  It integrates
//
//     dx/dt = y,   dy/dt = z,   dz/dt = -a*x - b*y - c*z - x^2
//
// (a = 1, b = 1.1, c = 0.4) with Heun's method in IEEE-754 single precision
// and puts out one point of the chaotic trajectory per step.
//
// Structure: a sequencer (pbs_sequencer), the multiplexer that holds the
// current point and chooses between the initial condition and the fed-back
// output (pbs_init_mux), and the generator unit that computes one Heun step
// (pbs_generator_unit).  The port names are those of the generator's
// top-level diagram; the step size h, which that diagram does not bring out,
// is the parameter H_STEP (0.01 by default, a design choice).
//
// Use: set X_in, Y_in, Z_in (0.1, 0, 0 is the usual choice) and raise Start.
// The first point appears on Xn_out, Yn_out, Zn_out with a one-cycle Ready
// pulse 118 clock cycles after the edge that samples Start high, and a new
// point follows every 118 cycles while Start stays high.  Each output holds
// until the next Ready.  Dropping Start pauses after the step in flight;
// raising it again resumes from the last point.  X_in..Z_in are read only for
// the first step after RST (synchronous, active high).
module pbs_chaos_top
  import pbs_pkg::*;
#(
  parameter fp32_t       H_STEP  = FP_H_STEP,
  parameter fp32_t       COEF_A  = FP_COEF_A,
  parameter fp32_t       COEF_B  = FP_COEF_B,
  parameter fp32_t       COEF_C  = FP_COEF_C,
  parameter int unsigned ADD_LAT = ADD_LAT_DEF,
  parameter int unsigned MUL_LAT = MUL_LAT_DEF
) (
  input  logic  CLK,
  input  logic  RST,
  input  logic  Start,
  input  fp32_t X_in,
  input  fp32_t Y_in,
  input  fp32_t Z_in,
  output fp32_t Xn_out,
  output fp32_t Yn_out,
  output fp32_t Zn_out,
  output logic  Ready
);

  logic     load, sel, busy, state_valid;
  pbs_vec_t init, state, xn1;

  assign init = '{x: X_in, y: Y_in, z: Z_in};

  pbs_sequencer u_seq (
    .clk      (CLK),
    .rst      (RST),
    .start    (Start),
    .step_done(Ready),
    .load     (load),
    .sel      (sel),
    .busy     (busy)
  );

  pbs_init_mux u_mux (
    .clk        (CLK),
    .rst        (RST),
    .load       (load),
    .sel        (sel),
    .init       (init),
    .fb         (xn1),
    .state      (state),
    .state_valid(state_valid)
  );

  pbs_generator_unit #(
    .COEF_A (COEF_A),
    .COEF_B (COEF_B),
    .COEF_C (COEF_C),
    .ADD_LAT(ADD_LAT),
    .MUL_LAT(MUL_LAT)
  ) u_gen (
    .clk     (CLK),
    .rst     (RST),
    .in_valid(state_valid),
    .xn      (state),
    .h       (H_STEP),
    .ready   (Ready),
    .xn1     (xn1)
  );

  assign Xn_out = xn1.x;
  assign Yn_out = xn1.y;
  assign Zn_out = xn1.z;

  // A new step is only started when none is running or one just finished.
  assert property (@(posedge CLK) disable iff (RST) state_valid |-> $past(!busy || Ready));

endmodule
