// pbs_generator_unit: one step of Heun's method for the Pandey-Baghel-Singh
// system, in single precision.  With f the vector field (pbs_f_stage) and h
// the step size:
//
//     f0   = f(x(n))                        f0 stage
//     hk1  = h * f0                         multiplier stage, first use
//     xp   = x(n) + hk1                     Adder-I   (predictor x(n^0+1))
//     f1   = f(xp)                          f stage
//     hk2  = h * f1                         multiplier stage, second use
//     sum  = hk1 + hk2                      Adder-II
//     half = sum / 2.0                      divider stage
//     x(n+1) = x(n) + half                  Adder-III (corrector)
//
// so x(n+1) = x(n) + h*(f(x(n)) + f(xp))/2.  The stages are chained by their
// valid strobes and only one operation is in flight at a time; the one
// multiplier stage is shared by its two uses and routes its result to
// Adder-I or Adder-II by which use started it.  The result is registered at the
// output, ready pulses for one cycle and xn1 holds the sample until the next.
//
// Timing: in_valid sampled at edge t gives ready at edge
// t + 4*MUL_LAT + 7*ADD_LAT + DIV_LAT + 1 (117 with the default latencies).
// xn must stay stable until ready.  Reset is synchronous, active high.
// The stages and their order follow the generator's block structure and the
// Heun formulas; sharing the multiplier, the valid-strobe chaining and the
// plain output register in place of the unspecified filter stage are this
// design's choice.
module pbs_generator_unit
  import pbs_pkg::*;
#(
  parameter fp32_t       COEF_A  = FP_COEF_A,
  parameter fp32_t       COEF_B  = FP_COEF_B,
  parameter fp32_t       COEF_C  = FP_COEF_C,
  parameter int unsigned ADD_LAT = ADD_LAT_DEF,
  parameter int unsigned MUL_LAT = MUL_LAT_DEF
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  pbs_vec_t xn,
  input  fp32_t    h,
  output logic     ready,
  output pbs_vec_t xn1
);

  logic     f0_v, f1_v, mul_in_v, mul_v, add1_v, add2_v, div_v, add3_v, div_busy;
  pbs_vec_t f0, f1, mul_in, hk, hk1_q, xp, sum, half, xnext;
  logic     second_q;   // the multiplier is working on h*f1

  // f0 stage: slope at x(n)
  pbs_f_stage #(.COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT))
    u_f0 (.clk, .rst, .in_valid, .p(xn), .out_valid(f0_v), .f(f0));

  // shared multiplier stage
  assign mul_in_v = f0_v | f1_v;
  assign mul_in   = f1_v ? f1 : f0;

  always_ff @(posedge clk) begin
    if (rst)       second_q <= 1'b0;
    else if (f0_v) second_q <= 1'b0;
    else if (f1_v) second_q <= 1'b1;
  end

  pbs_vec_mul #(.LAT(MUL_LAT)) u_mul (.clk, .rst, .in_valid(mul_in_v), .v(mul_in), .s(h), .out_valid(mul_v), .r(hk));

  always_ff @(posedge clk) begin
    if (mul_v && !second_q) hk1_q <= hk;
  end

  // Adder-I: predictor
  pbs_vec_add #(.LAT(ADD_LAT)) u_add1 (.clk, .rst, .in_valid(mul_v && !second_q), .a(xn), .b(hk), .out_valid(add1_v), .s(xp));

  // f stage: slope at the predictor
  pbs_f_stage #(.COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT))
    u_f1 (.clk, .rst, .in_valid(add1_v), .p(xp), .out_valid(f1_v), .f(f1));

  // Adder-II: sum of the scaled slopes
  pbs_vec_add #(.LAT(ADD_LAT)) u_add2 (.clk, .rst, .in_valid(mul_v && second_q), .a(hk1_q), .b(hk), .out_valid(add2_v), .s(sum));

  // divider stage: mean of the two
  pbs_vec_div u_div (.clk, .rst, .in_valid(add2_v), .v(sum), .d(FP_TWO), .busy(div_busy), .out_valid(div_v), .q(half));

  // Adder-III: corrector
  pbs_vec_add #(.LAT(ADD_LAT)) u_add3 (.clk, .rst, .in_valid(div_v), .a(xn), .b(half), .out_valid(add3_v), .s(xnext));

  // output register
  always_ff @(posedge clk) begin
    if (rst) begin
      ready <= 1'b0;
      xn1   <= '0;
    end else begin
      ready <= add3_v;
      if (add3_v) xn1 <= xnext;
    end
  end

  // Sequential operation: the two users of the multiplier never collide and
  // the divider is free when the sum arrives.
  assert property (@(posedge clk) disable iff (rst) !(f0_v && f1_v));
  assert property (@(posedge clk) disable iff (rst) add2_v |-> !div_busy);

endmodule
