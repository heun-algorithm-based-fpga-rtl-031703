// pbs_f_stage: evaluates the vector field of the Pandey-Baghel-Singh system
//
//     f(x, y, z) = ( y,  z,  -a*x - b*y - c*z - x^2 )
//
// in single precision.  The generator has two of them: the f0 stage at the
// current point x(n) and the f stage at the predictor.  The third component is
// computed as four products in parallel (a*x, b*y, c*z, x*x), two sums
// (a*x + b*y and c*z + x*x), their sum, and a sign flip; the first two
// components are y and z themselves, delayed to stay aligned.  The order of
// the additions is this design's choice.
// Timing: out_valid/f follow in_valid/p by MUL_LAT + 2*ADD_LAT cycles; one new
// point can enter every cycle.
module pbs_f_stage
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
  input  pbs_vec_t p,
  output logic     out_valid,
  output pbs_vec_t f
);

  localparam int unsigned LAT = MUL_LAT + 2 * ADD_LAT;

  fp32_t      ax, by, cz, xx, s1, s2, s;
  logic [3:0] mul_v;
  logic [1:0] add1_v;
  logic       add2_v, yz_v;
  logic [63:0] yz_d;

  fp_mul #(.LAT(MUL_LAT)) u_mul_ax (.clk, .rst, .in_valid, .a(COEF_A), .b(p.x), .out_valid(mul_v[3]), .r(ax));
  fp_mul #(.LAT(MUL_LAT)) u_mul_by (.clk, .rst, .in_valid, .a(COEF_B), .b(p.y), .out_valid(mul_v[2]), .r(by));
  fp_mul #(.LAT(MUL_LAT)) u_mul_cz (.clk, .rst, .in_valid, .a(COEF_C), .b(p.z), .out_valid(mul_v[1]), .r(cz));
  fp_mul #(.LAT(MUL_LAT)) u_mul_xx (.clk, .rst, .in_valid, .a(p.x),    .b(p.x), .out_valid(mul_v[0]), .r(xx));

  fp_add #(.LAT(ADD_LAT)) u_add_s1 (.clk, .rst, .in_valid(mul_v[3]), .sub(1'b0), .a(ax), .b(by), .out_valid(add1_v[1]), .r(s1));
  fp_add #(.LAT(ADD_LAT)) u_add_s2 (.clk, .rst, .in_valid(mul_v[1]), .sub(1'b0), .a(cz), .b(xx), .out_valid(add1_v[0]), .r(s2));
  fp_add #(.LAT(ADD_LAT)) u_add_s  (.clk, .rst, .in_valid(add1_v[1]), .sub(1'b0), .a(s1), .b(s2), .out_valid(add2_v), .r(s));

  // y and z travel alongside the arithmetic.
  pbs_delay #(.W(64), .LAT(LAT)) u_yz (.clk, .rst, .in_valid, .d({p.y, p.z}), .out_valid(yz_v), .q(yz_d));

  assign f.x       = yz_d[63:32];
  assign f.y       = yz_d[31:0];
  assign f.z       = {~s[31], s[30:0]};
  assign out_valid = add2_v;

  assert property (@(posedge clk) disable iff (rst) add2_v == yz_v);
  assert property (@(posedge clk) disable iff (rst) add1_v[1] == add1_v[0] && mul_v[3] == mul_v[2] && mul_v[2] == mul_v[0]);

endmodule
