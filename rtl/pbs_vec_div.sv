// pbs_vec_div: divider stage of the Heun generator.  Divides each component of
// an (x, y, z) vector by one scalar divisor, in the generator the constant 2.0
// that turns the sum of the two slopes into their mean: q = v / d.  Three
// single-precision radix-2 dividers run in parallel.
// Timing: out_valid/q come DIV_LAT = 28 cycles after in_valid; a new vector is
// accepted only when busy is low.  The stage and its divisor follow the
// corrector formula; the divider's structure is this design's choice.
module pbs_vec_div
  import pbs_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  pbs_vec_t v,
  input  fp32_t    d,
  output logic     busy,
  output logic     out_valid,
  output pbs_vec_t q
);

  logic [2:0] vld, bsy;

  fp_div u_div_x (.clk, .rst, .in_valid, .a(v.x), .b(d), .busy(bsy[2]), .out_valid(vld[2]), .r(q.x));
  fp_div u_div_y (.clk, .rst, .in_valid, .a(v.y), .b(d), .busy(bsy[1]), .out_valid(vld[1]), .r(q.y));
  fp_div u_div_z (.clk, .rst, .in_valid, .a(v.z), .b(d), .busy(bsy[0]), .out_valid(vld[0]), .r(q.z));

  assign out_valid = vld[2];
  assign busy      = |bsy;
  assert property (@(posedge clk) disable iff (rst) vld[2] == vld[1] && vld[1] == vld[0]);

endmodule
