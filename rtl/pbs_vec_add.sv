// pbs_vec_add: adder stage of the Heun generator.  Adds two (x, y, z) vectors
// component by component with three single-precision adders working in
// parallel: s = a + b.  The generator uses three of these: Adder-I forms the
// predictor x(n) + h*f(x(n)), Adder-II the sum of the two scaled slopes and
// Adder-III the corrector x(n) + h*(f0 + f)/2.
// Timing: out_valid/s follow in_valid/a/b by LAT cycles (fp_add pipeline).
// The three adder stages and what each adds follow the Heun step; the latency
// is this design's choice.
module pbs_vec_add
  import pbs_pkg::*;
#(
  parameter int unsigned LAT = ADD_LAT_DEF
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  pbs_vec_t a,
  input  pbs_vec_t b,
  output logic     out_valid,
  output pbs_vec_t s
);

  logic [2:0] vld;

  fp_add #(.LAT(LAT)) u_add_x (.clk, .rst, .in_valid, .sub(1'b0), .a(a.x), .b(b.x), .out_valid(vld[2]), .r(s.x));
  fp_add #(.LAT(LAT)) u_add_y (.clk, .rst, .in_valid, .sub(1'b0), .a(a.y), .b(b.y), .out_valid(vld[1]), .r(s.y));
  fp_add #(.LAT(LAT)) u_add_z (.clk, .rst, .in_valid, .sub(1'b0), .a(a.z), .b(b.z), .out_valid(vld[0]), .r(s.z));

  // The three lanes run in lock step.
  assign out_valid = vld[2];
  assert property (@(posedge clk) disable iff (rst) vld[2] == vld[1] && vld[1] == vld[0]);

endmodule
