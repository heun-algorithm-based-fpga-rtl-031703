// pbs_vec_mul: multiplier stage of the Heun generator.  Multiplies an (x, y, z)
// vector by one scalar, in the generator always the step size h: r = s * v,
// three single-precision multipliers in parallel.  The generator uses the
// one multiplier stage twice per step, for h*f0 and for h*f.
// Timing: out_valid/r follow in_valid/v/s by LAT cycles (fp_mul pipeline).
// A single multiplier stage by h is what the block structure shows; using it
// for both products of the step (the second one is needed by the corrector)
// is this design's choice.
module pbs_vec_mul
  import pbs_pkg::*;
#(
  parameter int unsigned LAT = MUL_LAT_DEF
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  pbs_vec_t v,
  input  fp32_t    s,
  output logic     out_valid,
  output pbs_vec_t r
);

  logic [2:0] vld;

  fp_mul #(.LAT(LAT)) u_mul_x (.clk, .rst, .in_valid, .a(s), .b(v.x), .out_valid(vld[2]), .r(r.x));
  fp_mul #(.LAT(LAT)) u_mul_y (.clk, .rst, .in_valid, .a(s), .b(v.y), .out_valid(vld[1]), .r(r.y));
  fp_mul #(.LAT(LAT)) u_mul_z (.clk, .rst, .in_valid, .a(s), .b(v.z), .out_valid(vld[0]), .r(r.z));

  assign out_valid = vld[2];
  assert property (@(posedge clk) disable iff (rst) vld[2] == vld[1] && vld[1] == vld[0]);

endmodule
