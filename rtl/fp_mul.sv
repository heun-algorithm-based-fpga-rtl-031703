// fp_mul: IEEE-754 single-precision multiplier, r = a * b, rounded to nearest,
// ties to even.
//
// The 24-bit significands (hidden one restored) are multiplied into a 48-bit
// product, which is in [1, 4) and so needs at most one normalising shift; the
// bits below the kept 24 give the guard bit and a sticky bit for rounding.
// The exponent is ea + eb - 127 (+1 after the shift).  Subnormal operands are
// read as zero and results below the normal range are flushed to a signed
// zero; overflow gives infinity, Inf * 0 and NaN give a quiet NaN.
//
// Timing: one combinational block followed by LAT pipeline registers, so
// out_valid/r follow in_valid/a/b by LAT cycles, one new product per cycle.
// The latency is this design's choice.
module fp_mul
  import pbs_pkg::*;
#(
  parameter int unsigned LAT = MUL_LAT_DEF
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t r
);

  fp32_t prod;

  always_comb begin
    fp32_fields_t fa, fb;
    logic         sign, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [47:0]  p;
    logic [23:0]  sig;
    logic         guard, sticky, rnd;
    int signed    e;

    fa     = a;
    fb     = b;
    sign   = fa.sign ^ fb.sign;
    a_nan  = (fa.exp == 8'hFF) && (fa.man != 0);
    b_nan  = (fb.exp == 8'hFF) && (fb.man != 0);
    a_inf  = (fa.exp == 8'hFF) && (fa.man == 0);
    b_inf  = (fb.exp == 8'hFF) && (fb.man == 0);
    a_zero = (fa.exp == 0);
    b_zero = (fb.exp == 0);

    p      = {24'd0, 1'b1, fa.man} * {24'd0, 1'b1, fb.man};
    e      = int'(fa.exp) + int'(fb.exp) - 127;
    if (p[47]) begin
      sig    = p[47:24];
      guard  = p[23];
      sticky = (p[22:0] != 0);
      e      = e + 1;
    end else begin
      sig    = p[46:23];
      guard  = p[22];
      sticky = (p[21:0] != 0);
    end
    rnd = guard & (sticky | sig[0]);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      prod = FP_QNAN;
    else if (a_inf || b_inf)
      prod = {sign, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      prod = {sign, 31'd0};
    else
      prod = fp_pack(sign, e, sig, rnd);
  end

  pbs_delay #(.W(32), .LAT(LAT)) u_pipe (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .d        (prod),
    .out_valid(out_valid),
    .q        (r)
  );

endmodule
