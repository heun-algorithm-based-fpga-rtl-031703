// fp_add: IEEE-754 single-precision adder/subtractor, r = a + b (sub = 0) or
// r = a - b (sub = 1), rounded to nearest, ties to even.
//
// The operands are swapped so that |a| >= |b|, the smaller significand is
// aligned with three extra bits (guard, round and a sticky bit that ORs all
// bits shifted further out), the significands are added or subtracted, the
// result is normalised (one step right after a carry, or left by the count of
// leading zeros after a cancellation) and rounded.  Subnormal operands are
// read as zero and results below the normal range are flushed to a signed
// zero; infinities and NaN follow IEEE-754 (Inf - Inf and NaN give a quiet
// NaN).  An exact cancellation gives +0.
//
// Timing: the arithmetic is one combinational block followed by LAT pipeline
// registers (pbs_delay), so out_valid/r follow in_valid/a/b by LAT cycles and a
// new operation can start every cycle.  The latency is this design's choice.
module fp_add
  import pbs_pkg::*;
#(
  parameter int unsigned LAT = ADD_LAT_DEF
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  sub,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t r
);

  fp32_t sum;

  always_comb begin
    fp32_fields_t fa, fb, hi_op, lo_op;
    logic         a_nan, b_nan, a_inf, b_inf;
    logic [26:0]  mb_al, mbig;
    logic [27:0]  acc;
    logic [7:0]   d;
    int signed    e;
    int unsigned  lz;
    logic         rnd, found;
    logic [26:0]  lost;

    fa = a;
    fb = b;
    fb.sign = b[31] ^ sub;
    a_nan = (fa.exp == 8'hFF) && (fa.man != 0);
    b_nan = (fb.exp == 8'hFF) && (fb.man != 0);
    a_inf = (fa.exp == 8'hFF) && (fa.man == 0);
    b_inf = (fb.exp == 8'hFF) && (fb.man == 0);
    // subnormals read as zero
    if (fa.exp == 0) fa.man = '0;
    if (fb.exp == 0) fb.man = '0;

    // order by magnitude
    if ({fa.exp, fa.man} >= {fb.exp, fb.man}) begin
      hi_op = fa; lo_op = fb;
    end else begin
      hi_op = fb; lo_op = fa;
    end

    mbig  = (hi_op.exp   == 0) ? 27'd0 : {1'b1, hi_op.man, 3'b000};
    mb_al = (lo_op.exp == 0) ? 27'd0 : {1'b1, lo_op.man, 3'b000};
    d     = hi_op.exp - lo_op.exp;
    lost  = '0;
    acc   = '0;
    found = 1'b0;
    if (d >= 8'd27) begin
      mb_al = {26'd0, (mb_al != 0)};
    end else begin
      lost  = mb_al & ((27'd1 << d) - 27'd1);
      mb_al = (mb_al >> d) | {26'd0, (lost != 0)};
    end

    e   = int'(hi_op.exp);
    sum = FP_ZERO;
    lz  = 0;
    rnd = 1'b0;

    if (a_nan || b_nan || (a_inf && b_inf && (fa.sign != fb.sign))) begin
      sum = FP_QNAN;
    end else if (a_inf || b_inf) begin
      sum = a_inf ? {fa.sign, 8'hFF, 23'd0} : {fb.sign, 8'hFF, 23'd0};
    end else if (hi_op.exp == 0) begin
      // both operands zero: -0 only when both are -0
      sum = {fa.sign & fb.sign, 31'd0};
    end else begin
      if (hi_op.sign == lo_op.sign) acc = {1'b0, mbig} + {1'b0, mb_al};
      else                        acc = {1'b0, mbig} - {1'b0, mb_al};

      if (acc == 0) begin
        sum = FP_ZERO;
      end else begin
        if (acc[27]) begin
          // carry out: shift right by one, keep the sticky bit
          acc = {1'b0, acc[27:2], acc[1] | acc[0]};
          e   = e + 1;
        end else begin
          found = 1'b0;
          for (int i = 26; i >= 0; i--) begin
            if (!found) begin
              if (acc[i]) found = 1'b1;
              else        lz++;
            end
          end
          acc = acc << lz;
          e   = e - int'(lz);
        end
        // acc[26] hidden bit, [25:3] fraction, [2] guard, [1] round, [0] sticky
        rnd = acc[2] & (acc[1] | acc[0] | acc[3]);
        sum = fp_pack(hi_op.sign, e, acc[26:3], rnd);
      end
    end
  end

  pbs_delay #(.W(32), .LAT(LAT)) u_pipe (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .d        (sum),
    .out_valid(out_valid),
    .q        (r)
  );

endmodule
