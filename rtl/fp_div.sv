// fp_div: IEEE-754 single-precision divider, r = a / b, rounded to nearest,
// ties to even, one quotient bit per clock cycle (radix-2 restoring division).
//
// On in_valid the operands are unpacked.  Special cases (NaN, Inf, zero) are
// decided at once; otherwise the dividend significand is doubled if it is
// smaller than the divisor's, so that the quotient lies in [1, 2).  Then 26
// restoring steps produce the hidden bit, 23 fraction bits, a guard and a
// round bit; a non-zero final remainder is the sticky bit.  The last cycle
// rounds and packs the result.  Subnormals are read as zero and results
// below the normal range are flushed to zero; x/0 gives a signed infinity,
// 0/0 and Inf/Inf a quiet NaN.
//
// Timing: in_valid sampled at clock edge t gives out_valid (one cycle) and r
// at edge t + 27, i.e. the next stage samples them DIV_LAT = 28 edges after
// the operands.  The unit is not pipelined: in_valid is ignored while busy is
// high.  r holds its value until the next result.  Reset is synchronous and
// active high.  The divider stage itself, and its divisor of 2.0, belong to the
// Heun step; the radix-2 restoring structure and the latency are this
// design's choice.
module fp_div
  import pbs_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  out_valid,
  output fp32_t r
);

  // load + QBITS restoring steps + round = DIV_LAT cycles
  localparam int unsigned QBITS = DIV_LAT - 2;

  logic        sign_q, special_q;
  fp32_t       special_val_q;
  int signed   exp_q;
  logic [24:0] rem_q;      // partial remainder, < 2 * divisor
  logic [23:0] div_q;      // divisor significand
  logic [QBITS-1:0] quo_q;
  logic [4:0]  cnt_q;
  logic        run_q, fin_q;

  assign busy = run_q | fin_q;

  // Unpacking of a new operation.
  fp32_fields_t fa, fb;
  logic  a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, sgn;
  logic  is_special;
  fp32_t spec_val;

  always_comb begin
    fa     = a;
    fb     = b;
    sgn    = fa.sign ^ fb.sign;
    a_nan  = (fa.exp == 8'hFF) && (fa.man != 0);
    b_nan  = (fb.exp == 8'hFF) && (fb.man != 0);
    a_inf  = (fa.exp == 8'hFF) && (fa.man == 0);
    b_inf  = (fb.exp == 8'hFF) && (fb.man == 0);
    a_zero = (fa.exp == 0);
    b_zero = (fb.exp == 0);
    is_special = 1'b1;
    if (a_nan || b_nan || (a_inf && b_inf) || (a_zero && b_zero)) spec_val = FP_QNAN;
    else if (a_inf || b_zero)                                     spec_val = {sgn, 8'hFF, 23'd0};
    else if (a_zero || b_inf)                                     spec_val = {sgn, 31'd0};
    else begin
      spec_val   = FP_ZERO;
      is_special = 1'b0;
    end
  end

  // One restoring step.
  logic [24:0] trial;
  logic        qbit;
  always_comb begin
    trial = rem_q - {1'b0, div_q};
    qbit  = (rem_q >= {1'b0, div_q});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q     <= 1'b0;
      fin_q     <= 1'b0;
      out_valid <= 1'b0;
      r         <= FP_ZERO;
      cnt_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy && in_valid) begin
        sign_q        <= sgn;
        special_q     <= is_special;
        special_val_q <= spec_val;
        div_q         <= {1'b1, fb.man};
        quo_q         <= '0;
        cnt_q         <= 5'(QBITS);
        run_q         <= 1'b1;
        if ({1'b1, fa.man} < {1'b1, fb.man}) begin
          rem_q <= {fa.exp != 0, fa.man, 1'b0};
          exp_q <= int'(fa.exp) - int'(fb.exp) + 126;
        end else begin
          rem_q <= {1'b0, fa.exp != 0, fa.man};
          exp_q <= int'(fa.exp) - int'(fb.exp) + 127;
        end
      end else if (run_q) begin
        quo_q <= {quo_q[QBITS-2:0], qbit};
        rem_q <= (qbit ? trial : rem_q) << 1;
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) begin
          run_q <= 1'b0;
          fin_q <= 1'b1;
        end
      end else if (fin_q) begin
        fin_q     <= 1'b0;
        out_valid <= 1'b1;
        if (special_q) r <= special_val_q;
        else           r <= fp_pack(sign_q, exp_q, quo_q[25:2],
                                    quo_q[1] & (quo_q[0] | (rem_q != 0) | quo_q[2]));
      end
    end
  end

endmodule
