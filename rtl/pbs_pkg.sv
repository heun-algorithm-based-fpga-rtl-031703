// pbs_pkg: types and constants shared by the Pandey-Baghel-Singh (PBS) chaotic
// generator.  All arithmetic is IEEE-754 single precision, so a number is a
// plain 32-bit word (fp32_t) and a point of the three-dimensional system
// (x, y, z) is a packed struct of three such words (pbs_vec_t, 96 bits, x in
// the most significant word).  The coefficients a = 1, b = 1.1, c = 0.4 and
// the initial condition (0.1, 0, 0) are the ones the system is defined with
// (the latter is applied at the generator's inputs); the step size h = 0.01 and the operator latencies are this design's choice.
package pbs_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t x;
    fp32_t y;
    fp32_t z;
  } pbs_vec_t;

  // Fields of a single-precision word.
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_fields_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;  // 2.0, the divisor of the corrector
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;  // quiet NaN returned for invalid operations

  // System coefficients: dz/dt = -a*x - b*y - c*z - x^2
  localparam fp32_t FP_COEF_A = 32'h3F80_0000;  // 1.0
  localparam fp32_t FP_COEF_B = 32'h3F8C_CCCD;  // 1.1
  localparam fp32_t FP_COEF_C = 32'h3ECC_CCCD;  // 0.4

  // Integration step h (design choice).
  localparam fp32_t FP_H_STEP = 32'h3C23_D70A;  // 0.01

  // Pipeline latencies of the floating-point operators, in clock cycles.
  // With these values one Heun step takes 4*MUL + 7*ADD + DIV + 2 = 118 cycles.
  localparam int unsigned ADD_LAT_DEF = 8;
  localparam int unsigned MUL_LAT_DEF = 8;
  localparam int unsigned DIV_LAT     = 28;  // fixed by the radix-2 divider

  // Rounded significand plus exponent, before packing (used by the operators).
  function automatic fp32_t fp_pack(input logic sign, input int signed exp_b,
                                    input logic [23:0] sig, input logic round_up);
    logic [24:0] r;
    int signed   e;
    r = {1'b0, sig} + 25'(round_up);
    e = exp_b;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255)     return {sign, 8'hFF, 23'd0};   // overflow to infinity
    else if (e <= 0)  return {sign, 31'd0};          // underflow flushed to zero
    else              return {sign, e[7:0], r[22:0]};
  endfunction

endpackage
