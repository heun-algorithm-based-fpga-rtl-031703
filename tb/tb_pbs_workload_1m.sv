// tb_pbs_workload_1m: a run of 10^6 samples from the initial condition
// (0.1, 0, 0).  With the default step h = 0.01 the solution of these equations
// leaves the single-precision range after about 2,900 steps, so this run uses
// h = 2^-16: 10^6 steps then cover t = 15.26, all of it finite.  Every
// sample is compared bit for bit with the single-precision reference model,
// every Ready must follow the previous one by 118 cycles, and the last sample
// must agree with a double-precision solution of the same equations.
module tb_pbs_workload_1m;
  import fp_ref_pkg::*;

  localparam f32_t H  = 32'h3780_0000;   // 2^-16
  localparam real  HR = 1.0 / 65536.0;
  localparam f32_t CA = 32'h3F80_0000, CB = 32'h3F8C_CCCD, CC = 32'h3ECC_CCCD;
  localparam int   NSAMPLES = 1_000_000;

  logic CLK = 1'b0, RST = 1'b1, Start = 1'b0, Ready;
  f32_t Xn_out, Yn_out, Zn_out;
  int   checks = 0, failures = 0, cycle = 0, samples = 0, last = 0, nonfinite = 0;
  vec_t model;
  real  rx = 0.1, ry = 0.0, rz = 0.0;

  pbs_chaos_top #(.H_STEP(H)) dut (
    .CLK, .RST, .Start, .X_in(32'h3DCC_CCCD), .Y_in(32'h0), .Z_in(32'h0),
    .Xn_out, .Yn_out, .Zn_out, .Ready
  );

  always #5 CLK = ~CLK;
  always @(posedge CLK) cycle <= cycle + 1;

  always @(posedge CLK) if (!RST && Ready) begin
    vec_t got;
    model = ref_step(model, H, CA, CB, CC);
    step_real(rx, ry, rz, HR, 1.0, 1.1, 0.4);
    got = '{x: Xn_out, y: Yn_out, z: Zn_out};
    samples++;
    checks += 2;
    if (got !== model) begin
      failures++;
      if (failures < 10) $display("FAIL sample %0d: got %h exp %h", samples, got, model);
      model = got;
    end
    if (samples > 1 && cycle - last != 118) begin
      failures++;
      if (failures < 10) $display("FAIL Ready spacing %0d", cycle - last);
    end
    if (!is_finite(Xn_out) || !is_finite(Yn_out) || !is_finite(Zn_out)) nonfinite++;
    last = cycle;
  end

  initial begin
    model = '{x: 32'h3DCC_CCCD, y: 32'h0, z: 32'h0};
    repeat (3) @(posedge CLK);
    RST   <= 1'b0;
    Start <= 1'b1;
    wait (samples == NSAMPLES);
    Start <= 1'b0;
    checks += 2;
    if (nonfinite != 0) begin
      failures++;
      $display("FAIL %0d non-finite samples", nonfinite);
    end
    $display("t = %f: x=%f y=%f z=%f, double precision %f %f %f", NSAMPLES * HR,
             f2r(Xn_out), f2r(Yn_out), f2r(Zn_out), rx, ry, rz);
    if ((f2r(Xn_out) - rx) > 1e-2 || (rx - f2r(Xn_out)) > 1e-2) begin
      failures++;
      $display("FAIL final x differs from double precision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMPLES * 118 + 1000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
