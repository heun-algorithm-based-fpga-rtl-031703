// tb_pbs_chaos_top: end-to-end testbench of the chaotic generator with every
// parameter at its default (h = 0.01, a = 1, b = 1.1, c = 0.4).
//
// From the initial condition (0.1, 0, 0) the generator runs NSTEPS = 3000
// Heun steps.  Every sample is compared bit for bit with a single-precision
// reference model; the first Ready must come 118 cycles after the edge that
// samples Start and every later one 118 cycles after the previous.  For the
// first 2000 steps (t = 20) the trajectory must also track a
// double-precision solution of the same equations.  With these coefficients
// the solution from (0.1, 0, 0) grows without bound and leaves the single-
// precision range near t = 28.9 (step 2892, whatever h); the run goes past that
// point, and the overflow to infinity, and then NaN, must match the model.
//
// Mechanisms exercised and counted: start from the initial condition, steps
// fed back from the output, pause (Start dropped: the step in flight finishes,
// then no more Ready), resume from the last sample, a reset followed by a
// restart from a new initial condition, and overflow of the state to a
// non-finite value.  Each must occur at least once.
module tb_pbs_chaos_top;
  import fp_ref_pkg::*;

  localparam f32_t H  = 32'h3C23_D70A;
  localparam f32_t CA = 32'h3F80_0000, CB = 32'h3F8C_CCCD, CC = 32'h3ECC_CCCD;
  localparam int   STEP_CYCLES = 118;
  localparam int   NSTEPS = 3000;
  localparam int   NTRACK = 2000;

  logic  CLK = 1'b0, RST = 1'b1, Start = 1'b0, Ready;
  f32_t  X_in = '0, Y_in = '0, Z_in = '0, Xn_out, Yn_out, Zn_out;
  int    checks = 0, failures = 0, cycle = 0;
  int    n_init = 0, n_feedback = 0, n_pause = 0, n_resume = 0, n_restart = 0, n_overflow = 0;
  int    samples = 0, last_ready = -1;
  vec_t  model;
  real   xmin = 0.0, xmax = 0.0, rx, ry, rz;

  pbs_chaos_top dut (.CLK, .RST, .Start, .X_in, .Y_in, .Z_in, .Xn_out, .Yn_out, .Zn_out, .Ready);

  always #5 CLK = ~CLK;
  always @(posedge CLK) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  // Wait for the next Ready; returns the cycle it was seen in.
  task automatic wait_ready(output int t);
    int n;
    n = 0;
    do begin
      @(posedge CLK);
      n++;
    end while (!Ready && n < 1000);
    t = cycle;
    if (!Ready) fail("no Ready");
  endtask

  // Check one sample against the model and advance the model.
  task automatic check_sample();
    vec_t got;
    real  x;
    model = ref_step(model, H, CA, CB, CC);
    got   = '{x: Xn_out, y: Yn_out, z: Zn_out};
    samples++;
    checks++;
    if (got !== model) begin
      fail($sformatf("sample %0d: got %h exp %h", samples, got, model));
      model = got;  // resynchronise to report one error once
    end
    if (!is_finite(Xn_out) || !is_finite(Yn_out) || !is_finite(Zn_out)) n_overflow++;
    else begin
      x = f2r(Xn_out);
      if (x < xmin) xmin = x;
      if (x > xmax) xmax = x;
    end
  endtask

  // first: the first Ready is timed from the edge that samples Start, which
  // is start_edge edges after the call.
  task automatic run_steps(input int n, input logic first, input int start_edge = 0);
    int t, t0;
    t0 = cycle + start_edge;
    for (int i = 0; i < n; i++) begin
      wait_ready(t);
      checks++;
      if (i == 0 && first) begin
        if (t - t0 != STEP_CYCLES) fail($sformatf("first Ready after %0d cycles", t - t0));
      end else if (i > 0 && t - last_ready != STEP_CYCLES) begin
        fail($sformatf("Ready spacing %0d cycles", t - last_ready));
      end
      last_ready = t;
      check_sample();
      if (i > 0 || !first) n_feedback++;
    end
  endtask

  initial begin
    int t;
    repeat (3) @(posedge CLK);
    X_in <= 32'h3DCC_CCCD;  // 0.1
    Y_in <= 32'h0;
    Z_in <= 32'h0;
    RST  <= 1'b0;
    repeat (4) @(posedge CLK);
    checks++;
    if (Ready) fail("Ready without Start");

    // start from the initial condition
    model = '{x: 32'h3DCC_CCCD, y: 32'h0, z: 32'h0};
    rx = 0.1; ry = 0.0; rz = 0.0;
    Start <= 1'b1;
    n_init++;
    run_steps(1, 1'b1, 1);
    // double-precision tracking
    step_real(rx, ry, rz, 0.01, 1.0, 1.1, 0.4);
    for (int i = 1; i < NTRACK; i++) begin
      run_steps(1, 1'b0);
      step_real(rx, ry, rz, 0.01, 1.0, 1.1, 0.4);
    end
    checks++;
    if ((f2r(Xn_out) - rx) > 1e-3 || (rx - f2r(Xn_out)) > 1e-3 || (f2r(Zn_out) - rz) > 1e-3 || (rz - f2r(Zn_out)) > 1e-3)
      fail($sformatf("after %0d steps x=%f z=%f, double precision %f %f", NTRACK, f2r(Xn_out), f2r(Zn_out), rx, rz));
    $display("after %0d steps x=%f z=%f, double precision %f %f", NTRACK, f2r(Xn_out), f2r(Zn_out), rx, rz);

    // pause in the middle of a step, then resume
    repeat (40) @(posedge CLK);
    Start <= 1'b0;
    n_pause++;
    wait_ready(t);            // the step in flight completes
    check_sample();
    repeat (3 * STEP_CYCLES) begin
      @(posedge CLK);
      checks++;
      if (Ready) fail("Ready while paused");
    end
    Start <= 1'b1;
    n_resume++;
    run_steps(1, 1'b1, 1);
    run_steps(NSTEPS - samples, 1'b0);

    checks++;
    if (xmin > -5.0 || xmax < 0.2)
      fail($sformatf("x range [%f, %f] too narrow", xmin, xmax));
    $display("finite x range over %0d samples: [%g, %g]", samples, xmin, xmax);

    // reset in mid-step and restart from another initial condition
    repeat (50) @(posedge CLK);
    RST <= 1'b1;
    @(posedge CLK);
    RST   <= 1'b0;
    X_in  <= 32'hBE4C_CCCD;   // -0.2
    Y_in  <= 32'h3DCC_CCCD;   //  0.1
    Z_in  <= 32'h3F00_0000;   //  0.5
    model = '{x: 32'hBE4C_CCCD, y: 32'h3DCC_CCCD, z: 32'h3F00_0000};
    @(posedge CLK);
    checks++;
    if (Ready || Xn_out != 0) fail("outputs not cleared by reset");
    n_restart++;
    n_init++;
    run_steps(1, 1'b1);
    run_steps(50, 1'b0);

    checks += 6;
    if (n_overflow < 1) fail("overflow never happened");
    if (n_init < 1)     fail("initial-condition start never happened");
    if (n_feedback < 1) fail("feedback step never happened");
    if (n_pause < 1)    fail("pause never happened");
    if (n_resume < 1)   fail("resume never happened");
    if (n_restart < 1)  fail("restart after reset never happened");
    $display("samples=%0d initial_starts=%0d feedback_steps=%0d pauses=%0d resumes=%0d restarts=%0d overflowed=%0d",
             samples, n_init, n_feedback, n_pause, n_resume, n_restart, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NSTEPS + 100) * (STEP_CYCLES + 1) + 2000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
