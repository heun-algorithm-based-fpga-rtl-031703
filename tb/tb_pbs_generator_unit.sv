// tb_pbs_generator_unit: self-checking testbench of one Heun step.  Random
// points in the range the chaotic trajectory visits are applied with a
// one-cycle in_valid; each result must equal, bit for bit, the reference step
// computed with the same single-precision operations in the same order, and
// ready must come 117 clock edges after the edge that samples in_valid
// (the 118-cycle step minus the multiplexer's cycle).  The result must also
// agree with a double-precision Heun step to within single-precision error.
module tb_pbs_generator_unit;
  import fp_ref_pkg::*;

  localparam f32_t H  = 32'h3C23_D70A;  // 0.01
  localparam f32_t CA = 32'h3F80_0000, CB = 32'h3F8C_CCCD, CC = 32'h3ECC_CCCD;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, ready;
  vec_t xn = '0, xn1;
  int   checks = 0, failures = 0, cycle = 0;

  pbs_generator_unit dut (.clk, .rst, .in_valid, .xn, .h(H), .ready, .xn1);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rel_err(input real got, input real want);
    real d;
    d = got - want;
    if (d < 0.0) d = -d;
    return d / ((want < 0.0 ? -want : want) + 1.0e-3);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      vec_t p, e;
      int   t0, n;
      real  rx, ry, rz;
      p = '{x: rand_small(3), y: rand_small(3), z: rand_small(3)};
      if (i == 0) p = '{x: 32'h3DCC_CCCD, y: 32'h0, z: 32'h0};
      e = ref_step(p, H, CA, CB, CC);
      xn <= p; in_valid <= 1'b1;
      @(posedge clk);
      t0 = cycle;
      in_valid <= 1'b0;
      n = 0;
      do begin
        @(posedge clk);
        n++;
      end while (!ready && n < 300);
      checks++;
      if (xn1 !== e || cycle - t0 != 117) begin
        failures++;
        if (failures < 10) $display("FAIL step from %h: got %h exp %h, latency %0d", p, xn1, e, cycle - t0);
      end
      rx = f2r(p.x); ry = f2r(p.y); rz = f2r(p.z);
      step_real(rx, ry, rz, 0.01, 1.0, 1.1, 0.4);
      checks++;
      if (rel_err(f2r(xn1.x), rx) > 1e-4 || rel_err(f2r(xn1.y), ry) > 1e-4 || rel_err(f2r(xn1.z), rz) > 1e-4) begin
        failures++;
        if (failures < 10) $display("FAIL step from %h far from double: %f %f %f vs %f %f %f", p,
                                    f2r(xn1.x), f2r(xn1.y), f2r(xn1.z), rx, ry, rz);
      end
      repeat ($urandom_range(3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
