// tb_pbs_vec_div: self-checking testbench of the vector divider stage.
// Random vectors are divided by 2.0 (the divisor the generator uses) and by
// random divisors; each result is compared bit for bit with the reference,
// the latency must be DIV_LAT = 28 cycles, busy must be high while a
// division runs, and a request while busy must be ignored.
module tb_pbs_vec_div;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, busy, out_valid;
  vec_t v = '0, qv;
  f32_t d = '0;
  int   checks = 0, failures = 0, cycle = 0;

  pbs_vec_div dut (.clk, .rst, .in_valid, .v, .d, .busy, .out_valid, .q(qv));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      vec_t x, e;
      f32_t y;
      int   t0, n;
      x = '{x: rand_small(8), y: rand_small(8), z: rand_small(8)};
      y = (i % 3 == 0) ? rand_small(4) : 32'h4000_0000;
      e = vdiv(x, y);
      v <= x; d <= y; in_valid <= 1'b1;
      @(posedge clk);
      t0 = cycle;
      in_valid <= 1'b0;
      @(posedge clk);
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during a division");
      end
      if (i % 5 == 0) begin
        v <= '0; in_valid <= 1'b1;   // must be ignored
        @(posedge clk);
        in_valid <= 1'b0;
      end
      n = 0;
      do begin
        @(posedge clk);
        n++;
      end while (!out_valid && n < 100);
      checks++;
      if (qv !== e || cycle - t0 != 28) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h latency %0d", qv, e, cycle - t0);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
