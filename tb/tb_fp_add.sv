// tb_fp_add: self-checking testbench of the single-precision adder.  Directed
// cases (exact sums, cancellation to +0, signed zeros, infinities, NaN,
// overflow, flushed subnormals) and random additions and subtractions are
// issued one per clock; every result is compared bit for bit with the
// double-precision reference rounded to nearest-even, and its latency with LAT.
module tb_fp_add;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 8;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, sub = 1'b0, out_valid;
  f32_t a = '0, b = '0, r;
  int   checks = 0, failures = 0, cycle = 0;

  typedef struct { f32_t exp_r; int t; f32_t a; f32_t b; logic sub; } pend_t;
  pend_t q[$];

  fp_add #(.LAT(LAT)) dut (.clk, .rst, .in_valid, .sub, .a, .b, .out_valid, .r);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(posedge clk) if (!rst && out_valid) begin
    pend_t p;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected out_valid");
    end else begin
      p = q.pop_front();
      if (r !== p.exp_r || cycle - p.t != int'(LAT)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h %s %h: got %h exp %h (latency %0d)", p.a, p.sub ? "-" : "+", p.b, r, p.exp_r, cycle - p.t);
      end
    end
  end

  task automatic issue(input f32_t x, input f32_t y, input logic s, input f32_t e);
    a <= x; b <= y; sub <= s; in_valid <= 1'b1;
    q.push_back('{exp_r: e, t: cycle + 1, a: x, b: y, sub: s});
    @(posedge clk);
  endtask

  task automatic issue_ref(input f32_t x, input f32_t y, input logic s);
    issue(x, y, s, ref_add(x, s ? {~y[31], y[30:0]} : y));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000);  // 1 + 1 = 2
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000);  // 1 - 1 = +0
    issue(32'h8000_0000, 32'h8000_0000, 1'b0, 32'h8000_0000);  // -0 + -0 = -0
    issue(32'h4049_0FDB, 32'hC049_0FDB, 1'b0, 32'h0000_0000);  // pi + -pi = +0
    issue(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000);  // Inf - Inf = NaN
    issue(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000);  // Inf + 1 = Inf
    issue(32'h7FC0_0001, 32'h3F80_0000, 1'b0, 32'h7FC0_0000);  // NaN
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000);  // overflow
    issue(32'h0000_0001, 32'h3F80_0000, 1'b0, 32'h3F80_0000);  // subnormal read as 0
    issue(32'h0080_0001, 32'h0080_0000, 1'b1, 32'h0000_0000);  // result below normal range
    issue(32'h3F80_0001, 32'h3F80_0000, 1'b1, 32'h3400_0000);  // cancellation: 2^-23
    issue(32'h4B80_0000, 32'h3F80_0000, 1'b0, 32'h4B80_0000);  // 2^24 + 1: tie to even
    issue(32'h4B80_0000, 32'h4000_0000, 1'b0, 32'h4B80_0001);  // 2^24 + 2
    issue(32'h3F80_0000, 32'h3380_0000, 1'b1, 32'h3F7F_FFFF);  // 1 - 2^-24
    // random
    for (int i = 0; i < 4000; i++) begin
      f32_t x, y;
      x = rand_fp(100, 160);
      y = (i % 3 == 0) ? rand_fp(int'(x[30:23]) - 2, int'(x[30:23]) + 1) : rand_fp(100, 160);
      if (y[30:23] == 0) y[30:23] = 8'd1;
      issue_ref(x, y, 1'($urandom));
    end
    in_valid <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
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
