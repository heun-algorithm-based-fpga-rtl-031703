// tb_fp_mul: self-checking testbench of the single-precision multiplier.
// Directed cases (exact products, signed zeros, Inf * 0, NaN, overflow,
// underflow, flushed subnormals, rounding) and random products over the whole
// exponent range are issued one per clock; every result is compared bit for
// bit with the double-precision product rounded to nearest-even, and its
// latency with LAT.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 8;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, sub = 1'b0, out_valid;
  f32_t a = '0, b = '0, r;
  int   checks = 0, failures = 0, cycle = 0;

  typedef struct { f32_t exp_r; int t; f32_t a; f32_t b; logic sub; } pend_t;
  pend_t q[$];

  fp_mul #(.LAT(LAT)) dut (.clk, .rst, .in_valid, .a, .b, .out_valid, .r);

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
          $display("FAIL %h * %h: got %h exp %h (latency %0d)", p.a, p.b, r, p.exp_r, cycle - p.t);
      end
    end
  end

  task automatic issue(input f32_t x, input f32_t y, input logic s, input f32_t e);
    a <= x; b <= y; sub <= s; in_valid <= 1'b1;
    q.push_back('{exp_r: e, t: cycle + 1, a: x, b: y, sub: s});
    @(posedge clk);
  endtask

  task automatic issue_ref(input f32_t x, input f32_t y, input logic s);
    issue(x, y, s, ref_mul(x, y));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    issue(32'h3F80_0000, 32'h4000_0000, 1'b0, 32'h4000_0000);  // 1 * 2 = 2
    issue(32'h3FC0_0000, 32'h3FC0_0000, 1'b0, 32'h4010_0000);  // 1.5 * 1.5 = 2.25
    issue(32'hBF80_0000, 32'h0000_0000, 1'b0, 32'h8000_0000);  // -1 * 0 = -0
    issue(32'h7F80_0000, 32'h0000_0000, 1'b0, 32'h7FC0_0000);  // Inf * 0 = NaN
    issue(32'h7F80_0000, 32'hC000_0000, 1'b0, 32'hFF80_0000);  // Inf * -2 = -Inf
    issue(32'h7FC0_0001, 32'h3F80_0000, 1'b0, 32'h7FC0_0000);  // NaN
    issue(32'h7F00_0000, 32'h4000_0000, 1'b0, 32'h7F80_0000);  // overflow
    issue(32'h0080_0000, 32'h3F00_0000, 1'b0, 32'h0000_0000);  // underflow flushed
    issue(32'h0000_0001, 32'h3F80_0000, 1'b0, 32'h0000_0000);  // subnormal read as 0
    issue(32'h3F80_0001, 32'h3F80_0001, 1'b0, 32'h3F80_0002);  // (1+u)^2 rounds to 1+2u
    issue(32'h3DCC_CCCD, 32'h3DCC_CCCD, 1'b0, 32'h3C23_D70B);  // 0.1 * 0.1
    // random
    for (int i = 0; i < 4000; i++) begin
      f32_t x, y;
      x = (i % 4 == 0) ? rand_fp(1, 254) : rand_fp(100, 160);
      y = (i % 4 == 0) ? rand_fp(1, 254) : rand_fp(100, 160);
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
