// tb_fp_div: self-checking testbench of the single-precision divider.  Each
// division is started, its result awaited and compared bit for bit with the
// double-precision quotient rounded to nearest-even, and the time from
// in_valid to out_valid is checked against DIV_LAT = 28 cycles.  Directed
// cases cover exact quotients, 1/3, division by zero, 0/0, Inf/Inf, overflow,
// underflow and a request made while busy (which must be ignored); then
// random quotients follow.
module tb_fp_div;
  import fp_ref_pkg::*;

  localparam int DIV_LAT = 28;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, busy, out_valid;
  f32_t a = '0, b = '0, r;
  int   checks = 0, failures = 0, cycle = 0;

  fp_div dut (.clk, .rst, .in_valid, .a, .b, .busy, .out_valid, .r);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input f32_t x, input f32_t y, input f32_t e, input logic poke_busy);
    int t0, n;
    a <= x; b <= y; in_valid <= 1'b1;
    @(posedge clk);
    t0 = cycle;
    in_valid <= 1'b0;
    if (poke_busy) begin
      // a second request while busy must not disturb the running division
      repeat (3) @(posedge clk);
      a <= 32'h3F80_0000; b <= 32'h3F80_0000; in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
    end
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!out_valid && n < 100);
    checks++;
    if (r !== e || cycle - t0 != DIV_LAT) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h exp %h, latency %0d", x, y, r, e, cycle - t0);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(32'h4040_0000, 32'h4000_0000, 32'h3FC0_0000, 1'b0);  // 3 / 2 = 1.5
    check(32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB, 1'b1);  // 1 / 3
    check(32'hBF80_0000, 32'h0000_0000, 32'hFF80_0000, 1'b0);  // -1 / 0 = -Inf
    check(32'h0000_0000, 32'h0000_0000, 32'h7FC0_0000, 1'b0);  // 0 / 0 = NaN
    check(32'h7F80_0000, 32'h7F80_0000, 32'h7FC0_0000, 1'b0);  // Inf / Inf = NaN
    check(32'h0000_0000, 32'h4000_0000, 32'h0000_0000, 1'b0);  // 0 / 2 = 0
    check(32'h3F80_0000, 32'h7F80_0000, 32'h0000_0000, 1'b0);  // 1 / Inf = 0
    check(32'h7F00_0000, 32'h3E80_0000, 32'h7F80_0000, 1'b0);  // overflow
    check(32'h0100_0000, 32'h4100_0000, 32'h0000_0000, 1'b0);  // underflow flushed
    check(32'h4049_0FDB, 32'h4000_0000, 32'h3FC9_0FDB, 1'b0);  // pi / 2
    for (int i = 0; i < 600; i++) begin
      f32_t x, y;
      x = rand_fp(90, 160);
      y = (i % 2 == 0) ? 32'h4000_0000 : rand_fp(90, 160);
      check(x, y, ref_div(x, y), 1'b0);
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
