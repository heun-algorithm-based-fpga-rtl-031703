// tb_pbs_f_stage: self-checking testbench of the f stage, f(x,y,z) = (y, z, -a x - b y - c z - x^2)
// with a = 1, b = 1.1, c = 0.4.
// Random vectors enter one per clock (with gaps); each output vector is
// compared bit for bit with the reference model and its latency with 24
// cycles, and no output may appear without an input.
module tb_pbs_f_stage;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 24;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  vec_t va = '0, vb = '0, res;
  int   checks = 0, failures = 0, cycle = 0;

  typedef struct { vec_t e; int t; } pend_t;
  pend_t q[$];

  pbs_f_stage #(.ADD_LAT(8), .MUL_LAT(8)) dut (.clk, .rst, .in_valid, .p(va), .out_valid, .f(res));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (!rst && out_valid) begin
    pend_t p;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected out_valid");
    end else begin
      p = q.pop_front();
      if (res !== p.e || cycle - p.t != int'(LAT)) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h latency %0d", res, p.e, cycle - p.t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 1500; i++) begin
      vec_t x, y;
      x = '{x: rand_small(5), y: rand_small(5), z: rand_small(5)};
      y = '{x: rand_small(5), y: rand_small(5), z: rand_small(5)};
      if (i == 0) x.y = 32'h0;
      va <= x; vb <= y;
      in_valid <= (i % 7 != 3);
      if (i % 7 != 3) q.push_back('{e: ref_f(x, 32'h3F80_0000, 32'h3F8C_CCCD, 32'h3ECC_CCCD), t: cycle + 1});
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
