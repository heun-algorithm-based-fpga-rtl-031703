// tb_pbs_init_mux: self-checking testbench of the initial-condition
// multiplexer.  Checks that reset clears the held point, that load with
// sel = 0 captures the initial condition and with sel = 1 the feedback, that
// the point holds while load is low whatever the inputs do, and that
// state_valid is a one-cycle pulse one clock after load.
module tb_pbs_init_mux;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, load = 1'b0, sel = 1'b0, state_valid;
  vec_t init = '0, fb = '0, state;
  int   checks = 0, failures = 0;

  pbs_init_mux dut (.clk, .rst, .load, .sel, .init, .fb, .state, .state_valid);

  always #5 clk = ~clk;

  task automatic expect_state(input vec_t e, input logic ev, input string what);
    checks++;
    if (state !== e || state_valid !== ev) begin
      failures++;
      $display("FAIL %s: state %h valid %b, expected %h %b", what, state, state_valid, e, ev);
    end
  endtask

  initial begin
    vec_t i0, f0;
    init <= '{x: 32'h3DCC_CCCD, y: 32'h0, z: 32'h0};
    fb   <= '{x: 32'h1111_1111, y: 32'h2222_2222, z: 32'h3333_3333};
    repeat (3) @(posedge clk);
    #1 expect_state('0, 1'b0, "after reset");
    rst <= 1'b0;
    for (int i = 0; i < 200; i++) begin
      i0 = '{x: $urandom, y: $urandom, z: $urandom};
      f0 = '{x: $urandom, y: $urandom, z: $urandom};
      @(negedge clk);
      init = i0; fb = f0; sel = 1'($urandom); load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      expect_state(sel ? f0 : i0, 1'b1, "after load");
      init = '{x: $urandom, y: $urandom, z: $urandom};
      fb   = '{x: $urandom, y: $urandom, z: $urandom};
      repeat (1 + $urandom_range(3)) @(negedge clk);
      expect_state(sel ? f0 : i0, 1'b0, "holding");
    end
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    expect_state('0, 1'b0, "reset again");
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
