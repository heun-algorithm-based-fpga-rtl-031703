// tb_pbs_sequencer: self-checking testbench of the sequencer.  A small model
// of the generator answers each load with step_done a random number of
// cycles later; the testbench checks, cycle by cycle, that load is issued
// exactly when start is high and the generator is idle or finishing, that sel
// is 0 only until the first load after reset, that busy follows the steps,
// and that dropping start pauses the chain and raising it resumes it.
module tb_pbs_sequencer;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, step_done = 1'b0, load, sel, busy;
  int   checks = 0, failures = 0, loads = 0, resumes = 0;
  logic m_busy = 1'b0, m_started = 1'b0;
  int   remain = 0;

  pbs_sequencer dut (.clk, .rst, .start, .step_done, .load, .sel, .busy);

  always #5 clk = ~clk;

  // generator model: step_done 'remain' cycles after a load
  always @(posedge clk) begin
    if (rst) begin
      step_done <= 1'b0;
      remain    <= 0;
    end else begin
      step_done <= 1'b0;
      if (load) remain <= 2 + int'($urandom_range(6));
      else if (remain > 0) begin
        remain <= remain - 1;
        if (remain == 1) step_done <= 1'b1;
      end
    end
  end

  // reference of the expected outputs, checked every cycle
  always @(negedge clk) if (!rst) begin
    logic e_load;
    e_load = start && (!m_busy || step_done);
    checks++;
    if (load !== e_load || sel !== m_started || busy !== m_busy) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t load %b/%b sel %b/%b busy %b/%b", $time, load, e_load, sel, m_started, busy, m_busy);
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      m_busy    <= 1'b0;
      m_started <= 1'b0;
    end else begin
      if (load) begin
        loads++;
        m_started <= 1'b1;
        m_busy    <= 1'b1;
        if (!m_busy && m_started) resumes++;
      end else if (step_done) m_busy <= 1'b0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5) @(negedge clk);           // idle without start: no load
    for (int i = 0; i < 40; i++) begin
      start = 1'b1;
      repeat (5 + $urandom_range(40)) @(negedge clk);
      start = 1'b0;
      repeat (1 + $urandom_range(15)) @(negedge clk);
    end
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    start = 1'b1;
    repeat (20) @(negedge clk);
    checks++;
    if (loads < 50 || resumes < 5) begin
      failures++;
      $display("FAIL too few loads (%0d) or resumes (%0d)", loads, resumes);
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
