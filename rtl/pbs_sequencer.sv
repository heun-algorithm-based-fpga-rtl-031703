// pbs_sequencer: control of the sequential Heun generator.  The generator has
// one step in flight at a time.  While start (the enable) is high, the
// sequencer issues load whenever it is idle or the step in flight finishes in
// this very cycle (step_done), so steps follow back to back with no gap.
// sel tells the multiplexer where to start from: 0 (initial condition) until
// the first step has been loaded after reset, 1 (feedback) from then on.
// When start drops, the step in flight completes and the sequencer waits;
// raising start again continues from the last output.
// load is combinational from start; busy and the started flag are registers,
// reset synchronously (active high).  The generator works strictly one step
// at a time, as specified; reading Start as an enable that pauses and resumes,
// and back-to-back steps, are this design's choice.
module pbs_sequencer (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic step_done,
  output logic load,
  output logic sel,
  output logic busy
);

  typedef enum logic {S_IDLE, S_BUSY} state_e;
  state_e state_q;
  logic   started_q;

  assign load = start && (state_q == S_IDLE || step_done);
  assign sel  = started_q;
  assign busy = (state_q == S_BUSY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= S_IDLE;
      started_q <= 1'b0;
    end else begin
      if (load)           started_q <= 1'b1;
      if (load)           state_q   <= S_BUSY;
      else if (step_done) state_q   <= S_IDLE;
    end
  end

  // A step can only finish while one is in flight.
  assert property (@(posedge clk) disable iff (rst) step_done |-> state_q == S_BUSY);

endmodule
