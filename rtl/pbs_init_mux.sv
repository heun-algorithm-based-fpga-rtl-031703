// pbs_init_mux: the multiplexer in front of the generator unit.  It chooses
// where the next Heun step starts from: the initial condition for the first
// step after reset (sel = 0), the generator's own last output for every later
// step (sel = 1).  The chosen point is registered on load and held as
// x(n), y(n), z(n) for the whole step, because both the f0 stage and the
// corrector adder need it.  state_valid is a one-cycle pulse one clock after
// load, which starts the arithmetic.  Reset (synchronous, active high)
// clears the held point and the strobe.  Choosing between initial condition
// and feedback follows the generator's block structure; holding the point in
// a register and the reset behaviour are this design's choice.
module pbs_init_mux
  import pbs_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     load,
  input  logic     sel,
  input  pbs_vec_t init,
  input  pbs_vec_t fb,
  output pbs_vec_t state,
  output logic     state_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= '0;
      state_valid <= 1'b0;
    end else begin
      state_valid <= load;
      if (load) state <= sel ? fb : init;
    end
  end

endmodule
