// pbs_delay: a data word and its valid strobe delayed by LAT clock cycles.
// The floating-point operators compute their result in one combinational block
// and pass it through this register chain, so that they present a fixed
// latency of LAT cycles; a synthesis tool may retime the logic across the
// chain.  Only the valid bits are reset (synchronously, active high); the data
// registers are not.  LAT must be at least 1.
module pbs_delay #(
  parameter int unsigned W   = 32,
  parameter int unsigned LAT = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic         out_valid,
  output logic [W-1:0] q
);

  logic [W-1:0] data_q  [LAT];
  logic [LAT-1:0] vld_q;

  always_ff @(posedge clk) begin
    data_q[0] <= d;
    for (int unsigned i = 1; i < LAT; i++) data_q[i] <= data_q[i-1];
  end

  if (LAT == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (rst) vld_q <= '0;
      else     vld_q <= in_valid;
    end
  end else begin : g_chain
    always_ff @(posedge clk) begin
      if (rst) vld_q <= '0;
      else     vld_q <= {vld_q[LAT-2:0], in_valid};
    end
  end

  assign q         = data_q[LAT-1];
  assign out_valid = vld_q[LAT-1];

  initial assert (LAT >= 1) else $error("pbs_delay: LAT must be at least 1");

endmodule
