// read_weight_sr: the read weight shift register of a synapse unit.
//
// A weight read from the bank for the forward sum is kept here until the accumulated
// update for its feature comes back from the output processor, so the RAM is read only
// once per feature instead of once for the sum and again for the update.
// Timing: w_out(t) = w_in(t-DEPTH); stages reset to zero. DEPTH = 7 is the distance, in
// this design's pipeline, from the read weight appearing on the bank's bus to the cycle
// its update is computed.
module read_weight_sr #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] w_in,
  output logic [W-1:0] w_out
);

  logic [W-1:0] w_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) w_q[i] <= '0;
    end else begin
      w_q[0] <= w_in;
      for (int i = 1; i < DEPTH; i++) w_q[i] <= w_q[i-1];
    end
  end

  assign w_out = w_q[DEPTH-1];

endmodule
