// fwd_value_sr: the local half of the weight update forwarding scheme, one per
// synapse unit.
//
// A DEPTH-stage shift register of the weights this synapse unit has just written back.
// It shifts in the new updated weight every cycle, at the same time as that weight is
// written to RAM. The broadcast one-hot select from fwd_match names the stage that holds
// the youngest earlier update of the same address; hit goes high and hit_value carries
// that weight, which the update adder then uses instead of the stale read weight.
// The matching addresses are kept once for the whole array (fwd_match), so this unit
// stores values only. Timing: the selection is combinational on the values shifted in
// during the previous DEPTH cycles (stage q holds the value of q+1 cycles ago); the shift
// takes effect on the clock edge. Stages reset to zero. The local multiplexer controlled
// by broadcast signals follows the HiPNeT-1 paper; the one-hot select is this design's.
module fwd_value_sr #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     push_value,
  input  logic [DEPTH-1:0] sel,
  output logic             hit,
  output logic [W-1:0]     hit_value
);

  logic [W-1:0] v_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) v_q[i] <= '0;
    end else begin
      v_q[0] <= push_value;
      for (int i = 1; i < DEPTH; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_comb begin
    hit       = |sel;
    hit_value = '0;
    for (int i = 0; i < DEPTH; i++)
      if (sel[i]) hit_value = hit_value | v_q[i];
  end

endmodule
