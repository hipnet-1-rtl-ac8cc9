// addr_sr: the address shift register of a synapse unit.
//
// Every cycle the feature address at addr_in (with its valid bit) enters a DEPTH-stage
// shift register. Two taps are used: after NEXT_TAP cycles the address is passed to the
// next synapse unit of the neuron (next_addr), and after DEPTH cycles it is the write
// address for the weight update of that feature (upd_addr), so the address never has to
// be broadcast again for the write-back.
// Timing: next_addr(t) = addr_in(t-NEXT_TAP), upd_addr(t) = addr_in(t-DEPTH), likewise for
// the valid bits. Stages reset to invalid. The 3-cycle tap follows the HiPNeT-1 paper; DEPTH = 9
// is the read-to-update delay of this design's pipeline.
module addr_sr #(
  parameter int unsigned W        = 7,
  parameter int unsigned DEPTH    = 9,
  parameter int unsigned NEXT_TAP = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] addr_in,
  input  logic         valid_in,
  output logic [W-1:0] next_addr,
  output logic         next_valid,
  output logic [W-1:0] upd_addr,
  output logic         upd_valid
);

  logic [W-1:0] addr_q  [DEPTH];
  logic         valid_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        addr_q[i]  <= '0;
        valid_q[i] <= 1'b0;
      end
    end else begin
      addr_q[0]  <= addr_in;
      valid_q[0] <= valid_in;
      for (int i = 1; i < DEPTH; i++) begin
        addr_q[i]  <= addr_q[i-1];
        valid_q[i] <= valid_q[i-1];
      end
    end
  end

  assign next_addr  = addr_q[NEXT_TAP-1];
  assign next_valid = valid_q[NEXT_TAP-1];
  assign upd_addr   = addr_q[DEPTH-1];
  assign upd_valid  = valid_q[DEPTH-1];

endmodule
