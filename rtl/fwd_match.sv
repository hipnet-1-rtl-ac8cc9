// fwd_match: the shared address half of the weight update forwarding scheme.
//
// Every neuron of the array sees the same feature stream, so the addresses of the
// weight updates in flight are the same in all of them, and bank k of a neuron sees the
// addresses of bank 0 delayed by 3k cycles. One copy of the address bookkeeping
// therefore serves the whole array. This unit delays the broadcast feature stream to
// the update point of bank 0 (UPD_DELAY cycles), keeps the last DEPTH update addresses
// in a shift register, and compares the address of the current update with all of them.
// The youngest match becomes a one-hot select (bit q: the update made q+1 cycles ago).
// The select is delayed by STEP and 2*STEP cycles for banks 1 and 2 and broadcast,
// gated by fwd_en, to the local multiplexers of every synapse unit (fwd_value_sr), which
// hold the matching updated weight values.
// Timing: sel[k] at cycle u belongs to the update that bank k computes at cycle u.
// Registers reset to empty. Sharing the address copy across the array and the broadcast
// selects follow the HiPNeT-1 paper; the one-hot encoding and DEPTH = 9 (the whole
// read-to-write window of this pipeline, so no update is lost) are this design's choice.
module fwd_match
  import hipnet_pkg::*;
#(
  parameter int unsigned DEPTH = FWD_WINDOW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  feat_t            feat_in,
  input  logic             feat_valid,
  input  logic             fwd_en,
  output logic [DEPTH-1:0] sel [SU_PER_NEURON]
);

  localparam int unsigned HIST = (SU_PER_NEURON - 1) * SU_STEP;

  // bank 0 update address: the feature stream delayed to the update point
  feat_t ua;
  logic  upd_valid;
  feat_t na_unused;
  logic  nv_unused;

  addr_sr #(.W(FEAT_W), .DEPTH(UPD_DELAY), .NEXT_TAP(SU_STEP)) u_delay (
    .clk        (clk),
    .rst_n      (rst_n),
    .addr_in    (feat_in),
    .valid_in   (feat_valid),
    .next_addr  (na_unused),
    .next_valid (nv_unused),
    .upd_addr   (ua),
    .upd_valid  (upd_valid)
  );

  // addresses of the last DEPTH updates of bank 0
  feat_t a_q [DEPTH];
  logic  v_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        a_q[i] <= '0;
        v_q[i] <= 1'b0;
      end
    end else begin
      a_q[0] <= ua;
      v_q[0] <= upd_valid;
      for (int i = 1; i < DEPTH; i++) begin
        a_q[i] <= a_q[i-1];
        v_q[i] <= v_q[i-1];
      end
    end
  end

  // associative search, youngest match first
  logic [DEPTH-1:0] sel0;

  always_comb begin
    sel0 = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (upd_valid && v_q[i] && a_q[i] == ua) begin
        sel0    = '0;
        sel0[i] = 1'b1;
      end
    end
  end

  // selects for the later banks
  logic [DEPTH-1:0] sel_q [HIST];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) sel_q[i] <= '0;
    end else begin
      sel_q[0] <= sel0;
      for (int i = 1; i < HIST; i++) sel_q[i] <= sel_q[i-1];
    end
  end

  always_comb begin
    sel[0] = fwd_en ? sel0 : '0;
    for (int k = 1; k < SU_PER_NEURON; k++)
      sel[k] = fwd_en ? sel_q[k*SU_STEP-1] : '0;
  end

endmodule
