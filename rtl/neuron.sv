// neuron: one pipelined output-neuron processor that learns one pattern per cycle.
//
// A training pattern is a window of nine vector-quantised speech frames, each given as
// the address of its single active feature. The frames form three groups of three
// (past, present, future); the three frames of a group share one bank of weights.
// The neuron therefore has three synapse units, one per bank, in a chain: the feature
// stream enters the first unit one frame per cycle, and each unit hands every address
// to the next one three cycles later. Each unit delivers the sum of its three frames'
// weights every cycle; the output processor adds the three partial sums and the bias,
// forms the output and error, and returns one accumulated increment per cycle that all
// three units and the bias apply. All 15 adders are busy every cycle.
// The desired output is decoded here: it is 1 when the broadcast target class equals
// this neuron's number. The target given with a feature labels the pattern whose newest
// frame is that feature; a pattern is valid once the nine frames in it were all valid.
// Timing: for a pattern whose newest frame enters at cycle n, o_out/err_out appear at
// n+6; its increment reaches the weights of its frames through the update pipeline and
// the weight of the frame entering at cycle i is written at the end of cycle i+10 (first
// bank; later banks three and six cycles later). One pattern is accepted every cycle.
// Update forwarding is controlled from outside: fwd_sel[k] is the broadcast select for
// bank k from the array's shared fwd_match unit (all zero: no forwarding).
// Host access selects a bank or the bias with io_sel (see hipnet_pkg::io_sel_e); reads
// return after two cycles (banks) or at once (bias, io_rvalid in the same cycle).
// The organisation follows the HiPNeT-1 paper; latencies, the validity rule and the host
// port are this design's choice.
module neuron
  import hipnet_pkg::*;
#(
  parameter int unsigned FWD_DEPTH = FWD_WINDOW
) (
  input  logic    clk,
  input  logic    rst_n,
  input  feat_t   feat_in,
  input  logic    feat_valid,
  input  class_t  class_in,
  input  class_t  neuron_id,
  input  alpha_t  alpha,
  input  logic [FWD_DEPTH-1:0] fwd_sel [SU_PER_NEURON],
  // results
  output out_t    o_out,
  output err_t    err_out,
  output logic    o_valid,
  output delta_t  dw_out,
  // host access
  input  io_sel_e io_sel,
  input  logic    io_we,
  input  logic    io_re,
  input  feat_t   io_addr,
  input  weight_t io_wdata,
  output weight_t io_rdata,
  output logic    io_rvalid,
  // observation
  output logic [SU_PER_NEURON-1:0] upd_we,
  output logic [SU_PER_NEURON-1:0] upd_fwd_hit,
  output feat_t                    upd_addr [SU_PER_NEURON],
  output weight_t                  upd_wdata [SU_PER_NEURON],
  output logic                     bias_upd
);

  localparam int unsigned WIN = SU_PER_NEURON * SU_STEP;   // 9 frames per pattern

  // ---------------- pattern validity and desired output ----------------
  logic [WIN-2:0]       vhist_q;
  logic [PLA_DELAY-1:0] pv_q;
  logic [PLA_DELAY-1:0] d_q;
  logic                 pat_valid_now;

  assign pat_valid_now = feat_valid && (&vhist_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vhist_q <= '0;
      pv_q    <= '0;
      d_q     <= '0;
    end else begin
      vhist_q <= {vhist_q[WIN-3:0], feat_valid};
      pv_q    <= {pv_q[PLA_DELAY-2:0], pat_valid_now};
      d_q     <= {d_q[PLA_DELAY-2:0], class_in == neuron_id};
    end
  end

  // ---------------- synapse units ----------------
  feat_t   su_feat  [SU_PER_NEURON+1];
  logic    su_valid [SU_PER_NEURON+1];
  psum_t   ps       [SU_PER_NEURON];
  weight_t su_rdata [SU_PER_NEURON];
  logic    su_rvalid[SU_PER_NEURON];

  assign su_feat[0]  = feat_in;
  assign su_valid[0] = feat_valid;

  for (genvar k = 0; k < SU_PER_NEURON; k++) begin : g_su
    synapse_unit #(.FWD_DEPTH(FWD_DEPTH)) u_su (
      .clk            (clk),
      .rst_n          (rst_n),
      .feat_in        (su_feat[k]),
      .feat_valid_in  (su_valid[k]),
      .feat_out       (su_feat[k+1]),
      .feat_valid_out (su_valid[k+1]),
      .ps_out         (ps[k]),
      .dw_in          (dw_out),
      .fwd_sel        (fwd_sel[k]),
      .io_we          (io_we && io_sel == io_sel_e'(k)),
      .io_re          (io_re && io_sel == io_sel_e'(k)),
      .io_addr        (io_addr),
      .io_wdata       (io_wdata),
      .io_rdata       (su_rdata[k]),
      .io_rvalid      (su_rvalid[k]),
      .upd_we         (upd_we[k]),
      .upd_addr       (upd_addr[k]),
      .upd_wdata      (upd_wdata[k]),
      .upd_fwd_hit    (upd_fwd_hit[k])
    );
  end

  // ---------------- output processor ----------------
  weight_t bias;
  sum_t    sum_unused;

  output_processor u_op (
    .clk        (clk),
    .rst_n      (rst_n),
    .ps1        (ps[0]),
    .ps2        (ps[1]),
    .ps3        (ps[2]),
    .desired    (d_q[PLA_DELAY-1]),
    .pat_valid  (pv_q[PLA_DELAY-1]),
    .alpha      (alpha),
    .dw_out     (dw_out),
    .sum_out    (sum_unused),
    .o_out      (o_out),
    .err_out    (err_out),
    .o_valid    (o_valid),
    .bias_upd   (bias_upd),
    .io_bias_we (io_we && io_sel == IO_BIAS),
    .io_wdata   (io_wdata),
    .bias       (bias)
  );

  // ---------------- host read-back ----------------
  always_comb begin
    io_rdata  = '0;
    io_rvalid = 1'b0;
    for (int k = 0; k < SU_PER_NEURON; k++) begin
      if (su_rvalid[k]) begin
        io_rdata  = su_rdata[k];
        io_rvalid = 1'b1;
      end
    end
    if (io_re && io_sel == IO_BIAS) begin
      io_rdata  = bias;
      io_rvalid = 1'b1;
    end
  end

endmodule
