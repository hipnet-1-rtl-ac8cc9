// hipnet_array: a row of pipelined neuron processors, the top of the design.
//
// The network being trained maps a window of nine vector-quantised speech frames directly
// (no hidden layer) onto one output neuron per phoneme. Output neurons do not interact,
// so each is trained on its own processor, and a few physical processors can be reused
// over the whole output layer. This top places N_NEURONS processors side by side, all
// fed in SIMD fashion by the broadcast signals an array controller would drive:
//   feat_in/feat_valid  one frame's active feature per cycle (sequential speech stream)
//   class_in            the target phoneme of the pattern ending with that frame
//   class_base          number of the output neuron mapped to processor 0; processor k
//                       trains output neuron class_base + k
//   alpha               learning rate 2^-alpha;   fwd_en  enables update forwarding
// A single fwd_match unit keeps the addresses of recent updates for the whole array and
// broadcasts forwarding selects to the synapse units of every processor.
// Each processor learns one pattern per cycle, i.e. ten connection updates per cycle.
// The host port reaches the weight banks and biases of one processor (io_neuron) for
// loading and reading weights while the stream is idle; bank reads return after two
// cycles, bias reads in the same cycle.
// Results per processor: o_out (6-bit output), err_out (o - d), o_valid, dw_out.
// The array organisation follows the HiPNeT-1 paper; N_NEURONS = 4 and the port set are this
// design's choice, the HiPNeT-1 paper giving no neuron count per chip.
module hipnet_array
  import hipnet_pkg::*;
#(
  parameter int unsigned N_NEURONS = 4,
  parameter int unsigned FWD_DEPTH = FWD_WINDOW,
  localparam int unsigned NW       = (N_NEURONS > 1) ? $clog2(N_NEURONS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  feat_t                 feat_in,
  input  logic                  feat_valid,
  input  class_t                class_in,
  input  class_t                class_base,
  input  alpha_t                alpha,
  input  logic                  fwd_en,
  output out_t                  o_out   [N_NEURONS],
  output err_t                  err_out [N_NEURONS],
  output logic [N_NEURONS-1:0]  o_valid,
  output delta_t                dw_out  [N_NEURONS],
  // host access
  input  logic [NW-1:0]         io_neuron,
  input  io_sel_e               io_sel,
  input  logic                  io_we,
  input  logic                  io_re,
  input  feat_t                 io_addr,
  input  weight_t               io_wdata,
  output weight_t               io_rdata,
  output logic                  io_rvalid,
  // observation: update writes (enable, address, data) and forwarding hits, per processor and bank
  output logic [SU_PER_NEURON-1:0] upd_we      [N_NEURONS],
  output logic [SU_PER_NEURON-1:0] upd_fwd_hit [N_NEURONS],
  output feat_t                    upd_addr    [N_NEURONS][SU_PER_NEURON],
  output weight_t                  upd_wdata   [N_NEURONS][SU_PER_NEURON],
  output logic [N_NEURONS-1:0]     bias_upd
);

  // one copy of the forwarding address bookkeeping for the whole array
  logic [FWD_DEPTH-1:0] fwd_sel [SU_PER_NEURON];

  fwd_match #(.DEPTH(FWD_DEPTH)) u_fwd_match (
    .clk        (clk),
    .rst_n      (rst_n),
    .feat_in    (feat_in),
    .feat_valid (feat_valid),
    .fwd_en     (fwd_en),
    .sel        (fwd_sel)
  );

  weight_t n_rdata  [N_NEURONS];
  logic    n_rvalid [N_NEURONS];

  for (genvar j = 0; j < N_NEURONS; j++) begin : g_neuron
    neuron #(.FWD_DEPTH(FWD_DEPTH)) u_neuron (
      .clk         (clk),
      .rst_n       (rst_n),
      .feat_in     (feat_in),
      .feat_valid  (feat_valid),
      .class_in    (class_in),
      .neuron_id   (class_t'(class_base + class_t'(j))),
      .alpha       (alpha),
      .fwd_sel     (fwd_sel),
      .o_out       (o_out[j]),
      .err_out     (err_out[j]),
      .o_valid     (o_valid[j]),
      .dw_out      (dw_out[j]),
      .io_sel      (io_sel),
      .io_we       (io_we && io_neuron == NW'(j)),
      .io_re       (io_re && io_neuron == NW'(j)),
      .io_addr     (io_addr),
      .io_wdata    (io_wdata),
      .io_rdata    (n_rdata[j]),
      .io_rvalid   (n_rvalid[j]),
      .upd_we      (upd_we[j]),
      .upd_fwd_hit (upd_fwd_hit[j]),
      .upd_addr    (upd_addr[j]),
      .upd_wdata   (upd_wdata[j]),
      .bias_upd    (bias_upd[j])
    );
  end

  always_comb begin
    io_rdata  = '0;
    io_rvalid = 1'b0;
    for (int j = 0; j < N_NEURONS; j++) begin
      if (n_rvalid[j]) begin
        io_rdata  = n_rdata[j];
        io_rvalid = 1'b1;
      end
    end
  end

endmodule
