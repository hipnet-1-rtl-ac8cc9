// synapse_unit: one weight bank of a pipelined neuron and the datapath around it.
//
// Each cycle a feature address enters (feat_in). It is registered and reads the bank's
// weight RAM; the weight appears on the unit's bus two cycles after the feature. From
// the bus the 6 most significant weight bits go into a two-adder chain that adds them
// to the two weights read before, giving the bank's partial sum of the three frames
// that share it (ps_out, registered). The full 12-bit weight goes into the read weight
// shift register, and the address into the address shift register, which also passes
// the address on to the next synapse unit after three cycles (feat_out).
// When the accumulated increment for a feature returns (dw_in, registered on entry), the
// update adder adds it, with saturation, to the weight emerging from the read weight
// shift register, or, when the broadcast forwarding select fwd_sel names one, to a
// younger updated weight of the same address held in the local forwarding register
// (fwd_value_sr); the result is written back to RAM at the address emerging from the address
// shift register, one cycle later through a write register.
// Timing, with the feature of cycle i written a(i):
//   ps_out(c)  = field(w(c-3)) + field(w(c-4)) + field(w(c-5)),  w(i) = RAM[a(i)] read at i+1
//   update for a(i) computed at cycle i+9 with dw_in of cycle i+8, written at the end of i+10
//   feat_out(t) = feat_in(t-3)
// Host access (training stream idle): io_we writes io_wdata at io_addr through the write
// register; io_re reads io_addr through the read port and io_rdata is valid two cycles
// later with io_rvalid. A host write has priority over an update write.
// The structure follows the HiPNeT-1 paper; all latencies and the host port protocol are this
// design's choice.
// Two assertions guard the host port; their reset qualification makes lint report rst_n
// as used both asynchronously (flip-flops) and synchronously (assertions), which is intended.
module synapse_unit
  import hipnet_pkg::*;
#(
  parameter int unsigned FWD_DEPTH = FWD_WINDOW
) (
  input  logic    clk,
  input  logic    rst_n,
  // training stream
  input  feat_t   feat_in,
  input  logic    feat_valid_in,
  output feat_t   feat_out,
  output logic    feat_valid_out,
  output psum_t   ps_out,
  input  delta_t  dw_in,
  input  logic [FWD_DEPTH-1:0] fwd_sel,
  // host access
  input  logic    io_we,
  input  logic    io_re,
  input  feat_t   io_addr,
  input  weight_t io_wdata,
  output weight_t io_rdata,
  output logic    io_rvalid,
  // observation of the update path
  output logic    upd_we,
  output feat_t   upd_addr,
  output weight_t upd_wdata,
  output logic    upd_fwd_hit
);

  // ---------------- forward path ----------------
  feat_t   rd_addr_q;
  weight_t bus;
  logic    re_q1, re_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr_q <= '0;
      re_q1     <= 1'b0;
      re_q2     <= 1'b0;
    end else begin
      rd_addr_q <= io_re ? io_addr : feat_in;
      re_q1     <= io_re;
      re_q2     <= re_q1;
    end
  end

  logic    wr_en_q;
  feat_t   wr_addr_q;
  weight_t wr_data_q;

  weight_ram #(.DEPTH(N_WORDS), .WIDTH(WEIGHT_W)) u_ram (
    .clk     (clk),
    .rd_addr (rd_addr_q),
    .rd_data (bus),
    .wr_en   (wr_en_q),
    .wr_addr (wr_addr_q),
    .wr_data (wr_data_q)
  );

  logic signed [PSUM_W-1:0] chain_y;

  sum3_chain #(.W(FWDW_W)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (wfield(bus)),
    .y     (chain_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ps_out <= '0;
    else        ps_out <= chain_y;
  end

  assign io_rdata  = bus;
  assign io_rvalid = re_q2;

  // ---------------- update path ----------------
  feat_t   ua;
  logic    uv;
  weight_t rw;

  addr_sr #(.W(FEAT_W), .DEPTH(UPD_DELAY), .NEXT_TAP(SU_STEP)) u_addr_sr (
    .clk        (clk),
    .rst_n      (rst_n),
    .addr_in    (feat_in),
    .valid_in   (feat_valid_in),
    .next_addr  (feat_out),
    .next_valid (feat_valid_out),
    .upd_addr   (ua),
    .upd_valid  (uv)
  );

  read_weight_sr #(.W(WEIGHT_W), .DEPTH(RW_DELAY)) u_rw_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .w_in  (bus),
    .w_out (rw)
  );

  delta_t  dw_q;
  logic    fwd_hit;
  weight_t fwd_val;
  weight_t base;
  weight_t new_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dw_q <= '0;
    else        dw_q <= dw_in;
  end

  fwd_value_sr #(.W(WEIGHT_W), .DEPTH(FWD_DEPTH)) u_fwd (
    .clk        (clk),
    .rst_n      (rst_n),
    .push_value (new_w),
    .sel        (fwd_sel),
    .hit        (fwd_hit),
    .hit_value  (fwd_val)
  );

  always_comb begin
    base  = fwd_hit ? fwd_val : rw;
    new_w = sat_weight_add(base, dw_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en_q   <= 1'b0;
      wr_addr_q <= '0;
      wr_data_q <= '0;
    end else if (io_we) begin
      wr_en_q   <= 1'b1;
      wr_addr_q <= io_addr;
      wr_data_q <= io_wdata;
    end else begin
      wr_en_q   <= uv;
      wr_addr_q <= ua;
      wr_data_q <= new_w;
    end
  end

  assign upd_we      = uv;
  assign upd_addr    = ua;
  assign upd_wdata   = new_w;
  assign upd_fwd_hit = uv && fwd_hit;

  // Host transfers share the ports used by training; they must not meet a live stream.
  a_io_vs_stream: assert property (@(posedge clk) disable iff (!rst_n)
    !((io_we || io_re) && (feat_valid_in || uv)))
    else $error("host access while the training stream is active");
  a_io_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(io_we && io_re))
    else $error("host read and write in the same cycle");

endmodule
