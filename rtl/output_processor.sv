// output_processor: the per-neuron output processor of the pipelined architecture.
//
// It completes the forward sum, turns it into an error and sends one accumulated
// increment per cycle back to the synapse units and to the bias.
//   * Adder tree, two levels: (ps1 + ps2) and (ps3 + bias field) are registered, then
//     added and registered again, giving the full 10-bit sum s.
//   * Sigmoid/error PLA: s is clamped to 6 bits and, together with the desired-output
//     bit, looked up; the error o - d is registered. A pattern that is not valid (its
//     window of frames not yet full) gives error 0 and so changes no weight.
//   * Error chain: two adders form e(t) + e(t-1) + e(t-2), the error of the three
//     patterns a feature stays in one bank, so one add and write per feature suffices.
//   * Alpha unit: shift by the learning constant, sign change and clamp, giving dw_out.
//   * Bias register with its own update adder, updated every third cycle.
// Timing: with partial sums at cycle c, desired/pat_valid must be presented at c+2 (the
// PLA cycle); o_out/err_out are registered at c+3; dw_out (combinational from the chain)
// covers the patterns whose errors were registered in the current and two previous
// cycles. The bias read by the tree at cycle c includes every bias update made before c.
// The units and their order follow the HiPNeT-1 paper; the clamp to 6 bits, the number
// formats and the bias update phase are this design's choice.
module output_processor
  import hipnet_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  psum_t   ps1,
  input  psum_t   ps2,
  input  psum_t   ps3,
  input  logic    desired,
  input  logic    pat_valid,
  input  alpha_t  alpha,
  output delta_t  dw_out,
  // observation of the forward result
  output sum_t    sum_out,
  output out_t    o_out,
  output err_t    err_out,
  output logic    o_valid,
  output logic    bias_upd,
  // host access to the bias
  input  logic    io_bias_we,
  input  weight_t io_wdata,
  output weight_t bias
);

  localparam sum_t XMAX = sum_t'((1 << (FWDW_W-1)) - 1);
  localparam sum_t XMIN = -sum_t'(1 << (FWDW_W-1));

  // ---------------- adder tree ----------------
  logic signed [PSUM_W:0] l1a_q, l1b_q;
  sum_t                   s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a_q <= '0;
      l1b_q <= '0;
      s_q   <= '0;
    end else begin
      l1a_q <= (PSUM_W+1)'(ps1) + (PSUM_W+1)'(ps2);
      l1b_q <= (PSUM_W+1)'(ps3) + (PSUM_W+1)'(wfield(bias));
      s_q   <= SUM_W'(l1a_q) + SUM_W'(l1b_q);
    end
  end

  // ---------------- sigmoid / error PLA ----------------
  logic signed [FWDW_W-1:0] x;
  out_t o;
  err_t err;

  always_comb begin
    if (s_q > XMAX)      x = XMAX[FWDW_W-1:0];
    else if (s_q < XMIN) x = XMIN[FWDW_W-1:0];
    else                 x = s_q[FWDW_W-1:0];
  end

  sigmoid_pla u_pla (.x(x), .desired(desired), .o(o), .err(err));

  err_t e_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q     <= '0;
      o_out   <= '0;
      sum_out <= '0;
      o_valid <= 1'b0;
    end else begin
      e_q     <= pat_valid ? err : '0;
      o_out   <= o;
      sum_out <= s_q;
      o_valid <= pat_valid;
    end
  end

  assign err_out = e_q;

  // ---------------- error accumulation and learning constant ----------------
  esum_t esum;

  sum3_chain #(.W(ERR_W)) u_echain (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (e_q),
    .y     (esum)
  );

  alpha_shifter u_alpha (.esum(esum), .alpha(alpha), .dw(dw_out));

  // ---------------- bias ----------------
  logic [1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              phase_q <= '0;
    else if (phase_q == 2'd2) phase_q <= '0;
    else                     phase_q <= phase_q + 2'd1;
  end

  assign bias_upd = (phase_q == 2'd2);

  bias_unit u_bias (
    .clk       (clk),
    .rst_n     (rst_n),
    .dw        (dw_out),
    .upd_phase (bias_upd),
    .io_we     (io_bias_we),
    .io_wdata  (io_wdata),
    .bias      (bias)
  );

endmodule
