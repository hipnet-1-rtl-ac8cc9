// bias_unit: the bias register of the output processor with its own update adder.
//
// The bias is an input that is on in every pattern, so it needs no RAM: a 12-bit
// register whose 6 most significant bits feed the forward adder tree. Its update adder
// adds the accumulated increment dw (the sum over three consecutive patterns) with
// saturation once every third cycle, when upd_phase is high, which adds each pattern's
// increment to the bias exactly once. The host can load the register (io_we) and read it
// (bias output) while training is idle.
// Timing: the update and the host load take effect on the clock edge; the host load has
// priority. Resets to zero. A separate bias register and adder follow the HiPNeT-1 paper; the
// every-third-cycle update is this design's reading of how the accumulated increment is
// used for the bias.
module bias_unit
  import hipnet_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  delta_t  dw,
  input  logic    upd_phase,
  input  logic    io_we,
  input  weight_t io_wdata,
  output weight_t bias
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bias <= '0;
    else if (io_we)     bias <= io_wdata;
    else if (upd_phase) bias <= sat_weight_add(bias, dw);
  end

endmodule
