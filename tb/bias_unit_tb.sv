// bias_unit_tb: host loads, phase-gated saturating updates with random increments,
// including runs into both clamp limits.
`include "tb_common.svh"
module bias_unit_tb;
  import hipnet_pkg::*;
  logic clk = 0, rst_n = 0;
  delta_t dw = '0; logic upd_phase = 0, io_we = 0; weight_t io_wdata = '0, bias;
  int checks = 0, failures = 0, model = 0, sat_hi = 0, sat_lo = 0;

  always #5 clk = ~clk;
  bias_unit dut (.clk, .rst_n, .dw, .upd_phase, .io_we, .io_wdata, .bias);
  `WATCHDOG(clk, 10000)

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int d;
      @(negedge clk);
      `CHECK(int'(bias) == model, $sformatf("t=%0d bias %0d vs %0d", t, bias, model))
      d = (t % 1000 < 500) ? $urandom_range(0, 127) : -$urandom_range(0, 128);
      dw = delta_t'(d); upd_phase = ($urandom_range(0, 2) == 0); io_we = ($urandom_range(0, 199) == 0);
      io_wdata = weight_t'($urandom_range(0, 4095));
      if (io_we) model = int'(io_wdata);
      else if (upd_phase) begin
        model += d;
        if (model > 2047) begin model = 2047; sat_hi++; end
        if (model < -2048) begin model = -2048; sat_lo++; end
      end
    end
    `CHECK(sat_hi > 0 && sat_lo > 0, "both clamps exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
