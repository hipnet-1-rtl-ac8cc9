// read_weight_sr_tb: random 12-bit words; checks the 7-cycle delay and the reset state.
`include "tb_common.svh"
module read_weight_sr_tb;
  logic clk = 0, rst_n = 0;
  logic [11:0] w_in = '0, w_out;
  int checks = 0, failures = 0;
  int hw [2000];

  always #5 clk = ~clk;
  read_weight_sr dut (.clk, .rst_n, .w_in, .w_out);
  `WATCHDOG(clk, 5000)

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t >= 7) `CHECK(w_out == 12'(hw[t-7]), $sformatf("delay t=%0d", t))
      else        `CHECK(w_out == 0, "reset state")
      hw[t] = $urandom_range(0, 4095); w_in = 12'(hw[t]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
