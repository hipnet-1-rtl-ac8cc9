// fwd_value_sr_tb: shifts in random weights and drives random one-hot selects (or none);
// expects hit when a stage is selected and the value shifted in q+1 cycles earlier for
// select bit q.
`include "tb_common.svh"
module fwd_value_sr_tb;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic [11:0] push_value = '0, hit_value;
  logic [8:0] sel = '0;
  logic hit;
  int checks = 0, failures = 0;
  int pv [N];

  always #5 clk = ~clk;
  fwd_value_sr dut (.clk, .rst_n, .push_value, .sel, .hit, .hit_value);
  `WATCHDOG(clk, 5000)

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < N; t++) begin
      automatic int q = $urandom_range(0, 11);
      pv[t] = $urandom_range(0, 4095);
      push_value = 12'(pv[t]);
      sel = (q < 9 && t - q - 1 >= 0) ? 9'(1 << q) : '0;
      #1;
      `CHECK(hit == (sel != 0), "hit")
      if (sel != 0) `CHECK(int'(hit_value) == pv[t-q-1], $sformatf("t=%0d q=%0d value", t, q))
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
