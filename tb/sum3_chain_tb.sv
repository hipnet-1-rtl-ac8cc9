// sum3_chain_tb: random signed samples, including the extremes; checks
// y(t) = x(t) + x(t-1) + x(t-2) every cycle (earlier samples count as zero after reset).
`include "tb_common.svh"
module sum3_chain_tb;
  logic clk = 0, rst_n = 0;
  logic signed [5:0] x = '0;
  logic signed [7:0] y;
  int checks = 0, failures = 0;
  int hx [2000];

  always #5 clk = ~clk;
  sum3_chain #(.W(6)) dut (.clk, .rst_n, .x, .y);
  `WATCHDOG(clk, 5000)

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int ex;
      case ($urandom_range(0, 5))
        0: hx[t] = -32;
        1: hx[t] = 31;
        default: hx[t] = $urandom_range(0, 63) - 32;
      endcase
      x = 6'(hx[t]);
      #1;
      ex = hx[t] + ((t >= 1) ? hx[t-1] : 0) + ((t >= 2) ? hx[t-2] : 0);
      `CHECK(int'(y) == ex, $sformatf("t=%0d y=%0d expected %0d", t, y, ex))
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
