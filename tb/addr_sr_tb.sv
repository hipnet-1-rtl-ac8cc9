// addr_sr_tb: random addresses and valid bits; checks the 3-cycle next-unit tap and the
// 9-cycle update tap against a recorded history, and the reset state.
`include "tb_common.svh"
module addr_sr_tb;
  logic clk = 0, rst_n = 0;
  logic [6:0] addr_in = '0, next_addr, upd_addr;
  logic valid_in = 0, next_valid, upd_valid;
  int checks = 0, failures = 0;
  int ha [2000]; bit hv [2000];

  always #5 clk = ~clk;
  addr_sr dut (.clk, .rst_n, .addr_in, .valid_in, .next_addr, .next_valid, .upd_addr, .upd_valid);
  `WATCHDOG(clk, 5000)

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t >= 3) `CHECK(next_addr == 7'(ha[t-3]) && next_valid == hv[t-3], "next tap")
      else        `CHECK(next_valid == 0, "next tap reset")
      if (t >= 9) `CHECK(upd_addr == 7'(ha[t-9]) && upd_valid == hv[t-9], "update tap")
      else        `CHECK(upd_valid == 0, "update tap reset")
      ha[t] = $urandom_range(0, 127); hv[t] = $urandom_range(0, 1);
      addr_in = 7'(ha[t]); valid_in = hv[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
