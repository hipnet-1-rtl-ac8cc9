// weight_ram_tb: random reads and writes against a shadow array, one of each per cycle,
// including same-address collisions (a read returns the data before the write) and a
// one-cycle read latency.
`include "tb_common.svh"
module weight_ram_tb;
  logic clk = 0;
  logic [6:0]  rd_addr = '0, wr_addr = '0;
  logic [11:0] rd_data, wr_data = '0;
  logic        wr_en = 0;
  int checks = 0, failures = 0, collisions = 0;
  logic [11:0] shadow [128];
  logic [11:0] expect_q;

  always #5 clk = ~clk;
  weight_ram dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
  `WATCHDOG(clk, 5000)

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 7'(i); wr_data = 12'($urandom); shadow[i] = wr_data;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t > 0) `CHECK(rd_data == expect_q, $sformatf("read %0h vs %0h", rd_data, expect_q))
      rd_addr = 7'($urandom);
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : 7'($urandom);
      wr_data = 12'($urandom);
      expect_q = shadow[rd_addr];
      if (wr_en && wr_addr == rd_addr) collisions++;
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    `CHECK(collisions > 0, "collision case exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
