// sigmoid_pla_tb: all 64 input codes with both desired values; the expected output is
// computed with $exp as min(63, round(64 / (1 + exp(-x/4)))), the error as o - 64*d.
`include "tb_common.svh"
module sigmoid_pla_tb;
  import hipnet_pkg::*;
  logic signed [5:0] x;
  logic desired;
  out_t o;
  err_t err;
  int checks = 0, failures = 0;

  sigmoid_pla dut (.x, .desired, .o, .err);

  initial begin
    for (int s = -32; s < 32; s++)
      for (int d = 0; d < 2; d++) begin
        real y; int eo;
        x = 6'(s); desired = d[0];
        y = 64.0 / (1.0 + $exp(-real'(s) / 4.0));
        eo = int'($floor(y + 0.5));
        if (eo > 63) eo = 63;
        #1;
        `CHECK(int'(o) == eo, $sformatf("x=%0d o=%0d expected %0d", s, o, eo))
        `CHECK(int'(err) == eo - 64*d, $sformatf("x=%0d d=%0d err=%0d", s, d, err))
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
