// alpha_shifter_tb: every 9-bit error sum with every shift amount; expected value
// clamp(-floor(esum / 2^alpha), -128, 127).
`include "tb_common.svh"
module alpha_shifter_tb;
  import hipnet_pkg::*;
  esum_t esum; alpha_t alpha; delta_t dw;
  int checks = 0, failures = 0;

  alpha_shifter dut (.esum, .alpha, .dw);

  initial begin
    for (int e = -256; e < 256; e++)
      for (int a = 0; a < 8; a++) begin
        int q, ex;
        esum = esum_t'(e); alpha = alpha_t'(a);
        q = e / (1 << a);
        if (q * (1 << a) != e && e < 0) q--;     // floor division
        ex = -q;
        if (ex > 127) ex = 127;
        if (ex < -128) ex = -128;
        #1;
        `CHECK(int'(dw) == ex, $sformatf("e=%0d a=%0d dw=%0d expected %0d", e, a, dw, ex))
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
