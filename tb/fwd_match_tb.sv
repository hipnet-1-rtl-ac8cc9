// fwd_match_tb: random feature stream from a small alphabet with gaps. For each bank k
// the expected select at cycle u is the one-hot position q-1 of the youngest q in 1..9
// for which bank k's update address of cycle u-q (the feature of cycle u-q-9-3k, valid)
// equals that of cycle u, and zero when there is none, when the update is not valid, or
// when fwd_en is low.
`include "tb_common.svh"
module fwd_match_tb;
  import hipnet_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  feat_t feat_in = '0; logic feat_valid = 0, fwd_en = 0;
  logic [8:0] sel [3];
  int checks = 0, failures = 0, hits = 0;
  int f [N]; bit v [N]; bit en [N];

  always #5 clk = ~clk;
  fwd_match dut (.clk, .rst_n, .feat_in, .feat_valid, .fwd_en, .sel);
  `WATCHDOG(clk, 5000)

  function automatic bit ok(int i); return i >= 0 && v[i]; endfunction

  initial begin
    for (int t = 0; t < N; t++) begin
      f[t] = $urandom_range(0, 9); v[t] = ($urandom_range(0, 7) != 0); en[t] = (t % 1000) < 800;
    end
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < N; t++) begin
      feat_in = feat_t'(f[t]); feat_valid = v[t]; fwd_en = en[t];
      #1;
      for (int k = 0; k < 3; k++) begin
        automatic logic [8:0] ex = '0;
        automatic int i = t - 9 - 3*k;     // feature updated by bank k at cycle t
        if (en[t] && ok(i))
          for (int q = 1; q <= 9; q++)
            if (ok(i - q) && f[i-q] == f[i]) begin ex[q-1] = 1'b1; break; end
        if (ex != 0) hits++;
        `CHECK(sel[k] == ex, $sformatf("t=%0d bank %0d sel %b expected %b", t, k, sel[k], ex))
      end
      @(negedge clk);
    end
    `CHECK(hits > 0, "matches exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
