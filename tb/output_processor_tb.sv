// output_processor_tb: random partial sums, desired bits, pattern-valid bits and learning
// constants. Expected: the sum of cycle c's partial sums and the bias field as it stood at
// c appears at o_out/err_out at c+3, its sigmoid computed with $exp on the sum clamped
// to -32..31; the increment at cycle t is clamp(-((e(t) + e(t-1) + e(t-2)) >>> alpha))
// over the errors registered at t, t-1, t-2; the bias takes that increment whenever the
// phase counter (cycles since reset mod 3) is 2. Host bias load and read are checked.
`include "tb_common.svh"
module output_processor_tb;
  import hipnet_pkg::*;
  import hipnet_ref_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  psum_t ps1 = '0, ps2 = '0, ps3 = '0; logic desired = 0, pat_valid = 0, o_valid, bias_upd, io_bias_we = 0;
  alpha_t alpha = '0; delta_t dw_out; sum_t sum_out; out_t o_out; err_t err_out;
  weight_t io_wdata = '0, bias;
  int checks = 0, failures = 0, n_sat = 0, n_dsat = 0;

  always #5 clk = ~clk;
  output_processor dut (.clk, .rst_n, .ps1, .ps2, .ps3, .desired, .pat_valid, .alpha, .dw_out,
    .sum_out, .o_out, .err_out, .o_valid, .bias_upd, .io_bias_we, .io_wdata, .bias);
  `WATCHDOG(clk, 10000)

  int p1 [N]; int p2 [N]; int p3 [N]; bit dd [N]; bit vv [N]; int aa [N];
  int B [N+1]; int S [N]; int E [N]; int O [N]; int D [N];

  initial begin
    @(negedge clk); rst_n = 1;
    // host load of the bias in cycle 0 after reset; the stream starts two cycles later
    io_bias_we = 1; io_wdata = weight_t'(-300);
    @(negedge clk); io_bias_we = 0;
    `CHECK(int'(bias) == -300, "bias load")
    B[0] = -300;
    for (int t = 0; t < N; t++) begin
      automatic int big = ($urandom_range(0, 3) == 0);
      p1[t] = big ? 127 : $urandom_range(0, 255) - 128;
      p2[t] = big ? 127 : $urandom_range(0, 80) - 40;
      p3[t] = $urandom_range(0, 80) - 40;
      dd[t] = $urandom_range(0, 1); vv[t] = ($urandom_range(0, 5) != 0); aa[t] = $urandom_range(0, 3);
    end
    // the PLA of stream cycles 0 and 1 still sees sums from before the stream
    vv[0] = 0; vv[1] = 0;
    for (int t = 0; t < N; t++) begin
      int es, phase;
      // model of cycle t (stream cycle t is cycle t+2 after reset)
      S[t] = p1[t] + p2[t] + p3[t] + (B[t] >>> 6);
      if (t >= 3) begin
        automatic int c = t - 3;   // sum of cycle c reaches the PLA at c+2 and the outputs at c+3
        O[c] = sigmoid_o(S[c]);
        E[c] = vv[c+2] ? O[c] - (dd[c+2] ? 64 : 0) : 0;
        if (S[c] > 31 || S[c] < -32) n_sat++;
      end
      es = 0;
      for (int j = 3; j <= 5; j++) if (t - j >= 0) es += E[t-j];
      D[t] = alpha_dw(es, aa[t]);
      if (D[t] != -(es >>> aa[t])) n_dsat++;
      phase = (t + 2) % 3;
      B[t+1] = (phase == 2) ? clampi(B[t] + D[t], -2048, 2047) : B[t];
      @(negedge clk);
      if (t >= 3) begin
        `CHECK(int'(o_out) == O[t-3], $sformatf("o t=%0d: %0d vs %0d", t, o_out, O[t-3]))
        `CHECK(int'(err_out) == E[t-3], $sformatf("err t=%0d: %0d vs %0d", t, err_out, E[t-3]))
      end
      `CHECK(int'(bias) == B[t], $sformatf("bias t=%0d: %0d vs %0d", t, bias, B[t]))
      ps1 = psum_t'(p1[t]); ps2 = psum_t'(p2[t]); ps3 = psum_t'(p3[t]);
      desired = dd[t]; pat_valid = vv[t]; alpha = alpha_t'(aa[t]);
      #1;
      `CHECK(int'(dw_out) == D[t], $sformatf("dw t=%0d: %0d vs %0d", t, dw_out, D[t]))
    end
    `CHECK(n_sat > 0 && n_dsat > 0, "sum and increment clamps exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
