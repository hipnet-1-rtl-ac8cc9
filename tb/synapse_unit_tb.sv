// synapse_unit_tb: one synapse unit on its own. Loads the bank through the host port,
// then streams random features (small alphabet, many repeats) with random increments at
// dw_in, and checks every cycle the partial sum, the 3-cycle feature hand-over and each
// update write (address and data), then reads the bank back. The expected values come
// from these rules: the weight read for the feature of cycle i includes all updates
// computed before i; ps(c) sums the 6-bit fields of the reads of cycles c-3..c-5; the
// feature of cycle u-9 is updated at cycle u with the increment given at u-1, starting
// from its read weight or, with forwarding, from the youngest update of the same address
// in the last 9 cycles, whose position the testbench drives on the one-hot fwd_sel. Runs with forwarding on and off.
`include "tb_common.svh"
module synapse_unit_tb;
  import hipnet_pkg::*;
  localparam int N = 800;
  logic clk = 0, rst_n = 0;
  feat_t feat_in = '0, feat_out, io_addr = '0, upd_addr;
  logic feat_valid_in = 0, feat_valid_out, io_we = 0, io_re = 0, io_rvalid, upd_we, upd_fwd_hit;
  logic [8:0] fwd_sel = '0;
  psum_t ps_out; delta_t dw_in = '0; weight_t io_wdata = '0, io_rdata, upd_wdata;
  int checks = 0, failures = 0, n_fwd = 0, n_sat = 0;

  always #5 clk = ~clk;
  synapse_unit dut (.clk, .rst_n, .feat_in, .feat_valid_in, .feat_out, .feat_valid_out,
    .ps_out, .dw_in, .fwd_sel, .io_we, .io_re, .io_addr, .io_wdata, .io_rdata, .io_rvalid,
    .upd_we, .upd_addr, .upd_wdata, .upd_fwd_hit);
  `WATCHDOG(clk, 20000)

  function automatic int fld(int w); return w >>> 6; endfunction

  task automatic run(bit fwd);
    int M [128]; int f [N]; bit v [N]; int d [N]; int r [N];
    int ha [N]; int hv [N]; bit hok [N]; logic [8:0] sel [N];
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int w = 0; w < 128; w++) begin
      M[w] = (w < 4) ? 2000 : $urandom_range(0, 4095) - 2048;
      @(negedge clk); io_we = 1; io_addr = feat_t'(w); io_wdata = weight_t'(M[w]);
    end
    @(negedge clk); io_we = 0;
    repeat (12) @(negedge clk);
    for (int t = 0; t < N; t++) begin
      f[t] = ($urandom_range(0, 2) == 0 && t > 0) ? f[t-1] : $urandom_range(0, 11);
      v[t] = (t < N - 20) && ($urandom_range(0, 9) != 0);
      d[t] = (f[t] < 4) ? 100 : $urandom_range(0, 255) - 128;
    end
    for (int t = 0; t < N; t++) begin
      // model for cycle t
      r[t] = M[f[t]];
      hok[t] = 0;
      sel[t] = '0;
      if (t >= 9 && v[t-9]) begin
        int base, nw;
        base = r[t-9];
        if (fwd)
          for (int q = 1; q <= 9; q++)
            if (hok[t-q] && ha[t-q] == f[t-9]) begin base = hv[t-q]; sel[t][q-1] = 1'b1; n_fwd++; break; end
        nw = base + ((t >= 1) ? d[t-1] : 0);
        if (nw > 2047) begin nw = 2047; n_sat++; end
        if (nw < -2048) begin nw = -2048; n_sat++; end
        M[f[t-9]] = nw; hok[t] = 1; ha[t] = f[t-9]; hv[t] = nw;
      end
      @(negedge clk);
      fwd_sel = sel[t];   // the select of the update computed in this cycle
      #1;
      if (t >= 5) `CHECK(int'(ps_out) == fld(r[t-3]) + fld(r[t-4]) + fld(r[t-5]),
                         $sformatf("ps t=%0d: %0d", t, ps_out))
      if (t >= 3) `CHECK(feat_out == feat_t'(f[t-3]) && feat_valid_out == v[t-3], "feature hand-over")
      `CHECK(upd_we == hok[t], $sformatf("update enable t=%0d", t))
      if (hok[t]) `CHECK(upd_addr == feat_t'(ha[t]) && int'(upd_wdata) == hv[t],
                         $sformatf("update t=%0d: %0d vs %0d", t, upd_wdata, hv[t]))
      feat_in = feat_t'(f[t]); feat_valid_in = v[t]; dw_in = delta_t'(d[t]);
    end
    @(negedge clk); feat_valid_in = 0;
    repeat (12) @(negedge clk);
    for (int w = 0; w < 128; w++) begin
      @(negedge clk); io_re = 1; io_addr = feat_t'(w);
      @(negedge clk); io_re = 0;
      @(negedge clk);
      `CHECK(io_rvalid && int'(io_rdata) == M[w], $sformatf("readback %0d: %0d vs %0d", w, io_rdata, M[w]))
    end
  endtask

  initial begin
    run(1'b1);
    `CHECK(n_fwd > 0, "forwarding exercised")
    run(1'b0);
    `CHECK(n_sat > 0, "weight clamp exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
