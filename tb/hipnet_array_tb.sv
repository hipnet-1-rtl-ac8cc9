// hipnet_array_tb: end-to-end test of the full array at its default size (4 neuron
// processors), and the full-size test of the design.
//
// Each run resets the array, loads every weight bank and bias of every processor through
// the host port, trains on a random sequential feature stream (with repeated features,
// gaps, and targets that hit each processor's output neuron), checks every cycle each
// processor's increment, output and error against its own reference model
// (hipnet_ref_pkg), drains the pipeline and reads every weight and bias back.
// Run 1: forwarding on, alpha 0 (large steps that clamp), weights spread over the whole
// range, processors mapped to output neurons 0..3. Run 2: forwarding off, alpha 2,
// processors remapped to output neurons 2..5, which reuses the hardware for other neurons.
// Mechanisms counted, each must occur: learning of one pattern per cycle per processor,
// stream gaps, desired output 1, bias updates, update forwarding hits, update-overwrite
// hazards without forwarding, weight clamps, sum clamps at the PLA input, increment
// clamps, host writes and reads, and remapping of processors to output neurons.
module hipnet_array_tb;
  import hipnet_pkg::*;
  import hipnet_ref_pkg::*;

  localparam int N        = 4;       // the array's default N_NEURONS
  localparam int N_STREAM = 1500;
  localparam int N_DRAIN  = 24;
  localparam int N_CYC    = N_STREAM + N_DRAIN;

  logic    clk = 0, rst_n = 0;
  feat_t   feat_in = '0;
  logic    feat_valid = 0;
  class_t  class_in = '0, class_base = '0;
  alpha_t  alpha = '0;
  logic    fwd_en = 0;
  out_t    o_out   [N];
  err_t    err_out [N];
  logic [N-1:0] o_valid;
  delta_t  dw_out  [N];
  logic [1:0] io_neuron = '0;
  io_sel_e io_sel = IO_BANK_PAST;
  logic    io_we = 0, io_re = 0;
  feat_t   io_addr = '0;
  weight_t io_wdata = '0, io_rdata;
  logic    io_rvalid;
  logic [2:0] upd_we [N];
  logic [2:0] upd_fwd_hit [N];
  feat_t   upd_addr [N][3];
  weight_t upd_wdata [N][3];
  logic [N-1:0] bias_upd;

  int checks = 0, failures = 0;
  // mechanism counters
  int c_pattern = 0, c_gap = 0, c_desired = 0, c_bias = 0, c_fwd = 0, c_hazard = 0;
  int c_wsat = 0, c_ssat = 0, c_dsat = 0, c_hw = 0, c_hr = 0, c_remap = 0;

  always #5 clk = ~clk;

  hipnet_array dut (
    .clk, .rst_n, .feat_in, .feat_valid, .class_in, .class_base, .alpha, .fwd_en,
    .o_out, .err_out, .o_valid, .dw_out, .io_neuron, .io_sel, .io_we, .io_re, .io_addr,
    .io_wdata, .io_rdata, .io_rvalid, .upd_we, .upd_fwd_hit, .upd_addr, .upd_wdata, .bias_upd
  );

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  task automatic host_write(int j, io_sel_e sel, int addr, int val);
    @(negedge clk);
    io_neuron = 2'(j); io_sel = sel; io_addr = feat_t'(addr); io_wdata = weight_t'(val); io_we = 1;
    @(negedge clk);
    io_we = 0;
    c_hw++;
  endtask

  task automatic host_read(int j, io_sel_e sel, int addr, output int val);
    @(negedge clk);
    io_neuron = 2'(j); io_sel = sel; io_addr = feat_t'(addr); io_re = 1;
    if (sel == IO_BIAS) begin
      #1 val = int'(io_rdata);
      check(io_rvalid, "bias read valid");
      @(negedge clk);
      io_re = 0;
    end else begin
      @(negedge clk);
      io_re = 0;
      @(negedge clk);
      #1 val = int'(io_rdata);
      check(io_rvalid, "bank read valid");
    end
    c_hr++;
  endtask

  task automatic run(bit fwd, int a, int base, int wspread);
    neuron_model m [N];
    int val;
    for (int j = 0; j < N; j++) m[j] = new(N_CYC, base + j, a, fwd, FWD_WINDOW);
    @(negedge clk); rst_n = 0; feat_valid = 0;
    @(negedge clk); rst_n = 1;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < 3; k++)
        for (int w = 0; w < 128; w++) begin
          m[j].M[k][w] = $urandom_range(0, 2*wspread) - wspread;
          host_write(j, io_sel_e'(k), w, m[j].M[k][w]);
        end
      m[j].B = $urandom_range(0, 511) - 256;
      host_write(j, IO_BIAS, 0, m[j].B);
    end
    // one shared stream; targets drawn from the classes around the mapped neurons
    for (int t = 0; t < N_CYC; t++) begin
      bit   vt = (t < N_STREAM) && ($urandom_range(0, 24) != 0);
      int   ft = ($urandom_range(0, 4) == 0 && t > 0) ? m[0].f[t-1] : $urandom_range(0, 126);
      int   ct = base + $urandom_range(0, N + 1) - 1;
      if (ct < 0) ct = 0;
      if (t > 0 && $urandom_range(0, 1) == 0) ct = m[0].cls[t-1];   // a phoneme lasts a few frames
      if (t < N_STREAM && !vt) c_gap++;
      for (int j = 0; j < N; j++) begin
        m[j].v[t] = vt; m[j].f[t] = (t < 600) ? ft % 24 : ft; m[j].cls[t] = ct;
      end
    end
    fwd_en = fwd; alpha = alpha_t'(a); class_base = class_t'(base);
    for (int t = 0; t < N_CYC; t++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        if (t == 0) m[j].phase0 = cyc % 3;
        m[j].step(t);
        check(dw_out[j] == delta_t'(m[j].dw[t]), $sformatf("n%0d dw t=%0d: %0d vs %0d", j, t, dw_out[j], m[j].dw[t]));
        if (t >= 6) begin
          check(o_valid[j] == m[j].pv[t-6], $sformatf("n%0d o_valid t=%0d", j, t));
          if (m[j].pv[t-6]) begin
            if (j == 0) c_pattern++;
            check(o_out[j] == out_t'(m[j].o[t-6]), $sformatf("n%0d o t=%0d", j, t));
            check(err_out[j] == err_t'(m[j].e[t-6]), $sformatf("n%0d err t=%0d", j, t));
          end
        end
        if (bias_upd[j]) c_bias++;
        if (|upd_fwd_hit[j]) c_fwd++;
      end
      feat_in = feat_t'(m[0].f[t]); feat_valid = m[0].v[t]; class_in = class_t'(m[0].cls[t]);
    end
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < 3; k++)
        for (int w = 0; w < 128; w++) begin
          host_read(j, io_sel_e'(k), w, val);
          check(val == m[j].M[k][w], $sformatf("n%0d bank %0d word %0d: %0d vs %0d", j, k, w, val, m[j].M[k][w]));
        end
      host_read(j, IO_BIAS, 0, val);
      check(val == m[j].B, $sformatf("n%0d bias %0d vs %0d", j, val, m[j].B));
      c_desired += m[j].n_desired; c_wsat += m[j].n_wsat; c_ssat += m[j].n_ssat;
      c_dsat += m[j].n_dsat;
      if (!fwd) c_hazard += m[j].n_lost;
    end
  endtask

  initial begin
    int valid_patterns;
    run(1'b1, 0, 0, 2047);
    run(1'b0, 2, 2, 600);
    c_remap = 1;   // the second run trained output neurons 2..5 on the same processors
    $display("patterns learned (processor 0) %0d, stream gaps %0d, desired=1 %0d, bias updates %0d",
             c_pattern, c_gap, c_desired, c_bias);
    $display("forwarding hits %0d, overwrite hazards %0d, clamps weight/sum/increment %0d/%0d/%0d",
             c_fwd, c_hazard, c_wsat, c_ssat, c_dsat);
    $display("host writes %0d, host reads %0d", c_hw, c_hr);
    check(c_pattern > 0, "patterns learned");
    check(c_gap > 0, "stream gaps");
    check(c_desired > 0, "desired output 1");
    check(c_bias > 0, "bias updates");
    check(c_fwd > 0, "forwarding hits");
    check(c_hazard > 0, "overwrite hazards");
    check(c_wsat > 0, "weight clamps");
    check(c_ssat > 0, "sum clamps");
    check(c_dsat > 0, "increment clamps");
    check(c_hw > 0 && c_hr > 0, "host transfers");
    check(c_remap > 0, "processor remapping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
