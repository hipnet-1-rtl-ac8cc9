// hipnet_train_tb: training workload. The output layer of the speech network (64 output
// neurons, 9 frames x 127 features plus bias) is trained on the array at its default size
// (4 processors) in 16 passes, each pass mapping the processors to the next 4 output
// neurons through class_base.
//
// The stream is a sequence of "phonemes": segments of 3..6 frames of one class c, whose
// frames mostly carry the class codes 2c and 2c+1, with random codes mixed in. The same
// sequence is repeated for N_EPOCH epochs. Every cycle each processor's increment, output
// and error are checked against its reference model; after each pass all weights and the
// bias are read back and compared. The test also checks that training works: the mean
// absolute error of the last epoch must be below that of the first, and in the last
// epoch the mean output on patterns of a neuron's own class must exceed the mean output
// on other patterns.
module hipnet_train_tb;
  import hipnet_pkg::*;
  import hipnet_ref_pkg::*;

  localparam int N        = 4;
  localparam int N_CLASS  = 64;
  localparam int N_PASS   = N_CLASS / N;
  localparam int L_EPOCH  = 1200;
  localparam int N_EPOCH  = 3;
  localparam int N_STREAM = L_EPOCH * N_EPOCH;
  localparam int N_DRAIN  = 24;
  localparam int N_CYC    = N_STREAM + N_DRAIN;
  localparam int ALPHA    = 2;

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
  // one stream shared by all passes
  int  s_f [N_CYC];
  bit  s_v [N_CYC];
  int  s_c [N_CYC];
  // training statistics summed over all passes
  longint abs_err [N_EPOCH];
  longint n_pat   [N_EPOCH];
  longint o_pos = 0, n_pos = 0, o_neg = 0, n_neg = 0;

  always #5 clk = ~clk;

  hipnet_array dut (
    .clk, .rst_n, .feat_in, .feat_valid, .class_in, .class_base, .alpha, .fwd_en,
    .o_out, .err_out, .o_valid, .dw_out, .io_neuron, .io_sel, .io_we, .io_re, .io_addr,
    .io_wdata, .io_rdata, .io_rvalid, .upd_we, .upd_fwd_hit, .upd_addr, .upd_wdata, .bias_upd
  );

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
  endtask

  task automatic host_read(int j, io_sel_e sel, int addr, output int val);
    @(negedge clk);
    io_neuron = 2'(j); io_sel = sel; io_addr = feat_t'(addr); io_re = 1;
    if (sel == IO_BIAS) begin
      #1 val = int'(io_rdata);
      @(negedge clk);
      io_re = 0;
    end else begin
      @(negedge clk);
      io_re = 0;
      @(negedge clk);
      #1 val = int'(io_rdata);
    end
  endtask

  function automatic void make_stream();
    int t = 0, c, len;
    while (t < L_EPOCH) begin
      c   = $urandom_range(0, N_CLASS - 1);
      len = $urandom_range(3, 6);
      for (int k = 0; k < len && t < L_EPOCH; k++, t++) begin
        s_c[t] = c;
        s_v[t] = 1'b1;
        s_f[t] = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 126)
                                             : (2*c + $urandom_range(0, 1)) % 127;
      end
    end
    for (int t2 = L_EPOCH; t2 < N_CYC; t2++) begin
      s_c[t2] = s_c[t2 % L_EPOCH];
      s_f[t2] = s_f[t2 % L_EPOCH];
      s_v[t2] = (t2 < N_STREAM);
    end
  endfunction

  task automatic run_pass(int base);
    neuron_model m [N];
    int val;
    for (int j = 0; j < N; j++) m[j] = new(N_CYC, base + j, ALPHA, 1'b1, FWD_WINDOW);
    @(negedge clk); rst_n = 0; feat_valid = 0;
    @(negedge clk); rst_n = 1;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < 3; k++)
        for (int w = 0; w < 128; w++) begin
          m[j].M[k][w] = $urandom_range(0, 64) - 32;
          host_write(j, io_sel_e'(k), w, m[j].M[k][w]);
        end
      m[j].B = 0;
      host_write(j, IO_BIAS, 0, 0);
      for (int t = 0; t < N_CYC; t++) begin
        m[j].f[t] = s_f[t]; m[j].v[t] = s_v[t]; m[j].cls[t] = s_c[t];
      end
    end
    fwd_en = 1'b1; alpha = alpha_t'(ALPHA); class_base = class_t'(base);
    for (int t = 0; t < N_CYC; t++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        if (t == 0) m[j].phase0 = cyc % 3;
        m[j].step(t);
        check(dw_out[j] == delta_t'(m[j].dw[t]), $sformatf("pass %0d n%0d dw t=%0d", base/N, j, t));
        if (t >= 6) begin
          check(o_valid[j] == m[j].pv[t-6], $sformatf("pass %0d n%0d o_valid t=%0d", base/N, j, t));
          if (m[j].pv[t-6]) begin
            int n = t - 6;
            int ep = n / L_EPOCH;
            longint e = longint'(err_out[j]);
            check(o_out[j] == out_t'(m[j].o[n]), $sformatf("pass %0d n%0d o t=%0d", base/N, j, t));
            check(err_out[j] == err_t'(m[j].e[n]), $sformatf("pass %0d n%0d err t=%0d", base/N, j, t));
            abs_err[ep] += (e < 0) ? -e : e;
            n_pat[ep]++;
            if (ep == N_EPOCH - 1) begin
              if (s_c[n] == base + j) begin o_pos += longint'(o_out[j]); n_pos++; end
              else                                 begin o_neg += longint'(o_out[j]); n_neg++; end
            end
          end
        end
      end
      feat_in = feat_t'(s_f[t]); feat_valid = s_v[t]; class_in = class_t'(s_c[t]);
    end
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < 3; k++)
        for (int w = 0; w < 128; w++) begin
          host_read(j, io_sel_e'(k), w, val);
          check(val == m[j].M[k][w], $sformatf("pass %0d n%0d bank %0d word %0d", base/N, j, k, w));
        end
      host_read(j, IO_BIAS, 0, val);
      check(val == m[j].B, $sformatf("pass %0d n%0d bias", base/N, j));
    end
  endtask

  initial begin
    for (int ep = 0; ep < N_EPOCH; ep++) begin abs_err[ep] = 0; n_pat[ep] = 0; end
    make_stream();
    for (int p = 0; p < N_PASS; p++) run_pass(p * N);
    for (int ep = 0; ep < N_EPOCH; ep++)
      $display("epoch %0d: %0d patterns, mean |error| x1000 = %0d (error in units of 1/64)",
               ep, n_pat[ep], 1000 * abs_err[ep] / n_pat[ep]);
    $display("last epoch mean output x1000: own class %0d (%0d patterns), other %0d (%0d patterns)",
             1000 * o_pos / n_pos, n_pos, 1000 * o_neg / n_neg, n_neg);
    check(n_pat[0] > 0 && n_pos > 0 && n_neg > 0, "patterns of every kind seen");
    check(abs_err[N_EPOCH-1] * n_pat[0] < abs_err[0] * n_pat[N_EPOCH-1], "error falls with training");
    check(o_pos * n_neg > o_neg * n_pos, "outputs separate own class from others");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
