// neuron_tb: self-checking testbench of one pipelined neuron.
//
// Loads random weights and a bias through the host port, streams a random feature
// sequence (with repeated features to provoke the update hazard, gaps in the valid
// stream, and targets equal to this neuron's number now and then), and compares every
// cycle's increment, output and error with the reference model in hipnet_ref_pkg,
// which predicts them cycle by cycle. After the pipeline drains, all 3 x 128 weights and
// the bias are read back and compared. The run is done with forwarding on and off; the
// forwarding selects come from a fwd_match unit, as in the array.
// A second neuron and match unit with FWD_DEPTH = 1, the minimal scheme that compares an
// update only with the previous one, run on the same inputs against a model with a
// one-entry window; the testbench reports which share of the update hazards it catches.
// The exact cycle of each output checks the latencies; one output per valid pattern,
// with no gaps, checks the rate of one pattern per cycle.
module neuron_tb;
  import hipnet_pkg::*;
  import hipnet_ref_pkg::*;

  localparam int N_STREAM = 600;
  localparam int N_DRAIN  = 24;
  localparam int N_CYC    = N_STREAM + N_DRAIN;
  localparam int ID       = 3;

  logic    clk = 0, rst_n = 0;
  feat_t   feat_in = '0;
  logic    feat_valid = 0;
  class_t  class_in = '0;
  alpha_t  alpha = '0;
  logic    fwd_en = 0;
  out_t    o_out;
  err_t    err_out;
  logic    o_valid;
  delta_t  dw_out;
  io_sel_e io_sel = IO_BANK_PAST;
  logic    io_we = 0, io_re = 0;
  feat_t   io_addr = '0;
  weight_t io_wdata = '0;
  weight_t io_rdata;
  logic    io_rvalid;
  logic [2:0] upd_we, upd_fwd_hit;
  feat_t   upd_addr [3];
  weight_t upd_wdata [3];
  logic    bias_upd;
  logic [FWD_WINDOW-1:0] fwd_sel [3];
  // outputs of the FWD_DEPTH = 1 neuron
  out_t    o_out1;
  err_t    err_out1;
  logic    o_valid1;
  delta_t  dw_out1;
  weight_t io_rdata1;
  logic    io_rvalid1;
  logic [2:0] upd_we1, upd_fwd_hit1;
  feat_t   upd_addr1 [3];
  weight_t upd_wdata1 [3];
  logic    bias_upd1;
  logic [0:0] fwd_sel1 [3];

  // the array's shared forwarding match unit, here serving one neuron
  fwd_match u_match (.clk(clk), .rst_n(rst_n), .feat_in(feat_in), .feat_valid(feat_valid),
                     .fwd_en(fwd_en), .sel(fwd_sel));

  fwd_match #(.DEPTH(1)) u_match1 (.clk(clk), .rst_n(rst_n), .feat_in(feat_in),
                                   .feat_valid(feat_valid), .fwd_en(fwd_en), .sel(fwd_sel1));

  int checks = 0, failures = 0;
  int n_hits = 0, n_outs = 0;

  always #5 clk = ~clk;

  neuron dut (
    .clk(clk), .rst_n(rst_n), .feat_in(feat_in), .feat_valid(feat_valid),
    .class_in(class_in), .neuron_id(class_t'(ID)), .alpha(alpha), .fwd_sel(fwd_sel),
    .o_out(o_out), .err_out(err_out), .o_valid(o_valid), .dw_out(dw_out),
    .io_sel(io_sel), .io_we(io_we), .io_re(io_re), .io_addr(io_addr),
    .io_wdata(io_wdata), .io_rdata(io_rdata), .io_rvalid(io_rvalid),
    .upd_we(upd_we), .upd_fwd_hit(upd_fwd_hit), .upd_addr(upd_addr), .upd_wdata(upd_wdata), .bias_upd(bias_upd)
  );

  neuron #(.FWD_DEPTH(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .feat_in(feat_in), .feat_valid(feat_valid),
    .class_in(class_in), .neuron_id(class_t'(ID)), .alpha(alpha), .fwd_sel(fwd_sel1),
    .o_out(o_out1), .err_out(err_out1), .o_valid(o_valid1), .dw_out(dw_out1),
    .io_sel(io_sel), .io_we(io_we), .io_re(io_re), .io_addr(io_addr),
    .io_wdata(io_wdata), .io_rdata(io_rdata1), .io_rvalid(io_rvalid1),
    .upd_we(upd_we1), .upd_fwd_hit(upd_fwd_hit1), .upd_addr(upd_addr1), .upd_wdata(upd_wdata1),
    .bias_upd(bias_upd1)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  task automatic host_write(io_sel_e sel, int addr, int val);
    @(negedge clk);
    io_sel = sel; io_addr = feat_t'(addr); io_wdata = weight_t'(val); io_we = 1;
    @(negedge clk);
    io_we = 0;
  endtask

  task automatic host_read(io_sel_e sel, int addr, output int val, output int val1);
    @(negedge clk);
    io_sel = sel; io_addr = feat_t'(addr); io_re = 1;
    if (sel == IO_BIAS) begin
      #1 val = int'(io_rdata); val1 = int'(io_rdata1);
      @(negedge clk);
      io_re = 0;
    end else begin
      @(negedge clk);
      io_re = 0;
      @(negedge clk);
      #1 val = int'(io_rdata); val1 = int'(io_rdata1);
      check(io_rvalid == 1'b1 && io_rvalid1 == 1'b1, "read valid");
    end
  endtask

  task automatic run(bit fwd, int a);
    neuron_model m, m1;
    int val, val1;
    m  = new(N_CYC, ID, a, fwd, FWD_WINDOW);
    m1 = new(N_CYC, ID, a, fwd, 1);
    // reset and load weights
    @(negedge clk); rst_n = 0; feat_valid = 0;
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3; k++)
      for (int w = 0; w < 128; w++) begin
        m.M[k][w] = $urandom_range(0, 1023) - 512;
        host_write(io_sel_e'(k), w, m.M[k][w]);
      end
    m.B = $urandom_range(0, 255) - 128;
    host_write(IO_BIAS, 0, m.B);
    m1.M = m.M; m1.B = m.B;
    // stream: small alphabet so that features repeat often
    for (int t = 0; t < N_CYC; t++) begin
      m.v[t]   = (t < N_STREAM) && ($urandom_range(0, 19) != 0);
      m.f[t]   = ($urandom_range(0, 3) == 0) ? ((t > 0) ? m.f[t-1] : 0) : $urandom_range(0, 15);
      m.cls[t] = $urandom_range(0, 5);
    end
    m1.f = m.f; m1.v = m.v; m1.cls = m.cls;
    fwd_en = fwd; alpha = alpha_t'(a);
    run_stream(m, m1);
    // read back
    for (int k = 0; k < 3; k++)
      for (int w = 0; w < 128; w++) begin
        host_read(io_sel_e'(k), w, val, val1);
        check(val == m.M[k][w], $sformatf("weight bank %0d word %0d: %0d vs %0d", k, w, val, m.M[k][w]));
        check(val1 == m1.M[k][w], $sformatf("depth-1 weight bank %0d word %0d: %0d vs %0d", k, w, val1, m1.M[k][w]));
      end
    host_read(IO_BIAS, 0, val, val1);
    check(val == m.B, $sformatf("bias %0d vs %0d", val, m.B));
    check(val1 == m1.B, $sformatf("depth-1 bias %0d vs %0d", val1, m1.B));
    $display("run fwd=%0d alpha=%0d: lost-update cases %0d, forwarded %0d, clamps w/s/dw %0d/%0d/%0d, desired %0d",
             fwd, a, m.n_lost, m.n_fwd, m.n_wsat, m.n_ssat, m.n_dsat, m.n_desired);
    if (fwd) begin
      $display("FWD_DEPTH = 1 caught %0d of %0d update hazards (%0d%%)",
               m1.n_fwd, m1.n_haz, 100 * m1.n_fwd / m1.n_haz);
      check(m1.n_fwd > 0 && m1.n_fwd < m1.n_haz, "depth-1 window catches some, not all, hazards");
      check(m.n_fwd == m.n_haz, "full window catches every hazard");
    end
    if (fwd) check(m.n_fwd > 0, "forwarding exercised");
    else     check(m.n_lost > 0, "update hazard exercised");
    check(m.n_desired > 0, "desired output 1 exercised");
  endtask

  // Cycles since reset: the bias update phase counter of the output processor.
  int cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Streams the model's input and compares outputs cycle by cycle.
  task automatic run_stream(neuron_model m, neuron_model m1);
    for (int t = 0; t < m.n_cyc; t++) begin
      @(negedge clk);
      if (t == 0) begin m.phase0 = cyc % 3; m1.phase0 = cyc % 3; end
      m.step(t);
      m1.step(t);
      check(dw_out1 == delta_t'(m1.dw[t]), $sformatf("depth-1 dw t=%0d: %0d vs %0d", t, dw_out1, m1.dw[t]));
      if (t >= 6 && m1.pv[t-6])
        check(o_valid1 && err_out1 == err_t'(m1.e[t-6]) && o_out1 == out_t'(m1.o[t-6]),
              $sformatf("depth-1 output t=%0d", t));
      // outputs of cycle t
      check(dw_out == delta_t'(m.dw[t]), $sformatf("dw t=%0d: %0d vs %0d", t, dw_out, m.dw[t]));
      if (t >= 6) begin
        check(o_valid == m.pv[t-6], $sformatf("o_valid t=%0d", t));
        if (m.pv[t-6]) begin
          n_outs++;
          check(o_out == out_t'(m.o[t-6]), $sformatf("o t=%0d: %0d vs %0d", t, o_out, m.o[t-6]));
          check(err_out == err_t'(m.e[t-6]), $sformatf("err t=%0d: %0d vs %0d", t, err_out, m.e[t-6]));
        end
      end
      if (fwd_en && |upd_fwd_hit) n_hits++;
      feat_in = feat_t'(m.f[t]); feat_valid = m.v[t]; class_in = class_t'(m.cls[t]);
    end
    @(negedge clk);
    feat_valid = 0;
  endtask

  initial begin
    run(1'b1, 2);
    run(1'b0, 1);
    check(n_hits > 0, "forwarding hits seen at the RTL port");
    $display("valid patterns observed %0d", n_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
