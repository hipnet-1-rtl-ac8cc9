// hipnet_ref_pkg: an independent, transaction-level reference model of one pipelined
// neuron, used by the testbenches.
//
// It does not mirror the RTL structure (no shift registers, no adder chains). It works on
// the whole input stream, indexed by cycle, and states the timing of the pipeline as
// rules between indices:
//   * bank k sees, at cycle i, the feature that entered the neuron at cycle i-3k;
//   * the weight read for it, r[k][i], includes every update computed before cycle i;
//   * the pattern whose newest frame entered at cycle n sums r[k][n], r[k][n-1],
//     r[k][n-2] over the banks plus the bias as it stood at cycle n+3;
//   * the increment of cycle t, dw(t), comes from the errors of patterns t-6..t-8;
//   * at cycle u each bank updates the feature it saw at cycle u-9 with dw(u-1), starting
//     from r (or, with forwarding, from the youngest update of that address made in the
//     previous fwd_depth cycles); the bias takes dw(t) when t mod 3 == 2.
// The arithmetic (sigmoid with $exp, shifts, clamps) is written out from its definition.
package hipnet_ref_pkg;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int field(int w);   // 6 MSBs of a 12-bit weight
    return w >>> 6;
  endfunction

  function automatic int sigmoid_o(int s);
    int  x;
    real y;
    x = clampi(s, -32, 31);
    y = 64.0 / (1.0 + $exp(-real'(x) / 4.0));
    return clampi(int'($floor(y + 0.5)), 0, 63);
  endfunction

  function automatic int alpha_dw(int esum, int a);
    return clampi(-(esum >>> a), -128, 127);
  endfunction

  class neuron_model;
    int n_cyc;
    int id;
    int alpha;
    bit fwd_en;
    int fwd_depth;
    int phase0;      // bias phase counter value at stream cycle 0
    // stream
    int f[];  bit v[];  int cls[];
    // state
    int M[3][128];
    int B;
    int r[3][];
    int e[];  int o[];  bit pv[];  int s[];
    int dw[];
    // update history per bank
    int  h_addr[3][];  int h_val[3][];  bit h_ok[3][];
    // event counters
    int n_lost;      // updates that start from a stale read weight (hazard cases)
    int n_fwd;       // updates that took a forwarded base
    int n_haz;       // updates whose feature was updated in the previous 9 cycles
    int n_wsat;      // weight updates that clamped
    int n_ssat;      // pattern sums beyond the PLA input range
    int n_dsat;      // increments that clamped
    int n_desired;   // valid patterns with desired output 1

    function new(int n_cyc, int id, int alpha, bit fwd_en, int fwd_depth);
      this.n_cyc = n_cyc; this.id = id; this.alpha = alpha;
      this.fwd_en = fwd_en; this.fwd_depth = fwd_depth;
      f = new[n_cyc]; v = new[n_cyc]; cls = new[n_cyc];
      e = new[n_cyc]; o = new[n_cyc]; pv = new[n_cyc]; s = new[n_cyc]; dw = new[n_cyc];
      for (int k = 0; k < 3; k++) begin
        r[k] = new[n_cyc]; h_addr[k] = new[n_cyc]; h_val[k] = new[n_cyc]; h_ok[k] = new[n_cyc];
      end
      B = 0; phase0 = 0;
    endfunction

    function int feat_at(int k, int i, output bit ok);
      int idx = i - 3*k;
      if (idx < 0) begin ok = 0; return 0; end
      ok = v[idx];
      return f[idx];
    endfunction

    function void step(int t);
      bit ok;
      int a, n, sum, esum, u_i, base, nw, dwt, dwp;
      // reads
      for (int k = 0; k < 3; k++) begin
        a = feat_at(k, t, ok);
        r[k][t] = M[k][a];
      end
      // pattern reaching the adder tree
      n = t - 3;
      if (n >= 0) begin
        sum = field(B);
        for (int k = 0; k < 3; k++)
          for (int j = 0; j < 3; j++)
            if (n - j >= 0) sum += field(r[k][n-j]);
        s[n] = sum;
        pv[n] = (n >= 8);
        for (int j = 0; j < 9; j++) if (n - j >= 0 && !v[n-j]) pv[n] = 0;
        o[n] = sigmoid_o(sum);
        e[n] = pv[n] ? (o[n] - ((cls[n] == id) ? 64 : 0)) : 0;
        if (pv[n] && (sum > 31 || sum < -32)) n_ssat++;
        if (pv[n] && cls[n] == id) n_desired++;
      end
      // increment of this cycle
      esum = 0;
      for (int j = 6; j <= 8; j++) if (t - j >= 0) esum += e[t-j];
      dw[t] = alpha_dw(esum, alpha);
      if (-(esum >>> alpha) != dw[t]) n_dsat++;
      // weight updates
      dwp = (t >= 1) ? dw[t-1] : 0;
      u_i = t - 9;
      for (int k = 0; k < 3; k++) begin
        h_ok[k][t] = 0;
        if (u_i < 0) continue;
        a = feat_at(k, u_i, ok);
        if (!ok) continue;
        base = r[k][u_i];
        if (fwd_en) begin
          for (int q = 1; q <= fwd_depth; q++)
            if (t - q >= 0 && h_ok[k][t-q] && h_addr[k][t-q] == a) begin
              base = h_val[k][t-q];
              n_fwd++;
              break;
            end
        end
        for (int q = 1; q <= 9; q++)
          if (t - q >= 0 && h_ok[k][t-q] && h_addr[k][t-q] == a) begin
            if (!fwd_en) n_lost++;
            n_haz++;
            break;
          end
        nw = clampi(base + dwp, -2048, 2047);
        if (nw != base + dwp) n_wsat++;
        M[k][a] = nw;
        h_ok[k][t] = 1; h_addr[k][t] = a; h_val[k][t] = nw;
      end
      // bias
      dwt = dw[t];
      if ((t + phase0) % 3 == 2) B = clampi(B + dwt, -2048, 2047);
    endfunction
  endclass

endpackage
