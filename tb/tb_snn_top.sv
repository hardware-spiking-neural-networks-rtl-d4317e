// tb_snn_top: end-to-end test of the network at its default size (32 inputs,
// 24 hidden and 4 output neurons, 32 synapses each), driven only through the
// host ports.
//
// Workload: a gas-yield controller. Input patterns are 32 spike lines in four
// groups of 8; a pattern with more ones in the upper half means the yield is
// too high, otherwise too low. Output neurons 0 and 1 are taught to signal
// "too high", 2 and 3 "too low"; hidden neurons 0..11 are taught "too high" and
// 12..23 "too low". Phases, as in the experiment:
//   1 load random initial weights and read them back,
//   2 supervised Hebb learning (postsynaptic rule, teacher bits) over a stream
//     of random patterns, reading the membrane potentials back as it goes,
//   3 reading back every weight,
//   4 recall without learning: each pattern is one volley of input spikes,
//     and within 4 steps exactly the output neurons of its class must fire
//     (required for at least 75% of the patterns).
// Then the other rules are run unsupervised, the global inhibitory module is
// switched on, and short time frames are used, so every mechanism occurs.
// A step-level model of the whole network in this testbench predicts every
// output spike, membrane potential and weight; all are compared. Each
// mechanism is counted and one that never happened counts as a failure.
module tb_snn_top;
  import snn_pkg::*;
  localparam int N_IN = 32, N_HID = 24, N_OUT = 4, N_SYN = 32;
  localparam int NN = N_HID + N_OUT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] host_addr, host_wdata, host_rdata;
  logic host_wr, host_rd, busy;
  logic [N_OUT-1:0] out_spikes;

  snn_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model ----------------
  int m_w [NN][N_SYN];
  int m_pre [NN][N_SYN];
  int m_mp [NN], m_ref [NN], m_fc [NN], m_spk [NN], m_post [NN];
  int m_dp;
  // configuration mirror
  int c_learn, c_sup, c_rule, c_eta, c_inh, c_thp, c_rest, c_slope, c_frame, c_ihw, c_ihs;
  logic [N_IN-1:0] c_pat;
  logic [NN-1:0]   c_teach;
  // mechanism counters
  int k_hid, k_out, k_refr, k_down, k_up, k_frame, k_sat, k_inhib, k_sup, k_unsup;
  int k_wr, k_rule_up [4], k_rule_dn [4];

  function automatic int toward(int v, int rest, int slope);
    if (v > rest) return (v - rest > slope) ? v - slope : rest;
    return (rest - v > slope) ? v + slope : rest;
  endfunction
  function automatic int cdiv(int v, int k);
    return (v + (1 << k) - 1) >> k;
  endfunction
  function automatic int upd(int w, int xa, int ya, int rule, int k);
    case (rule)
      0: return (xa && ya) ? w + cdiv(15 - w, k) : w;
      1: if (xa && ya) return w + cdiv(15 - w, k);
         else if (!xa && ya) return (w - cdiv(15, k) < 0) ? 0 : w - cdiv(15, k);
         else return w;
      2: if (xa && ya) return w + cdiv(15 - w, k);
         else if (xa && !ya) return w - cdiv(w, k);
         else return w;
      default: return (xa == ya) ? w + cdiv(15 - w, k) : w - cdiv(w, k);
    endcase
  endfunction

  task automatic model_step();
    int nspk [NN];
    int cnt = 0, d, inh;
    inh = m_dp;
    for (int n = 0; n < NN; n++) begin
      int s = 0, cand, raw, fe, f;
      int x [N_SYN];
      for (int i = 0; i < N_SYN; i++) begin
        if (n < N_HID) x[i] = (i < N_IN) ? int'(c_pat[i]) : 0;
        else           x[i] = (i < N_HID) ? m_spk[i] : 0;
        if (x[i]) s += m_w[n][i];
        m_pre[n][i] |= x[i];
      end
      if (m_ref[n]) cand = toward(m_mp[n], c_rest, c_slope);
      else if (s != 0 || inh != 0) begin
        raw = m_mp[n] + s - inh;
        if (raw > 255) k_sat++;
        if (inh != 0) k_inhib++;
        cand = raw < 0 ? 0 : raw > 255 ? 255 : raw;
      end else begin
        cand = toward(m_mp[n], c_rest, c_slope);
        if (m_mp[n] > c_rest) k_down++;
      end
      if (m_ref[n] && m_mp[n] < c_rest) k_up++;
      fe = (!m_ref[n] && c_frame != 0 && m_fc[n] == c_frame - 1);
      f  = (!m_ref[n] && cand > c_thp);
      nspk[n] = f;
      m_post[n] |= f;
      if (!m_ref[n]) begin
        if (f) begin
          m_mp[n] = 0; m_ref[n] = 1; m_fc[n] = 0;
          if (n < N_HID) k_hid++; else k_out++;
        end else if (fe) begin m_mp[n] = c_rest; m_fc[n] = 0; k_frame++; end
        else begin m_mp[n] = cand; m_fc[n] = (c_frame == 0) ? 0 : (m_fc[n] + 1) & 255; end
      end else begin
        m_mp[n] = cand;
        if (cand >= c_rest) begin m_ref[n] = 0; k_refr++; end
      end
    end
    for (int n = 0; n < NN; n++) cnt += m_spk[n];
    if (!c_inh) m_dp = 0;
    else begin
      d = (m_dp > c_ihs) ? m_dp - c_ihs : 0;
      m_dp = (d + cnt * c_ihw > 255) ? 255 : d + cnt * c_ihw;
    end
    for (int n = 0; n < NN; n++) m_spk[n] = nspk[n];
  endtask

  task automatic model_learn();
    if (!c_learn) return;
    if (c_sup) k_sup++; else k_unsup++;
    for (int n = 0; n < NN; n++) begin
      int y = c_sup ? int'(c_teach[n]) : m_post[n];
      for (int i = 0; i < N_SYN; i++) begin
        int nw = upd(m_w[n][i], m_pre[n][i], y, c_rule, c_eta);
        if (nw > m_w[n][i]) k_rule_up[c_rule]++;
        if (nw < m_w[n][i]) k_rule_dn[c_rule]++;
        m_w[n][i] = nw;
        m_pre[n][i] = 0;
      end
      m_post[n] = 0;
    end
  endtask

  // ---------------- host access ----------------
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); host_addr = 8'(a); host_wdata = 8'(d); host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic rd(int a, output int d);
    @(negedge clk); host_addr = 8'(a); host_rd = 1;
    @(negedge clk); host_rd = 0; d = int'(host_rdata);
  endtask

  task automatic set_ctrl(int learn, int sup, int rule, int eta, int inh);
    c_learn = learn; c_sup = sup; c_rule = rule; c_eta = eta; c_inh = inh;
    wr(8'h10, learn | (sup << 1) | (rule << 2) | (eta << 4) | (inh << 6));
  endtask

  task automatic set_pattern(logic [N_IN-1:0] p);
    c_pat = p;
    for (int b = 0; b < N_IN / 8; b++) wr(b, int'(p[8*b +: 8]));
  endtask

  task automatic set_teacher(logic [NN-1:0] t);
    c_teach = t;
    for (int b = 0; b < (NN + 7) / 8; b++) wr(8'h08 + b, int'(t[8*b +: 8]));
  endtask

  // run n time-steps, checking the output spikes after each one
  task automatic run_steps(int n);
    for (int s = 0; s < n; s++) begin
      wr(8'h1C, 1);
      while (busy) @(negedge clk);
      model_step();
      model_learn();
      for (int o = 0; o < N_OUT; o++) check("out spike", int'(out_spikes[o]), m_spk[N_HID + o]);
    end
  endtask

  task automatic check_mps();
    int d;
    for (int n = 0; n < NN; n++) begin
      wr(8'h17, n); rd(8'h1A, d); check("mp", d, m_mp[n]);
    end
  endtask

  task automatic check_weights();
    int d;
    for (int n = 0; n < NN; n++) begin
      wr(8'h17, n); wr(8'h18, 0);
      for (int i = 0; i < N_SYN; i++) begin rd(8'h19, d); check("weight", d, m_w[n][i]); end
    end
  endtask

  function automatic logic [N_IN-1:0] make_pattern(int high);
    logic [N_IN-1:0] p;
    for (int i = 0; i < N_IN; i++) begin
      int upper = (i >= 16);
      p[i] = ($urandom_range(0, 99) < ((upper == high) ? 80 : 10));
    end
    return p;
  endfunction

  function automatic logic [NN-1:0] make_teacher(int high);
    logic [NN-1:0] t;
    for (int n = 0; n < N_HID; n++) t[n] = high ? (n < 12) : (n >= 12);
    for (int o = 0; o < N_OUT; o++) t[N_HID + o] = high ? (o < 2) : (o >= 2);
    return t;
  endfunction

  int correct = 0, trials = 0;

  initial begin
    int d, high, resp [N_OUT];
    host_addr = '0; host_wdata = '0; host_wr = 0; host_rd = 0;
    for (int n = 0; n < NN; n++) begin
      m_mp[n] = 0; m_ref[n] = 0; m_fc[n] = 0; m_spk[n] = 0; m_post[n] = 0;
      for (int i = 0; i < N_SYN; i++) begin m_w[n][i] = 8; m_pre[n][i] = 0; end
    end
    m_dp = 0;
    c_learn = 0; c_sup = 1; c_rule = 1; c_eta = 2; c_inh = 0;
    c_thp = 90; c_rest = 10; c_slope = 1; c_frame = 16; c_ihw = 1; c_ihs = 4;
    c_pat = '0; c_teach = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // reset state
    check_weights();
    check_mps();

    // phase 1: random initial weights
    for (int n = 0; n < NN; n++) begin
      wr(8'h17, n); wr(8'h18, 0);
      for (int i = 0; i < N_SYN; i++) begin
        m_w[n][i] = $urandom_range(0, 15);
        wr(8'h19, m_w[n][i]);
        k_wr++;
      end
    end
    check_weights();

    // phase 2: supervised Hebb learning (postsynaptic rule)
    // Each pattern is one volley of input spikes (one time-step), followed by
    // quiet steps. Learning is enabled only on the fourth step, so the weights
    // see the activity of the whole window (hidden spikes reach the output
    // layer one step after the inputs). 12 more quiet steps let the neurons
    // leave the refractory state.
    for (int p = 0; p < 24; p++) begin
      high = p % 2;
      set_pattern(make_pattern(high));
      set_teacher(make_teacher(high));
      set_ctrl(0, 1, 1, 2, 0);
      run_steps(1);
      set_pattern('0);
      run_steps(2);
      set_ctrl(1, 1, 1, 2, 0);
      run_steps(1);
      set_ctrl(0, 1, 1, 2, 0);
      set_teacher('0);
      run_steps(12);
      if (p % 6 == 5) check_mps();
    end
    // phase 3: read every weight
    check_weights();

    // phase 4: recall, no learning; a settling gap with zero input between patterns
    set_ctrl(0, 1, 1, 2, 0);
    for (int p = 0; p < 16; p++) begin
      high = $urandom_range(0, 1);
      set_pattern(make_pattern(high));
      for (int o = 0; o < N_OUT; o++) resp[o] = 0;
      for (int s = 0; s < 4; s++) begin
        run_steps(1);
        if (s == 0) set_pattern('0);
        for (int o = 0; o < N_OUT; o++) resp[o] |= m_spk[N_HID + o];
      end
      $display("recall pattern %0d class %0d outputs %0d%0d%0d%0d", p, high, resp[0], resp[1], resp[2], resp[3]);
      trials++;
      if (high ? (resp[0] && resp[1] && !resp[2] && !resp[3])
               : (!resp[0] && !resp[1] && resp[2] && resp[3])) correct++;
      set_pattern('0);
      run_steps(20);
    end
    check_mps();
    $display("recall: %0d of %0d patterns answered correctly", correct, trials);
    checks++;
    if (correct * 4 < trials * 3) begin
      failures++;
      $display("FAIL recall accuracy below 75%%");
    end

    // other rules, unsupervised, with short frames and the inhibitory module
    wr(8'h14, 5);  c_frame = 5;
    wr(8'h15, 2);  c_ihw = 2;
    wr(8'h16, 3);  c_ihs = 3;
    for (int r = 0; r < 4; r++) begin
      set_ctrl(1, 0, r, 1, (r >= 2));
      for (int p = 0; p < 6; p++) begin
        set_pattern(($urandom_range(0, 2) == 0) ? '0 : make_pattern($urandom_range(0, 1)));
        run_steps(4);
      end
      check_mps();
      rd(8'h1D, d); check("inhibitory potential", d, m_dp);
    end
    check_weights();

    $display("hidden spikes %0d, output spikes %0d, refractory exits %0d", k_hid, k_out, k_refr);
    $display("decay steps %0d, recovery steps %0d, frame ends %0d, saturations %0d, inhibited updates %0d",
             k_down, k_up, k_frame, k_sat, k_inhib);
    $display("supervised learn steps %0d, unsupervised %0d, host weight writes %0d", k_sup, k_unsup, k_wr);
    for (int r = 0; r < 4; r++) $display("rule %0d: %0d increases, %0d decreases", r, k_rule_up[r], k_rule_dn[r]);
    checks++;
    if (!(k_hid && k_out && k_refr && k_down && k_up && k_frame && k_sat && k_inhib && k_sup && k_unsup && k_wr)) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      // the simple Hebb rule can only strengthen a synapse
      if (!(k_rule_up[r] && (k_rule_dn[r] || r == 0))) begin failures++; $display("FAIL rule %0d not exercised both ways", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
