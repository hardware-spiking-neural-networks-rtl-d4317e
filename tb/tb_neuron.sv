// tb_neuron: self-checking test of one neuron (32 synapses and a soma).
// A testbench model keeps the 32 weights, presynaptic activity latches, the
// membrane potential, the state machine and the postsynaptic activity. Random
// spike inputs, host weight writes, time-step and learn strobes are applied in
// both supervised (teacher) and unsupervised (own spikes) mode with every rule;
// weights, potential and spikes are compared every clock. The directed part
// checks a supervised Hebb (postsynaptic rule) run: active inputs grow to 15,
// inactive inputs shrink to 0 while the teacher bit is set.
module tb_neuron;
  import snn_pkg::*;
  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic step, learn, learn_en, supervised, teacher, w_we, spike;
  learn_cfg_t lcfg;
  soma_cfg_t scfg;
  mp_t inhib, mp;
  logic [N-1:0] x;
  logic [4:0] w_sel;
  weight_t w_wdata;
  weight_t weights [N];
  int checks = 0, failures = 0;

  neuron #(.N_SYN(N), .W_INIT(weight_t'(8))) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_w [N];
  int m_pre [N];
  int m_mp, m_ref, m_fc, m_spk, m_post;
  int n_fire, n_up, n_down;

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

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic model_clock();
    int s = 0, cand, raw, fe, f, fl, lrn, y;
    for (int i = 0; i < N; i++) if (x[i]) s += m_w[i];
    fl = int'(scfg.frame_len);
    if (m_ref) cand = toward(m_mp, scfg.rest, scfg.slope);
    else if (s != 0 || inhib != 0) begin
      raw = m_mp + s - int'(inhib);
      cand = raw < 0 ? 0 : raw > 255 ? 255 : raw;
    end else cand = toward(m_mp, scfg.rest, scfg.slope);
    fe = (!m_ref && fl != 0 && m_fc == fl - 1);
    f  = (!m_ref && cand > int'(scfg.thp));
    lrn = learn && learn_en;
    y = supervised ? int'(teacher) : m_post;
    for (int i = 0; i < N; i++) begin
      int nw = m_w[i];
      if (w_we && w_sel == i) nw = int'(w_wdata);
      else if (lrn) nw = upd(m_w[i], m_pre[i], y, int'(lcfg.rule), int'(lcfg.eta_shift));
      if (!(w_we && w_sel == i) && lrn) begin
        if (nw > m_w[i]) n_up++;
        if (nw < m_w[i]) n_down++;
      end
      m_w[i] = nw;
      if (lrn) m_pre[i] = 0; else if (step) m_pre[i] = m_pre[i] | int'(x[i]);
    end
    if (lrn) m_post = 0; else if (step) m_post = m_post | f;
    if (step) begin
      m_spk = f;
      if (f) n_fire++;
      if (!m_ref) begin
        if (f) begin m_mp = 0; m_ref = 1; m_fc = 0; end
        else if (fe) begin m_mp = scfg.rest; m_fc = 0; end
        else begin m_mp = cand; m_fc = (fl == 0) ? 0 : (m_fc + 1) & 255; end
      end else begin
        m_mp = cand;
        if (cand >= scfg.rest) m_ref = 0;
      end
    end
  endtask

  task automatic clock_and_check();
    @(posedge clk); model_clock();
    #1;
    for (int i = 0; i < N; i++) check("weight", int'(weights[i]), m_w[i]);
    check("mp", int'(mp), m_mp);
    check("spike", int'(spike), m_spk);
  endtask

  initial begin
    step = 0; learn = 0; learn_en = 0; supervised = 0; teacher = 0; w_we = 0;
    w_sel = '0; w_wdata = '0; x = '0; inhib = '0;
    lcfg = '{rule: RULE_POST, eta_shift: 2'd2};
    scfg = '{thp: 8'd90, rest: 8'd10, slope: 8'd1, frame_len: 8'd16};
    for (int i = 0; i < N; i++) begin m_w[i] = 8; m_pre[i] = 0; end
    m_mp = 0; m_ref = 0; m_fc = 0; m_spk = 0; m_post = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed supervised Hebb: upper 16 inputs active, teacher on
    learn_en = 1; supervised = 1; teacher = 1;
    for (int t = 0; t < 10; t++) begin
      @(negedge clk); x = 32'hFFFF_0000; step = 1; learn = 0;
      clock_and_check();
      @(negedge clk); step = 0; learn = 1;
      clock_and_check();
    end
    for (int i = 0; i < N; i++) check("supervised weight", int'(weights[i]), (i >= 16) ? 15 : 0);
    // random
    for (int it = 0; it < 20000; it++) begin
      if (it % 1000 == 0) begin
        lcfg = '{rule: rule_e'($urandom_range(0, 3)), eta_shift: 2'($urandom)};
        scfg = '{thp: 8'($urandom_range(40, 200)), rest: 8'($urandom_range(0, 20)),
                 slope: 8'($urandom_range(1, 4)),
                 frame_len: ($urandom_range(0, 1) == 0) ? 8'd0 : 8'($urandom_range(3, 24))};
        supervised = 1'($urandom);
        learn_en = ($urandom_range(0, 3) != 0);
      end
      @(negedge clk);
      x = $urandom() & $urandom() & $urandom();
      teacher = 1'($urandom);
      inhib = ($urandom_range(0, 9) == 0) ? mp_t'($urandom_range(0, 40)) : '0;
      step  = 1'($urandom_range(0, 1));
      learn = 1'($urandom_range(0, 2) == 0);
      w_we  = ($urandom_range(0, 30) == 0);
      w_sel = 5'($urandom); w_wdata = weight_t'($urandom);
      clock_and_check();
    end
    $display("spikes %0d weight ups %0d downs %0d", n_fire, n_up, n_down);
    checks++;
    if (n_fire == 0 || n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
