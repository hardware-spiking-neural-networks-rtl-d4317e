// tb_soma: self-checking test of the complete soma (SYNIN, MPCU, comparator,
// spike and activity registers).
// First a directed run with the experiment's settings (THP 90, rest 10): a
// steady input of 3 synapses x weight 5 raises the potential by 15 per step
// from 0, so the soma must fire on the 7th step (MP 105 > 90), drop to 0, and
// recover to rest before firing again. Then random synapse outputs, learn
// strobes and settings are compared step by step with a testbench model.
module tb_soma;
  import snn_pkg::*;
  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic step, learn, spike, post_act, operational;
  soma_cfg_t cfg;
  weight_t psp [N];
  mp_t inhib, mp;
  int checks = 0, failures = 0;

  soma #(.N_SYN(N)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_mp, m_ref, m_fc, m_spk, m_post, n_fire;

  function automatic int toward(int v, int rest, int slope);
    if (v > rest) return (v - rest > slope) ? v - slope : rest;
    return (rest - v > slope) ? v + slope : rest;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // one clock of the model; stp/lrn are the strobes applied in that clock
  task automatic model_clock(int stp, int lrn);
    int s = 0, cand, raw, fe, f, fl;
    foreach (psp[i]) s += int'(psp[i]);
    fl = int'(cfg.frame_len);
    if (m_ref) cand = toward(m_mp, cfg.rest, cfg.slope);
    else if (s != 0 || inhib != 0) begin
      raw = m_mp + s - int'(inhib);
      cand = raw < 0 ? 0 : raw > 255 ? 255 : raw;
    end else cand = toward(m_mp, cfg.rest, cfg.slope);
    fe = (!m_ref && fl != 0 && m_fc == fl - 1);
    f  = (!m_ref && cand > int'(cfg.thp));
    if (lrn) m_post = 0; else if (stp) m_post = m_post | f;
    if (stp) begin
      m_spk = f;
      if (f) n_fire++;
      if (!m_ref) begin
        if (f) begin m_mp = 0; m_ref = 1; m_fc = 0; end
        else if (fe) begin m_mp = cfg.rest; m_fc = 0; end
        else begin m_mp = cand; m_fc = (fl == 0) ? 0 : (m_fc + 1) & 255; end
      end else begin
        m_mp = cand;
        if (cand >= cfg.rest) m_ref = 0;
      end
    end
  endtask

  initial begin
    int first_fire;
    step = 0; learn = 0; inhib = '0;
    foreach (psp[i]) psp[i] = '0;
    cfg = '{thp: 8'd90, rest: 8'd10, slope: 8'd1, frame_len: 8'd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    m_mp = 0; m_ref = 0; m_fc = 0; m_spk = 0; m_post = 0;
    // directed: 3 active synapses of weight 5
    foreach (psp[i]) psp[i] = (i < 3) ? weight_t'(5) : '0;
    first_fire = -1;
    for (int t = 1; t <= 12; t++) begin
      @(negedge clk); step = 1;
      @(posedge clk); model_clock(1, 0);
      #1;
      if (spike && first_fire < 0) first_fire = t;
      check("directed mp", int'(mp), m_mp);
    end
    check("first spike at step 7", first_fire, 7);
    // random
    for (int it = 0; it < 20000; it++) begin
      if (it % 2000 == 0)
        cfg = '{thp: 8'($urandom_range(40, 250)), rest: 8'($urandom_range(0, 20)),
                slope: 8'($urandom_range(1, 4)),
                frame_len: ($urandom_range(0, 1) == 0) ? 8'd0 : 8'($urandom_range(3, 24))};
      @(negedge clk);
      foreach (psp[i]) psp[i] = ($urandom_range(0, 19) == 0) ? weight_t'($urandom) : '0;
      inhib = ($urandom_range(0, 9) == 0) ? mp_t'($urandom_range(0, 40)) : '0;
      step  = 1'($urandom_range(0, 2) != 0);
      learn = 1'($urandom_range(0, 3) == 0);
      @(posedge clk); model_clock(int'(step), int'(learn));
      #1;
      check("mp", int'(mp), m_mp);
      check("spike", int'(spike), m_spk);
      check("post_act", int'(post_act), m_post);
      check("operational", int'(operational), !m_ref);
    end
    $display("spikes: %0d", n_fire);
    checks++;
    if (n_fire < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
