// tb_synapse: self-checking test of the synapse (pulse multiplier and learning).
// Random sequences of time-step strobes, learn strobes with every rule and
// learning rate, and host weight writes are applied; the weight, the gated
// output and the presynaptic activity latch are compared every cycle with an
// integer model of the four weight-adaptation rules written in this testbench.
module tb_synapse;
  import snn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic step, learn, x, y, w_we, pre_act;
  learn_cfg_t lcfg;
  weight_t w_wdata, psp, weight;
  int checks = 0, failures = 0;
  int m_w, m_pre;
  int n_up = 0, n_down = 0;

  synapse #(.W_INIT(weight_t'(8))) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cdiv(int v, int k);
    return (v + (1 << k) - 1) >> k;
  endfunction

  function automatic int model_update(int w, int xa, int ya, int rule, int k);
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
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int op, nw;
    step = 0; learn = 0; x = 0; y = 0; w_we = 0; w_wdata = '0;
    lcfg = '{rule: RULE_HEBB, eta_shift: 2'd0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    m_w = 8; m_pre = 0;
    @(negedge clk);
    check("reset weight", int'(weight), 8);
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      step = 0; learn = 0; w_we = 0;
      x = 1'($urandom); y = 1'($urandom);
      lcfg = '{rule: rule_e'($urandom_range(0, 3)), eta_shift: 2'($urandom)};
      op = $urandom_range(0, 9);
      if (op < 4) step = 1;
      else if (op < 8) learn = 1;
      else if (op == 8) begin w_we = 1; w_wdata = weight_t'($urandom); end
      #1;
      check("psp", int'(psp), x ? m_w : 0);
      @(posedge clk);
      // model
      nw = m_w;
      if (w_we) nw = int'(w_wdata);
      else if (learn) nw = model_update(m_w, m_pre, int'(y), int'(lcfg.rule), int'(lcfg.eta_shift));
      if (learn && !w_we) begin
        if (nw > m_w) n_up++;
        if (nw < m_w) n_down++;
      end
      if (learn) m_pre = 0; else if (step) m_pre = m_pre | int'(x);
      m_w = nw;
      #1;
      check("weight", int'(weight), m_w);
      check("pre_act", int'(pre_act), m_pre);
      checks++;
      if (weight > W_MAX) failures++;
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL weight never moved both ways: up %0d down %0d", n_up, n_down);
    end
    $display("weight increases %0d, decreases %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
