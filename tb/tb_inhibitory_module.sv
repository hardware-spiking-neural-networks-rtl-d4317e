// tb_inhibitory_module: self-checking test of the global inhibitory module.
// Random spike vectors, weights and decay slopes are applied with random
// time-step strobes; DP and the stored weighted activity are compared with
//   DP <- min(255, max(DP - slope, 0) + w * popcount(spikes))
// after every clock. Directed checks: a quiet network lets DP decay to 0, a
// fully active one drives it into saturation, and disabling clears it.
module tb_inhibitory_module;
  import snn_pkg::*;
  localparam int N = 28;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic step, enable;
  logic [N-1:0] spikes;
  weight_t w_inh;
  mp_t slope, dp;
  logic [8:0] act_q;
  int checks = 0, failures = 0;
  int m_dp, m_act, c_sat, c_decay0;

  inhibitory_module #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic clk_model();
    int c = 0, d;
    @(posedge clk);
    for (int i = 0; i < N; i++) c += int'(spikes[i]);
    if (!enable) begin m_dp = 0; m_act = 0; end
    else if (step) begin
      d = (m_dp > int'(slope)) ? m_dp - int'(slope) : 0;
      m_act = c * int'(w_inh);
      if (d + m_act > 255) c_sat++;
      if (m_dp != 0 && d + m_act == 0) c_decay0++;
      m_dp = (d + m_act > 255) ? 255 : d + m_act;
    end
    #1;
    check("dp", int'(dp), m_dp);
    check("act", int'(act_q), m_act);
  endtask

  initial begin
    step = 0; enable = 0; spikes = '0; w_inh = weight_t'(3); slope = 8'd5;
    m_dp = 0; m_act = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1; step = 1; spikes = '1; w_inh = W_MAX;
    clk_model();                       // 28 * 15 = 420 -> 255
    check("saturated", int'(dp), 255);
    for (int t = 0; t < 60; t++) begin @(negedge clk); spikes = '0; clk_model(); end
    check("decayed", int'(dp), 0);
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      step   = 1'($urandom_range(0, 1));
      enable = ($urandom_range(0, 99) != 0);
      spikes = N'($urandom() & $urandom() & $urandom());
      w_inh  = weight_t'($urandom);
      slope  = mp_t'($urandom_range(0, 30));
      clk_model();
    end
    $display("saturations %0d decays to zero %0d", c_sat, c_decay0);
    checks++;
    if (c_sat == 0 || c_decay0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
