// tb_soma_mpcu: self-checking test of the membrane potential computing unit.
// Random synaptic sums (often zero, so decay is exercised), occasional global
// inhibition, and several threshold / rest / slope / frame settings are applied.
// The threshold decision is driven from the testbench's own model, and the
// candidate potential, the registered potential, the state and the frame counter
// are compared with that model after every time-step. Each mechanism (input
// accumulation, saturation, decay to rest, recovery from hyperpolarisation,
// spike, refractory exit, frame end, inhibition clamp) must occur at least once.
module tb_soma_mpcu;
  import snn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic step, fire, operational, frame_end;
  soma_cfg_t cfg;
  logic [8:0] syn_sum;
  mp_t inhib, mp_cand, mp;
  logic [7:0] frame_cnt;
  int checks = 0, failures = 0;

  soma_mpcu #(.SUM_BITS(9)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int m_mp, m_ref, m_fc;
  int c_acc, c_sat, c_down, c_up, c_fire, c_exit, c_frame, c_clamp;

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

  initial begin
    int cand, fl, fe, f, s, inh, raw;
    step = 0; fire = 0; syn_sum = '0; inhib = '0;
    cfg = '{thp: 8'd90, rest: 8'd10, slope: 8'd1, frame_len: 8'd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    m_mp = 0; m_ref = 0; m_fc = 0;
    for (int it = 0; it < 30000; it++) begin
      if (it % 1000 == 0)
        cfg = '{thp: 8'($urandom_range(40, 250)), rest: 8'($urandom_range(0, 20)),
                slope: 8'($urandom_range(1, 5)),
                frame_len: ($urandom_range(0, 2) == 0) ? 8'd0 : 8'($urandom_range(3, 24))};
      @(negedge clk);
      s   = ($urandom_range(0, 2) == 0) ? $urandom_range(0, 480) % ($urandom_range(1, 4) * 20) : 0;
      inh = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 60) : 0;
      syn_sum = 9'(s); inhib = mp_t'(inh);
      step = 1'($urandom_range(0, 3) != 0);
      fl = int'(cfg.frame_len);
      // model candidate and decision
      if (m_ref) cand = toward(m_mp, cfg.rest, cfg.slope);
      else if (s != 0 || inh != 0) begin
        raw  = m_mp + s - inh;
        cand = raw < 0 ? 0 : raw > 255 ? 255 : raw;
      end else cand = toward(m_mp, cfg.rest, cfg.slope);
      fe = (!m_ref && fl != 0 && m_fc == fl - 1);
      f  = (!m_ref && cand > int'(cfg.thp));
      fire = f[0];
      #1;
      check("mp_cand", int'(mp_cand), cand);
      check("frame_end", int'(frame_end), fe);
      check("operational", int'(operational), !m_ref);
      @(posedge clk);
      if (step) begin
        if (!m_ref && (s != 0 || inh != 0)) begin
          c_acc++;
          if (m_mp + s - inh > 255) c_sat++;
          if (m_mp + s - inh < 0) c_clamp++;
        end
        if (!m_ref && s == 0 && inh == 0 && m_mp > cfg.rest) c_down++;
        if (m_mp < cfg.rest && (m_ref || (s == 0 && inh == 0))) c_up++;
        if (!m_ref) begin
          if (f) begin m_mp = 0; m_ref = 1; m_fc = 0; c_fire++; end
          else if (fe) begin m_mp = cfg.rest; m_fc = 0; c_frame++; end
          else begin m_mp = cand; m_fc = (fl == 0) ? 0 : (m_fc + 1) & 255; end
        end else begin
          m_mp = cand;
          if (cand >= cfg.rest) begin m_ref = 0; c_exit++; end
        end
      end
      #1;
      check("mp", int'(mp), m_mp);
      check("frame_cnt", int'(frame_cnt), m_fc);
    end
    $display("acc %0d sat %0d clamp %0d down %0d up %0d fire %0d exit %0d frame %0d",
             c_acc, c_sat, c_clamp, c_down, c_up, c_fire, c_exit, c_frame);
    checks++;
    if (!(c_acc && c_sat && c_clamp && c_down && c_up && c_fire && c_exit && c_frame)) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
