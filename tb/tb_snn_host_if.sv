// tb_snn_host_if: self-checking test of the host register interface.
// Checks the reset values, write/read-back of every register, decoding of the
// pattern, teacher and configuration outputs, the weight-write strobe and the
// auto-incrementing synapse pointer, read-back of the network values (supplied
// here by simple functions of the pointers), and the time-step sequencer: N
// steps take exactly 2N clocks, each a step strobe followed by a learn strobe.
module tb_snn_host_if;
  import snn_pkg::*;
  localparam int N_IN = 32, N_NEUR = 28, N_SYN = 32, N_OUT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] host_addr, host_wdata, host_rdata;
  logic host_wr, host_rd;
  weight_t rd_weight, ihm_w, w_wdata;
  mp_t rd_mp, ihm_dp, ihm_slope;
  logic [N_OUT-1:0] out_spikes;
  logic [N_IN-1:0] pattern;
  logic [N_NEUR-1:0] teacher;
  logic learn_en, supervised, inhib_en, w_we, step, learn, busy;
  learn_cfg_t lcfg;
  soma_cfg_t scfg;
  logic [4:0] nptr, sptr;
  int checks = 0, failures = 0;
  int n_step = 0, n_learn = 0, n_we = 0, last_we_sptr = -1;

  snn_host_if #(.N_IN(N_IN), .N_NEUR(N_NEUR), .N_SYN(N_SYN), .N_OUT(N_OUT)) dut (.*);

  assign rd_weight = weight_t'(nptr + sptr);
  assign rd_mp     = mp_t'(nptr * 7);

  always @(posedge clk) begin
    if (step) n_step++;
    if (learn) n_learn++;
    if (w_we) begin n_we++; last_we_sptr = int'(sptr); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
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

  initial begin
    int d, t0, t1;
    host_addr = '0; host_wdata = '0; host_wr = 0; host_rd = 0;
    out_spikes = 4'b1010; ihm_dp = 8'd77;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(8'h10, d); check("ctrl reset", d, 8'h26);
    rd(8'h11, d); check("thp reset", d, 90);
    rd(8'h12, d); check("rest reset", d, 10);
    rd(8'h13, d); check("slope reset", d, 1);
    rd(8'h14, d); check("frame reset", d, 16);
    // write/read-back
    for (int a = 8'h00; a <= 8'h03; a++) begin wr(a, 8'hA0 + a); rd(a, d); check("pattern rb", d, 8'hA0 + a); end
    check("pattern out", int'(pattern), 32'hA3A2A1A0);
    for (int a = 8'h08; a <= 8'h0B; a++) begin wr(a, 8'h51 + a); rd(a, d); check("teacher rb", d, 8'h51 + a); end
    check("teacher out", int'(teacher), int'(28'hC5B5A59));
    wr(8'h10, 8'b0101_1011); rd(8'h10, d); check("ctrl rb", d, 8'h5B);
    check("learn_en", int'(learn_en), 1); check("supervised", int'(supervised), 1);
    check("rule", int'(lcfg.rule), 2); check("eta", int'(lcfg.eta_shift), 1);
    check("inhib_en", int'(inhib_en), 1);
    wr(8'h11, 120); wr(8'h12, 12); wr(8'h13, 3); wr(8'h14, 9); wr(8'h15, 6); wr(8'h16, 2);
    check("thp", int'(scfg.thp), 120); check("rest", int'(scfg.rest), 12);
    check("slope", int'(scfg.slope), 3); check("frame", int'(scfg.frame_len), 9);
    check("ihm_w", int'(ihm_w), 6); check("ihm_slope", int'(ihm_slope), 2);
    rd(8'h15, d); check("ihm_w rb", d, 6);
    // pointers, weight write and auto increment
    wr(8'h17, 5); wr(8'h18, 30);
    wr(8'h19, 8'h0C);
    check("we count", n_we, 1); check("we sptr", last_we_sptr, 30);
    rd(8'h18, d); check("sptr inc", d, 31);
    rd(8'h19, d); check("weight rb", d, (5 + 31) & 15);
    rd(8'h18, d); check("sptr wrap", d, 0);
    rd(8'h1A, d); check("mp rb", d, 35);
    rd(8'h1B, d); check("out rb", d, 4'b1010);
    rd(8'h1D, d); check("dp rb", d, 77);
    // sequencer: 5 steps = 10 clocks
    @(negedge clk); host_addr = 8'h1C; host_wdata = 8'd5; host_wr = 1;
    t0 = n_step;
    @(negedge clk); host_wr = 0;
    d = 0;
    while (busy) begin @(negedge clk); d++; end
    check("steps", n_step - t0, 5); check("learns", n_learn, 5);
    check("clocks for 5 steps", d, 11);  // 2 per step, busy covers the last learn strobe
    rd(8'h1C, d); check("run done", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
