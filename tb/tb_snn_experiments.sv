// tb_snn_experiments: the two measured experiments of the original hardware,
// repeated on the full-size network through the host ports.
//
// Weight trace under supervised learning: the yield is "too high", so only the
// most significant input group (lines 24..31) carries spikes. Hidden neuron 0 has
// its teacher bit set, learning uses the postsynaptic rule (supervised Hebb), and
// all 32 weights of neuron 0 are read back after every time-step. The weights
// of the active group must rise step by step to 15; the weights of the three
// inactive groups must fall step by step to 0. From the reset weight 8 with
// eta = 1/4 the expected traces are 8,10,12,13,14,15 and 8,4,0.
//
// Membrane potential trace: THP 90, resting potential 10, no learning, no time
// frame. Three input lines with weight 5 raise neuron 0's potential by 15 per
// step. The potential, read back after every step, must be 15, 30, ... 90, then
// the soma fires (candidate 105 > 90) and reads 0. It then climbs 1 per step,
// with the input ignored, back to 10, and the cycle repeats from there: a
// spike every 16 steps, at steps 7, 23 and 39 of 40.
// Expected values are worked out in this testbench from those rules.
module tb_snn_experiments;
  import snn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] host_addr, host_wdata, host_rdata;
  logic host_wr, host_rd, busy;
  logic [3:0] out_spikes;
  int checks = 0, failures = 0;

  snn_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic run1();
    wr(8'h1C, 1);
    while (busy) @(negedge clk);
  endtask

  initial begin
    int d, w [32];
    int up_trace [6] = '{8, 10, 12, 13, 14, 15};
    int dn_trace [6] = '{8, 4, 0, 0, 0, 0};
    int exp_mp, refr, fires;
    host_addr = '0; host_wdata = '0; host_wr = 0; host_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- weight trace ----
    wr(8'h03, 8'hFF);                 // inputs 24..31 active
    wr(8'h08, 8'h01);                 // teacher bit of neuron 0
    wr(8'h10, 8'h27);                 // learn, supervised, postsynaptic, eta 1/4
    wr(8'h17, 0);
    for (int t = 0; t < 6; t++) begin
      if (t > 0) run1();
      wr(8'h18, 0);
      for (int i = 0; i < 32; i++) rd(8'h19, w[i]);
      $display("step %0d weights group A %0d, group B %0d", t, w[24], w[0]);
      for (int i = 0; i < 32; i++) check("weight trace", w[i], (i >= 24) ? up_trace[t] : dn_trace[t]);
    end

    // ---- membrane potential trace ----
    rst_n = 0; repeat (2) @(posedge clk); rst_n = 1;
    wr(8'h10, 8'h26);                 // learning off
    wr(8'h14, 0);                     // no time frame
    wr(8'h17, 0); wr(8'h18, 0);
    for (int i = 0; i < 32; i++) wr(8'h19, (i < 3) ? 5 : 0);
    wr(8'h00, 8'h07); wr(8'h01, 0); wr(8'h02, 0); wr(8'h03, 0);
    exp_mp = 0; refr = 0; fires = 0;
    for (int t = 0; t < 40; t++) begin
      run1();
      if (refr) begin
        exp_mp = exp_mp + 1;
        if (exp_mp >= 10) refr = 0;
      end else if (exp_mp + 15 > 90) begin
        exp_mp = 0; refr = 1; fires++;
      end else exp_mp = exp_mp + 15;
      rd(8'h1A, d);
      check("mp trace", d, exp_mp);
    end
    $display("MP trace: %0d spikes in 40 steps", fires);
    check("spikes in MP trace", fires, 3);   // steps 7, 23 and 39
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
