// tb_soma_synin: self-checking test of the synaptic input adder.
// Applies all-zero, all-maximum, single-synapse and random synapse outputs and
// compares the sum with a sum computed in the testbench.
module tb_soma_synin;
  import snn_pkg::*;
  localparam int N = 32;

  weight_t    psp [N];
  logic [8:0] sum;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  soma_synin #(.N_SYN(N)) dut (.psp, .sum);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    int exp = 0;
    foreach (psp[i]) exp += int'(psp[i]);
    #1;
    checks++;
    if (int'(sum) != exp) begin
      failures++;
      $display("FAIL sum %0d exp %0d", sum, exp);
    end
  endtask

  initial begin
    foreach (psp[i]) psp[i] = '0;
    apply_and_check();
    foreach (psp[i]) psp[i] = W_MAX;
    apply_and_check();   // 32 * 15 = 480
    for (int j = 0; j < N; j++) begin
      foreach (psp[i]) psp[i] = (i == j) ? weight_t'(j % 16) : '0;
      apply_and_check();
    end
    for (int it = 0; it < 2000; it++) begin
      foreach (psp[i]) psp[i] = ($urandom_range(0, 1) == 1) ? weight_t'($urandom) : '0;
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
