// tb_soma_comparator: self-checking test of the threshold comparator.
// Sweeps every membrane potential against a set of thresholds, including equal
// values (no spike: the rule is MP > THP), in both neuron states.
module tb_soma_comparator;
  import snn_pkg::*;

  mp_t  mp_cand, thp;
  logic operational, fire;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  soma_comparator dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thps [5] = '{0, 1, 90, 200, 255};
    foreach (thps[t]) for (int m = 0; m < 256; m++) for (int op = 0; op < 2; op++) begin
      mp_cand = mp_t'(m); thp = mp_t'(thps[t]); operational = op[0];
      #1;
      checks++;
      if (fire != (op == 1 && m > thps[t])) begin
        failures++;
        $display("FAIL mp %0d thp %0d op %0d fire %0d", m, thps[t], op, fire);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
