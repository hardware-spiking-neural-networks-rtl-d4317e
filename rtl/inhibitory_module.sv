// inhibitory_module: global inhibitory module (IHM).
//
// Instead of an inhibitory dendrite per neuron, one module gathers the axonal
// spikes of the neurons of the inhibiting set and returns one global inhibitory
// dendrite potential DP to every neuron:
//     DP[n] = w_inh * (number of spikes in step n-1) + max(DP[n-1] - slope, 0)
// Per time-step strobe the spike vector of the previous step (the neurons'
// registered axon outputs) is counted, the count is multiplied by the 4-bit
// inhibitory weight and the product is held in a register (act_q, the activity of
// the step); DP decays by `slope` and adds the product, saturating at 255.
// So spikes of step n-1 inhibit the neurons at step n+1.
// The original description gives the decay both as "decrease with a slope" and as a factor
// gamma * DP; this module follows the slope, which needs no multiplier.
// enable = 0 holds DP at 0 (the original hardware network ran without it).
module inhibitory_module
  import snn_pkg::*;
#(
  parameter int N = 28
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         enable,
  input  logic [N-1:0] spikes,    // axon outputs of the inhibiting set
  input  weight_t      w_inh,     // inhibitory weight
  input  mp_t          slope,     // decay per time-step
  output mp_t          dp,        // global inhibitory dendrite potential
  output logic [$clog2(N+1)+W_BITS-1:0] act_q   // weighted activity of last step
);

  localparam int CNT_BITS = $clog2(N + 1);
  localparam int PRD_BITS = CNT_BITS + W_BITS;

  logic [CNT_BITS-1:0] cnt;
  logic [PRD_BITS-1:0] prod;
  mp_t                 dp_q, dp_dec;
  logic [PRD_BITS:0]   dp_sum;

  always_comb begin
    cnt = '0;
    for (int i = 0; i < N; i++) cnt += CNT_BITS'(spikes[i]);
  end

  assign prod   = PRD_BITS'(cnt) * PRD_BITS'(w_inh);
  assign dp_dec = (dp_q > slope) ? dp_q - slope : '0;
  assign dp_sum = (PRD_BITS+1)'(dp_dec) + (PRD_BITS+1)'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_q  <= '0;
      act_q <= '0;
    end else if (!enable) begin
      dp_q  <= '0;
      act_q <= '0;
    end else if (step) begin
      act_q <= prod;
      dp_q  <= (dp_sum > (PRD_BITS+1)'(MP_MAX)) ? MP_MAX : mp_t'(dp_sum);
    end
  end

  assign dp = dp_q;

endmodule
