// soma: cell body of a pulse-reactive neuron.
//
// Built from the four parts of the soma: SYNIN (sums the synapse outputs), MPCU
// (membrane potential, decay, time frame, operational/refractory machine), the
// threshold comparator, and storage (the axon spike register and the
// postsynaptic activity latch used for learning).
// Timing: on a time-step strobe the MPCU takes the candidate potential
// MP + sum(psp) - inhib; if it exceeds THP the soma fires. The spike register holds
// the step's axonal spike until the next step strobe, so a downstream layer sees
// it one time-step later. post_act ORs the spikes since the last learn strobe,
// which clears it.
module soma
  import snn_pkg::*;
#(
  parameter int N_SYN = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      step,
  input  logic      learn,
  input  soma_cfg_t cfg,
  input  weight_t   psp [N_SYN],
  input  mp_t       inhib,
  output logic      spike,       // axonal spike of the last time-step
  output logic      post_act,    // spike activity since last learn strobe
  output mp_t       mp,
  output logic      operational
);

  localparam int SUM_BITS = W_BITS + $clog2(N_SYN);

  logic [SUM_BITS-1:0] syn_sum;
  mp_t                 mp_cand;
  logic                fire;
  logic [7:0]          frame_cnt;
  logic                frame_end;

  soma_synin #(.N_SYN(N_SYN)) u_synin (.psp(psp), .sum(syn_sum));

  soma_mpcu #(.SUM_BITS(SUM_BITS)) u_mpcu (
    .clk, .rst_n, .step, .cfg, .syn_sum, .inhib, .fire,
    .mp_cand, .mp, .operational, .frame_cnt, .frame_end
  );

  soma_comparator u_cmp (.mp_cand, .thp(cfg.thp), .operational, .fire);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike    <= 1'b0;
      post_act <= 1'b0;
    end else begin
      if (step)       spike <= fire;
      if (learn)      post_act <= 1'b0;
      else if (step)  post_act <= post_act | fire;
    end
  end

endmodule
