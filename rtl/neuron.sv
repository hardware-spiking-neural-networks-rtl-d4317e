// neuron: one pulse-reactive spiking neuron, N_SYN synapses feeding one soma.
//
// Each synapse gates its weight with its presynaptic spike x[i]; the soma sums
// them, updates the membrane potential and fires. For learning, every synapse of
// the neuron sees the same postsynaptic activity: the soma's own spike activity
// since the last learn strobe, or, when `supervised` is set, the teacher bit
// supplied by the host (supervised Hebb learning). The learn strobe only reaches
// the synapses when learn_en is set. One weight can be written per cycle through
// w_we / w_sel / w_wdata. All weights are brought out for read-back.
module neuron
  import snn_pkg::*;
#(
  parameter int      N_SYN  = 32,
  parameter weight_t W_INIT = weight_t'(8)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     step,
  input  logic                     learn,
  input  logic                     learn_en,
  input  logic                     supervised,
  input  logic                     teacher,
  input  learn_cfg_t               lcfg,
  input  soma_cfg_t                scfg,
  input  mp_t                      inhib,
  input  logic [N_SYN-1:0]         x,
  input  logic                     w_we,
  input  logic [$clog2(N_SYN)-1:0] w_sel,
  input  weight_t                  w_wdata,
  output logic                     spike,
  output mp_t                      mp,
  output weight_t                  weights [N_SYN]
);

  weight_t          psp [N_SYN];
  logic [N_SYN-1:0] pre_act;
  logic             post_act, operational, y, learn_g;

  assign learn_g = learn & learn_en;
  assign y       = supervised ? teacher : post_act;

  for (genvar i = 0; i < N_SYN; i++) begin : g_syn
    synapse #(.W_INIT(W_INIT)) u_syn (
      .clk, .rst_n, .step, .learn(learn_g), .lcfg, .x(x[i]), .y,
      .w_we(w_we && (w_sel == i)), .w_wdata,
      .psp(psp[i]), .weight(weights[i]), .pre_act(pre_act[i])
    );
  end

  soma #(.N_SYN(N_SYN)) u_soma (
    .clk, .rst_n, .step, .learn(learn_g), .cfg(scfg), .psp, .inhib,
    .spike, .post_act, .mp, .operational
  );

endmodule
