// snn_top: layered pulse-reactive spiking neural network with host interface.
//
// N_IN binary input lines feed a hidden layer of N_HID neurons, whose axonal
// spikes feed an output layer of N_OUT neurons. Every neuron has N_SYN synapses
// with 4-bit learnable weights and an 8-bit membrane potential (see neuron,
// synapse, soma). Hidden neuron h connects synapse i to input i; output neuron o
// connects synapse i to hidden neuron i, and its synapses beyond N_HID have no
// presynaptic neuron (x = 0). Neuron indices for pointers and teacher bits: hidden
// neurons 0..N_HID-1, then output neurons.
//
// Timing: the host loads an input pattern and writes a step count; each time-step
// the input pattern is presented to the hidden layer, hidden spikes are registered
// and reach the output layer on the next time-step, and weights learn after every
// step when enabled. The optional global inhibitory module counts the spikes of
// all neurons and subtracts one shared inhibitory potential from every membrane
// potential; it is off after reset, as in the network the design describes, whose
// synapses are all excitatory.
//
// Host ports: 8-bit address, write data and read data with write/read strobes
// (register map in snn_host_if). out_spikes and busy are also brought out
// directly for observation.
module snn_top
  import snn_pkg::*;
#(
  parameter int N_IN  = 32,
  parameter int N_HID = 24,
  parameter int N_OUT = 4,
  parameter int N_SYN = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       host_addr,
  input  logic [7:0]       host_wdata,
  input  logic             host_wr,
  input  logic             host_rd,
  output logic [7:0]       host_rdata,
  output logic [N_OUT-1:0] out_spikes,
  output logic             busy
);

  localparam int N_NEUR = N_HID + N_OUT;

  logic [N_IN-1:0]           pattern;
  logic [N_NEUR-1:0]         teacher;
  logic                      learn_en, supervised, inhib_en, w_we, step, learn;
  learn_cfg_t                lcfg;
  soma_cfg_t                 scfg;
  weight_t                   ihm_w, w_wdata;
  mp_t                       ihm_slope, ihm_dp;
  logic [$clog2(N_NEUR)-1:0] nptr;
  logic [$clog2(N_SYN)-1:0]  sptr;

  logic [N_NEUR-1:0]         spikes;
  mp_t                       mps     [N_NEUR];
  weight_t                   weights [N_NEUR][N_SYN];
  logic [$clog2(N_NEUR+1)+W_BITS-1:0] ihm_act;

  // read-back multiplexers
  weight_t rd_weight;
  mp_t     rd_mp;
  always_comb begin
    rd_weight = '0;
    rd_mp     = '0;
    if (32'(nptr) < N_NEUR) begin
      rd_weight = weights[nptr][sptr];
      rd_mp     = mps[nptr];
    end
  end

  snn_host_if #(.N_IN(N_IN), .N_NEUR(N_NEUR), .N_SYN(N_SYN), .N_OUT(N_OUT)) u_host (
    .clk, .rst_n, .host_addr, .host_wdata, .host_wr, .host_rd, .host_rdata,
    .rd_weight, .rd_mp, .out_spikes, .ihm_dp,
    .pattern, .teacher, .learn_en, .supervised, .inhib_en, .lcfg, .scfg,
    .ihm_w, .ihm_slope, .nptr, .sptr, .w_we, .w_wdata, .step, .learn, .busy
  );

  for (genvar n = 0; n < N_NEUR; n++) begin : g_neuron
    logic [N_SYN-1:0] x;
    if (n < N_HID) begin : g_hid
      always_comb begin
        x = '0;
        for (int i = 0; i < N_SYN && i < N_IN; i++) x[i] = pattern[i];
      end
    end else begin : g_out
      always_comb begin
        x = '0;
        for (int i = 0; i < N_SYN && i < N_HID; i++) x[i] = spikes[i];
      end
    end

    neuron #(.N_SYN(N_SYN)) u_neuron (
      .clk, .rst_n, .step, .learn, .learn_en, .supervised,
      .teacher(teacher[n]), .lcfg, .scfg, .inhib(ihm_dp), .x,
      .w_we(w_we && 32'(nptr) == n), .w_sel(sptr), .w_wdata,
      .spike(spikes[n]), .mp(mps[n]), .weights(weights[n])
    );
  end

  inhibitory_module #(.N(N_NEUR)) u_ihm (
    .clk, .rst_n, .step, .enable(inhib_en), .spikes, .w_inh(ihm_w),
    .slope(ihm_slope), .dp(ihm_dp), .act_q(ihm_act)
  );

  assign out_spikes = spikes[N_NEUR-1 -: N_OUT];

endmodule
