// snn_host_if: host register interface and time-step sequencer of the network.
//
// The network is driven by a PC through 8-bit digital ports, so its inputs,
// parameters and results are multiplexed onto an address port, a write-data
// port and a read-data port. A write strobe stores host_wdata in the register at
// host_addr; a read strobe captures the addressed value in host_rdata on the
// next clock edge.
//
//   addr        access  contents
//   0x00-0x07   W/R     input spike pattern, byte k = inputs 8k..8k+7
//   0x08-0x0F   W/R     teacher bits, byte k = neurons 8k..8k+7
//   0x10        W/R     [0] learn_en [1] supervised [3:2] rule [5:4] eta_shift
//                       [6] inhib_en
//   0x11..0x14  W/R     THP, resting potential, slope, time-frame length
//   0x15, 0x16  W/R     inhibitory weight [3:0], inhibitory decay slope
//   0x17, 0x18  W/R     neuron pointer, synapse pointer
//   0x19        W/R     weight[neuron ptr][synapse ptr]; the synapse pointer
//                       increments after each access, so a row streams out
//   0x1A        R       membrane potential of neuron ptr
//   0x1B        R       output-layer spikes of the last time-step
//   0x1C        W/R     write N: run N time-steps; read: steps still to run
//   0x1D        R       global inhibitory potential
//
// Sequencer: each time-step takes two clocks, a `step` strobe (all somas update,
// spikes register) followed by a `learn` strobe (synapses of neurons with
// learning enabled update their weights). The run register counts the steps
// down; busy is high while steps remain. This covers the experiment phases:
// deliver input spikes, learn/simulate, read weights, read membrane potentials.
// The register map, reset values and two-clock time-step are choices of this
// implementation; reset values of THP (90) and resting potential (10) are the
// ones used in the original experiments.
module snn_host_if
  import snn_pkg::*;
#(
  parameter int N_IN   = 32,
  parameter int N_NEUR = 28,
  parameter int N_SYN  = 32,
  parameter int N_OUT  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host ports
  input  logic [7:0]                host_addr,
  input  logic [7:0]                host_wdata,
  input  logic                      host_wr,
  input  logic                      host_rd,
  output logic [7:0]                host_rdata,
  // read-back from the network
  input  weight_t                   rd_weight,   // weight at (nptr, sptr)
  input  mp_t                       rd_mp,       // MP of neuron nptr
  input  logic [N_OUT-1:0]          out_spikes,
  input  mp_t                       ihm_dp,
  // to the network
  output logic [N_IN-1:0]           pattern,
  output logic [N_NEUR-1:0]         teacher,
  output logic                      learn_en,
  output logic                      supervised,
  output logic                      inhib_en,
  output learn_cfg_t                lcfg,
  output soma_cfg_t                 scfg,
  output weight_t                   ihm_w,
  output mp_t                       ihm_slope,
  output logic [$clog2(N_NEUR)-1:0] nptr,
  output logic [$clog2(N_SYN)-1:0]  sptr,
  output logic                      w_we,
  output weight_t                   w_wdata,
  output logic                      step,
  output logic                      learn,
  output logic                      busy
);

  localparam int NB_IN = (N_IN + 7) / 8;
  localparam int NB_T  = (N_NEUR + 7) / 8;

  localparam logic [7:0] A_PAT   = 8'h00, A_TEACH = 8'h08, A_CTRL  = 8'h10,
                         A_THP   = 8'h11, A_REST  = 8'h12, A_SLOPE = 8'h13,
                         A_FRAME = 8'h14, A_IHMW  = 8'h15, A_IHMS  = 8'h16,
                         A_NPTR  = 8'h17, A_SPTR  = 8'h18, A_WGT   = 8'h19,
                         A_MP    = 8'h1A, A_OUT   = 8'h1B, A_RUN   = 8'h1C,
                         A_DP    = 8'h1D;

  logic [7:0] pat_q   [NB_IN];
  logic [7:0] teach_q [NB_T];
  logic [7:0] ctrl_q, thp_q, rest_q, slope_q, frame_q, ihms_q;
  weight_t    ihmw_q;
  logic [7:0] run_q;
  logic       phase_q;

  // assertion: the host never reads and writes in the same cycle
  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(host_wr && host_rd));

  logic wgt_access;
  assign wgt_access = (host_wr || host_rd) && host_addr == A_WGT;
  assign w_we       = host_wr && host_addr == A_WGT;
  assign w_wdata    = host_wdata[W_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB_IN; i++) pat_q[i]   <= '0;
      for (int i = 0; i < NB_T; i++)  teach_q[i] <= '0;
      ctrl_q  <= 8'h26;  // supervised, postsynaptic rule, eta = 1/4, learning and inhibition off
      thp_q   <= 8'd90;
      rest_q  <= 8'd10;
      slope_q <= 8'd1;
      frame_q <= 8'd16;
      ihmw_q  <= weight_t'(1);
      ihms_q  <= 8'd4;
      nptr    <= '0;
      sptr    <= '0;
    end else begin
      if (host_wr) begin
        for (int i = 0; i < NB_IN; i++)
          if (host_addr == A_PAT + 8'(i)) pat_q[i] <= host_wdata;
        for (int i = 0; i < NB_T; i++)
          if (host_addr == A_TEACH + 8'(i)) teach_q[i] <= host_wdata;
        unique case (host_addr)
          A_CTRL:  ctrl_q  <= host_wdata;
          A_THP:   thp_q   <= host_wdata;
          A_REST:  rest_q  <= host_wdata;
          A_SLOPE: slope_q <= host_wdata;
          A_FRAME: frame_q <= host_wdata;
          A_IHMW:  ihmw_q  <= host_wdata[W_BITS-1:0];
          A_IHMS:  ihms_q  <= host_wdata;
          A_NPTR:  nptr    <= ($clog2(N_NEUR))'(host_wdata);
          A_SPTR:  sptr    <= ($clog2(N_SYN))'(host_wdata);
          default: ;
        endcase
      end
      if (wgt_access) sptr <= sptr + 1'b1;
    end
  end

  // read mux, registered on the read strobe
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rdata <= '0;
    else if (host_rd) begin
      host_rdata <= '0;
      for (int i = 0; i < NB_IN; i++)
        if (host_addr == A_PAT + 8'(i)) host_rdata <= pat_q[i];
      for (int i = 0; i < NB_T; i++)
        if (host_addr == A_TEACH + 8'(i)) host_rdata <= teach_q[i];
      unique case (host_addr)
        A_CTRL:  host_rdata <= ctrl_q;
        A_THP:   host_rdata <= thp_q;
        A_REST:  host_rdata <= rest_q;
        A_SLOPE: host_rdata <= slope_q;
        A_FRAME: host_rdata <= frame_q;
        A_IHMW:  host_rdata <= 8'(ihmw_q);
        A_IHMS:  host_rdata <= ihms_q;
        A_NPTR:  host_rdata <= 8'(nptr);
        A_SPTR:  host_rdata <= 8'(sptr);
        A_WGT:   host_rdata <= 8'(rd_weight);
        A_MP:    host_rdata <= rd_mp;
        A_OUT:   host_rdata <= 8'(out_spikes);
        A_RUN:   host_rdata <= run_q;
        A_DP:    host_rdata <= ihm_dp;
        default: ;
      endcase
    end
  end

  // time-step sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= '0;
      phase_q <= 1'b0;
      step    <= 1'b0;
      learn   <= 1'b0;
    end else begin
      step  <= 1'b0;
      learn <= 1'b0;
      if (host_wr && host_addr == A_RUN) begin
        run_q   <= host_wdata;
        phase_q <= 1'b0;
      end else if (run_q != 8'd0) begin
        if (!phase_q) begin
          step    <= 1'b1;
          phase_q <= 1'b1;
        end else begin
          learn   <= 1'b1;
          phase_q <= 1'b0;
          run_q   <= run_q - 8'd1;
        end
      end
    end
  end

  assign busy = (run_q != 8'd0) || step || learn;

  always_comb begin
    for (int i = 0; i < N_IN; i++)   pattern[i] = pat_q[i / 8][i % 8];
    for (int i = 0; i < N_NEUR; i++) teacher[i] = teach_q[i / 8][i % 8];
  end

  assign learn_en   = ctrl_q[0];
  assign supervised = ctrl_q[1];
  assign lcfg       = '{rule: rule_e'(ctrl_q[3:2]), eta_shift: ctrl_q[5:4]};
  assign inhib_en   = ctrl_q[6];
  assign scfg       = '{thp: thp_q, rest: rest_q, slope: slope_q, frame_len: frame_q};
  assign ihm_w      = ihmw_q;
  assign ihm_slope  = ihms_q;

endmodule
