// synapse: pulse multiplier plus weight learning unit of one synaptic connection.
//
// Pulse multiplier: while the presynaptic spike x is present the synapse presents
// its 4-bit weight to the soma (psp), otherwise 0. No multiplier is needed because
// the spike is binary. The soma samples psp on the time-step strobe.
//
// Learning unit: on each time-step strobe the presynaptic activity x is OR-ed into
// pre_act. On the learn strobe (issued once per time-step after the step strobe when
// learning is enabled) the weight is updated from pre_act and the postsynaptic
// activity y with  w <- w + eta * dw  (eta = 2^-eta_shift), using one of four rules:
//   Hebb          dw = (1-w) x y
//   postsynaptic  dw = (x-1) y + (1-w) x y
//   presynaptic   dw = w x (y-1) + (1-w) x y
//   covariance    dw = (1-w) F if F > 0 else w F, F = tanh(4(1-|x-y|)-2)
// With w scaled to 0..15, "(1-w)" is (15-w), "-1" is -15 and "w" is w. Every step
// is rounded up so a weight always moves, and the result is clamped to 0..15, so a
// weight never exceeds its maximum and never changes sign. For binary x, y the
// covariance F is +-tanh(2) = +-0.96, taken as +-1. pre_act is cleared by learn.
// y is supplied by the neuron: either the soma's own spike activity or, in
// supervised mode, a teacher bit.
//
// Weight write port (w_we/w_wdata) loads fixed or random initial values; reset
// loads W_INIT. The rule set and clamps follow the design description; the
// rounding, the eta shift, the +-1 covariance and the reset value are choices
// of this implementation.
module synapse
  import snn_pkg::*;
#(
  parameter weight_t W_INIT = weight_t'(8)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,      // time-step strobe
  input  logic       learn,     // weight update strobe
  input  learn_cfg_t lcfg,
  input  logic       x,         // presynaptic spike for this time-step
  input  logic       y,         // postsynaptic (or teacher) activity for learning
  input  logic       w_we,      // host weight write
  input  weight_t    w_wdata,
  output weight_t    psp,       // weight while x is present, else 0
  output weight_t    weight,    // stored weight
  output logic       pre_act    // presynaptic activity since last learn
);

  weight_t w_q, w_new;

  // ceil(v / 2^k) without a divider
  function automatic weight_t scale_up(weight_t v, logic [1:0] k);
    logic [W_BITS+2:0] t;
    t = ({3'b000, v} + ((W_BITS+3)'(1) << k) - 1'b1) >> k;
    return weight_t'(t);
  endfunction

  always_comb begin
    weight_t inc_hebb, dec_prop, dec_full;
    inc_hebb = scale_up(W_MAX - w_q, lcfg.eta_shift);      // eta (1-w)
    dec_prop = scale_up(w_q, lcfg.eta_shift);              // eta w
    dec_full = scale_up(W_MAX, lcfg.eta_shift);            // eta * 1
    w_new = w_q;
    unique case (lcfg.rule)
      RULE_HEBB: if (pre_act && y) w_new = w_q + inc_hebb;
      RULE_POST: begin
        if (pre_act && y)       w_new = w_q + inc_hebb;
        else if (!pre_act && y) w_new = (w_q > dec_full) ? w_q - dec_full : '0;
      end
      RULE_PRE: begin
        if (pre_act && y)       w_new = w_q + inc_hebb;
        else if (pre_act && !y) w_new = w_q - dec_prop;
      end
      RULE_COV: begin
        if (pre_act == y) w_new = w_q + inc_hebb;
        else              w_new = w_q - dec_prop;
      end
      default: w_new = w_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q     <= W_INIT;
      pre_act <= 1'b0;
    end else begin
      if (w_we)       w_q <= w_wdata;
      else if (learn) w_q <= w_new;
      if (learn)      pre_act <= 1'b0;
      else if (step)  pre_act <= pre_act | x;
    end
  end

  assign psp    = x ? w_q : '0;
  assign weight = w_q;

endmodule
