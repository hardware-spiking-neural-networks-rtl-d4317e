// snn_pkg: types and constants shared by the pulse-reactive spiking neural network.
//
// The widths follow the design: synaptic weights are 4-bit unsigned values
// (0 = no efficacy, 15 = full efficacy) and membrane / threshold potentials are
// 8-bit unsigned values. Hyperpolarisation is represented by potential 0, below the
// programmable resting potential, so no signed arithmetic is needed.
//
// The learning rule encoding, the learning-rate shift and the configuration
// structs are choices of this implementation.
package snn_pkg;

  localparam int W_BITS  = 4;   // synaptic weight width
  localparam int MP_BITS = 8;   // membrane / threshold potential width

  typedef logic [W_BITS-1:0]  weight_t;
  typedef logic [MP_BITS-1:0] mp_t;

  localparam weight_t W_MAX  = weight_t'((1 << W_BITS) - 1);
  localparam mp_t     MP_MAX = mp_t'((1 << MP_BITS) - 1);

  // Weight adaptation rules (delta-w with binary pre/post activity x, y).
  typedef enum logic [1:0] {
    RULE_HEBB = 2'd0,   // dw = (1-w) x y
    RULE_POST = 2'd1,   // dw = (x-1) y + (1-w) x y
    RULE_PRE  = 2'd2,   // dw = w x (y-1) + (1-w) x y
    RULE_COV  = 2'd3    // dw = (1-w) F if F > 0, w F otherwise; F = +-1 for binary x, y
  } rule_e;

  // Learning configuration broadcast to every synapse.
  typedef struct packed {
    rule_e      rule;
    logic [1:0] eta_shift;   // learning rate eta = 2^-eta_shift
  } learn_cfg_t;

  // Soma configuration broadcast to every soma.
  typedef struct packed {
    mp_t        thp;         // threshold potential
    mp_t        rest;        // resting potential
    mp_t        slope;       // decay / recovery per time-step
    logic [7:0] frame_len;   // time-frame length in time-steps, 0 = no frame
  } soma_cfg_t;

  // Neuron states of the Moore machine.
  typedef enum logic {
    ST_OPERATIONAL = 1'b0,
    ST_REFRACTORY  = 1'b1
  } nstate_e;

endpackage
