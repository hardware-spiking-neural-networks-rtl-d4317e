// soma_comparator: threshold comparison of the soma.
//
// Compares the candidate (updated) membrane potential with the adjustable
// threshold potential THP and requests an axonal spike when MP > THP (strictly
// greater, as in the design description). The request is only raised while the
// neuron is in its operational state: a refractory neuron cannot fire.
// Combinational; the MPCU and the spike register act on it at the time-step strobe.
module soma_comparator
  import snn_pkg::*;
(
  input  mp_t  mp_cand,      // updated membrane potential
  input  mp_t  thp,          // threshold potential
  input  logic operational,  // neuron is in the operational state
  output logic fire          // emit an axonal spike
);

  assign fire = operational && (mp_cand > thp);

endmodule
