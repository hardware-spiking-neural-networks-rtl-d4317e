// soma_synin: Synaptic Inputs unit of the soma.
//
// Sums the N_SYN 4-bit synapse outputs (weight while the presynaptic spike is
// present, 0 otherwise) into one unsigned input value for the membrane potential
// computing unit. Purely combinational; the MPCU samples the sum on the time-step
// strobe. With 32 synapses the sum needs 4 + 5 = 9 bits, so it never overflows.
// The original soma reads the synapses on the falling clock edge; here the whole
// design uses the rising edge and the sum settles within the cycle.
module soma_synin
  import snn_pkg::*;
#(
  parameter int N_SYN = 32
) (
  input  weight_t                          psp [N_SYN],
  output logic [W_BITS+$clog2(N_SYN)-1:0]  sum
);

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_SYN; i++) sum += (W_BITS+$clog2(N_SYN))'(psp[i]);
  end

endmodule
