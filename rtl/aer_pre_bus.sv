// aer_pre_bus -- the AER pre-synaptic bus shared by NS axon arrays, no arbiter.
//
// Each axon array drives a 12-bit target address and four active lines (one
// per synapse of the target). The bus ORs the active lines of all arrays and
// ORs the addresses of the arrays that have any line active. With a single
// driver the word passes unchanged; overlapping pulses from several arrays
// give a corrupted address for the clocks they overlap (`collision`).
module aer_pre_bus
  import pnn_pkg::*;
#(
  parameter int NS = 70
) (
  input  aer_pre_t src [NS],
  output aer_pre_t bus,
  output logic     collision
);
  always_comb begin
    int n;
    n   = 0;
    bus = '0;
    for (int s = 0; s < NS; s++)
      if (src[s].active != '0) begin
        bus.active |= src[s].active;
        bus.addr   |= src[s].addr;
        n++;
      end
    collision = (n > 1);
  end
endmodule
