// aer_post_bus -- the AER post-synaptic bus: NS drivers, no arbiter.
//
// Each driver puts a one-clock spike (active line + 12-bit address) on the
// bus. The bus is the OR of all drivers, with each address gated by its own
// active line: one driver at a time passes through unchanged, two at a time
// give a corrupted address. `collision` flags clocks with more than one
// active driver so that such events can be counted.
module aer_post_bus
  import pnn_pkg::*;
#(
  parameter int NS = 3
) (
  input  aer_post_t src [NS],
  output aer_post_t bus,
  output logic      collision
);
  always_comb begin
    int n;
    n   = 0;
    bus = '0;
    for (int s = 0; s < NS; s++)
      if (src[s].active) begin
        bus.active = 1'b1;
        bus.addr  |= src[s].addr;
        n++;
      end
    collision = (n > 1);
  end
endmodule
