// mux_neuron_array -- 4096 virtual coincidence-detecting neurons built from NP
// physical neurons and a controller.
//
// Seen from the axon arrays this is a neuron array of 4096 neurons: it takes
// the AER pre-synaptic bus (a 12-bit address plus one active line per
// synapse) and drives the AER post-synaptic bus (12-bit address, one active
// line, one clock per spike). Inside, the controller assigns each virtual
// neuron that receives a spike to a free physical neuron for 1 ms, and maps
// the physical neuron's output back to the virtual address. Only a few
// percent of the neurons are active at any time, so NP = 128 suffices.
// Latency from the pre-synaptic event to the physical neuron is one clock;
// from the physical neuron's fire to the AER post-synaptic bus one clock;
// the neuron itself adds its integration delay (see physical_neuron).
module mux_neuron_array
  import pnn_pkg::*;
#(
  parameter int  NP     = 128,
  parameter int  WINDOW = 66000,
  parameter int  INTEG_SHIFT = 4,
  localparam int PW     = $clog2(NP)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  aer_pre_t  pre_bus,
  output aer_post_t post_bus,
  output logic      ev_event,
  output logic      ev_assign,
  output logic      ev_evict,
  output logic      ev_collision
);
  logic [3:0]    p_active;
  logic [PW-1:0] p_addr, q_addr;
  logic          p_assign, q_active;

  neuron_controller #(.NP(NP), .WINDOW(WINDOW)) u_controller (
    .clk, .rst_n, .pre_bus, .p_active, .p_addr, .p_assign, .q_active, .q_addr,
    .post_bus, .ev_event, .ev_assign, .ev_evict
  );

  physical_neuron_array #(.NP(NP), .WINDOW(WINDOW), .INTEG_SHIFT(INTEG_SHIFT)) u_phys (
    .clk, .rst_n, .p_active, .p_addr, .p_assign, .q_active, .q_addr, .collision(ev_collision)
  );
endmodule
