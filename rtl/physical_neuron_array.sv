// physical_neuron_array -- NP identical physical neurons on two internal buses.
//
// All neurons listen to the physical pre-synaptic bus (driven by the
// controller) and each compares the bus address with its own index. Their
// one-clock output spikes are merged onto the physical post-synaptic bus
// without arbitration: `active` is the OR of all fire signals and the address
// is the OR of the indices of the neurons firing in that clock, so two
// neurons firing in the same clock produce a wrong address, as on the
// unarbitrated AER buses of the rest of the network.
module physical_neuron_array #(
  parameter int  NP     = 128,
  parameter int  WINDOW = 66000,
  parameter int  INTEG_SHIFT = 4,
  localparam int PW     = $clog2(NP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3:0]    p_active,
  input  logic [PW-1:0] p_addr,
  input  logic          p_assign,
  output logic          q_active,     // physical post-synaptic bus
  output logic [PW-1:0] q_addr,
  output logic          collision     // more than one neuron fired this clock
);
  logic [NP-1:0] fire;

  for (genvar j = 0; j < NP; j++) begin : g_neuron
    physical_neuron #(.ID(j), .PW(PW), .WINDOW(WINDOW), .INTEG_SHIFT(INTEG_SHIFT)) u_neuron (
      .clk, .rst_n, .p_active, .p_addr, .p_assign, .fire(fire[j])
    );
  end

  always_comb begin
    q_addr = '0;
    for (int j = 0; j < NP; j++)
      if (fire[j]) q_addr |= PW'(j);
  end
  assign q_active  = |fire;
  assign collision = (fire & (fire - 1'b1)) != '0;
endmodule
