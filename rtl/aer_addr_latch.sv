// aer_addr_latch -- holds the latest post-synaptic spike for one full sweep.
//
// A spike on the AER post-synaptic bus (one clock of `active`) is captured
// together with whether it is being used for configuration and, if so, the
// programming index it was given. The captured spike stays valid for exactly
// HOLD clocks, one visit of every virtual axon module, and is then cleared. A
// new spike that arrives while one is held replaces it and restarts the hold
// (the arrays have no queue; the design relies on spikes being sparse).
module aer_addr_latch
  import pnn_pkg::*;
#(
  parameter int  HOLD = 4096,
  parameter int  CW   = 13,
  localparam int HW   = $clog2(HOLD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  aer_post_t     bus,
  input  logic          prog,      // this spike configures a module
  input  logic [CW-1:0] prog_idx,  // ... with this programming index
  output logic          valid,
  output addr_t         addr,
  output logic          l_prog,
  output logic [CW-1:0] l_idx
);
  logic [HW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      addr   <= '0;
      l_prog <= 1'b0;
      l_idx  <= '0;
      left   <= '0;
    end else if (bus.active) begin
      valid  <= 1'b1;
      addr   <= bus.addr;
      l_prog <= prog;
      l_idx  <= prog_idx;
      left   <= HW'(HOLD - 1);
    end else if (valid) begin
      if (left == '0) valid <= 1'b0;
      else            left  <= left - 1'b1;
    end
  end
endmodule
