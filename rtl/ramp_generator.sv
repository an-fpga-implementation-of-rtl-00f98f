// ramp_generator -- the per-module ramp counters of a time-multiplexed axon array.
//
// Every virtual axon module owns one DELAY_W-bit ramp value, stored in a RAM
// (ramp_out_array). The value read for module i one clock after `ridx` = i is
// given out as `ramp_out`; in that same processing clock the adder writes back
// ramp_out+1, or 0 when `start` is high (the module's input neuron has just
// fired). The ramp stops at its maximum value 2^DELAY_W-1, which therefore
// also means "idle": `running` is low there. One step takes one sweep of all
// N modules, so with N = 4096 at 66 MHz the ramp covers 2^9 x 62 us = 32 ms.
// Contents are not reset: a module's ramp is only read after its first start.
module ramp_generator
  import pnn_pkg::*;
#(
  parameter int  N  = 4096,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic [IW-1:0] ridx,      // module read this clock (axon-module index)
  input  logic [IW-1:0] pidx,      // module processed this clock (ridx one clock later)
  input  logic          proc_en,   // write back this clock
  input  logic          start,     // restart the processed module's ramp at 0
  output delay_t        ramp_out,  // ramp of the processed module before this step
  output logic          running
);
  localparam delay_t RMAX = '1;
  delay_t ramp_in;

  assign running = (ramp_out != RMAX);

  always_comb begin
    if (start)        ramp_in = '0;
    else if (running) ramp_in = ramp_out + 1'b1;
    else              ramp_in = RMAX;
  end

  sdp_ram #(.W(DELAY_W), .DEPTH(N)) u_ramp_out_array (
    .clk, .we(proc_en), .waddr(pidx), .wdata(ramp_in), .raddr(ridx), .rdata(ramp_out)
  );
endmodule
