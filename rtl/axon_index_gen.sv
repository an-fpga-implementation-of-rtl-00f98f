// axon_index_gen -- the axon-module index generator of a time-multiplexed array.
//
// A free-running counter that names the virtual module being read from the
// state RAMs in this clock. It starts at 0 after reset and advances by one
// every clock, wrapping after N-1, so every virtual module is visited once
// every N clocks (4096 clocks, about 62 us at 66 MHz, in the published
// configuration). N must be a power of two, as in the published 12-bit counter.
module axon_index_gen #(
  parameter int  N  = 4096,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [IW-1:0] idx
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idx <= '0;
    else        idx <= idx + 1'b1;   // wraps naturally: N is 2^IW
  end

  initial assert (N == (1 << IW)) else $error("axon_index_gen: N must be a power of two");
endmodule
