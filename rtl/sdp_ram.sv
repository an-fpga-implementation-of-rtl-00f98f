// sdp_ram -- simple dual-port RAM, one write port and one synchronous read port.
//
// Models the on-chip block RAMs that hold the per-virtual-module state of the
// time-multiplexed arrays (configured addresses, ramp values, delays). Write
// and read happen on the same clock; the read data appears one clock after
// the read address (registered output, as in an FPGA block RAM). A read of
// the address being written in the same clock returns the old contents.
// The contents are not reset: every location is written before the design
// relies on it.
module sdp_ram #(
  parameter int W     = 9,
  parameter int DEPTH = 4096,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
