// prog_index_gen -- the axon-module programming index generator.
//
// Counts the post-synaptic spikes that arrive while configuration is enabled;
// the count is the number of the virtual axon module that the next spike will
// configure. The count runs from 0 up to N+4 and then holds. Values 0..N-1
// name modules of this array; the four values N..N+3 are the spikes that
// still have to program the delays of the last four modules (whose output
// addresses are the first inputs of the next array). `full` goes high when
// all N modules have an input address, and enables configuration of the next
// array. Only a reset clears the count: each module is configured once.
module prog_index_gen #(
  parameter int  N  = 4096,
  localparam int CW = $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,       // configuration enabled for this array
  input  logic          spike,    // post-synaptic spike on the bus this clock
  output logic [CW-1:0] cnt,
  output logic          take,     // this spike is being counted
  output logic          full
);
  localparam logic [CW-1:0] LAST = CW'(N + 4);

  assign take = en && spike && (cnt != LAST);
  assign full = (cnt >= CW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (take) cnt <= cnt + 1'b1;
  end
endmodule
