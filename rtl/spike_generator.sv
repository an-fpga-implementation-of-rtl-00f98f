// spike_generator -- drives one pre-synaptic spike onto the AER bus.
//
// When `fire` is seen the target address is captured and `active` is held for
// `pulse_width` clocks (1..16, set at run time; 0 is treated as 1). While a
// pulse is in progress any further `fire` is dropped and reported on
// `dropped`: a second address would corrupt the unarbitrated bus. The wide
// pulse lets a receiver still see the right address before and after a
// partial collision with another driver.
module spike_generator
  import pnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] pulse_width,
  input  logic       fire,
  input  addr_t      fire_addr,
  output logic       active,
  output addr_t      addr,
  output logic       dropped
);
  logic [4:0] left;

  assign active  = (left != '0);
  assign dropped = fire && active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      addr <= '0;
    end else if (fire && !active) begin
      left <= (pulse_width == '0) ? 5'd1 : (pulse_width > 5'd16 ? 5'd16 : pulse_width);
      addr <= fire_addr;
    end else if (active) begin
      left <= left - 1'b1;
    end
  end
endmodule
