// lfsr -- Galois linear feedback shift register used as a pseudo-random source.
//
// Each clock with `step` high the register shifts right by one and, when the
// bit shifted out is 1, is XORed with TAPS. With a maximal-length TAPS mask it
// visits all 2^W-1 non-zero states. `load` (priority over step) sets the
// register to `seed`; a zero seed is replaced by 1 so the register can never
// lock up. The polynomials are this implementation's choice: 0x110 (9 bit),
// 0xE08 (12 bit), 0xB400 (16 bit) are maximal-length masks.
module lfsr #(
  parameter int         W    = 16,
  parameter logic [W-1:0] TAPS = 16'hB400,
  parameter logic [W-1:0] INIT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= (INIT == '0) ? W'(1) : INIT;
    else if (load)    q <= (seed == '0) ? W'(1) : seed;
    else if (step)    q <= (q >> 1) ^ (q[0] ? TAPS : '0);
  end
endmodule
