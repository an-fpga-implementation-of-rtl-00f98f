// delay_adaptor -- computes the new stored delay of one axonal delay path.
//
// Purely combinational. Two events can change a delay:
//  * program: the path's target spike arrived during configuration. In
//    delay-programming mode the delay becomes the current ramp value (the
//    measured pre-to-post interval); in delay-adaptation mode it becomes a
//    random start value.
//  * adapt (delay-adaptation mode only): the path's target neuron fired while
//    the ramp was running. The difference d = ramp - delay is the timing error
//    between the post-synaptic spike and the pre-synaptic spike. If d != 0 the
//    delay moves towards the ramp: fully (one-step), by one count (unit-step)
//    or by d/2 rounded away from zero (proportional, coefficient 0.5).
// The three strategies follow the published design; the rounding is this
// implementation's choice (it lets the proportional rule reach d = 0).
module delay_adaptor
  import pnn_pkg::*;
(
  input  delay_mode_e     mode,
  input  adapt_strategy_e strategy,
  input  logic            prog_hit,
  input  logic            adapt_hit,
  input  delay_t          ramp,
  input  delay_t          delay_old,
  input  delay_t          rand_val,
  output logic            we,
  output delay_t          delay_new,
  output logic            adapted     // an adaptation step was applied
);
  logic signed [DELAY_W:0] diff, step;
  logic [DELAY_W:0]        mag;

  always_comb begin
    diff = $signed({1'b0, ramp}) - $signed({1'b0, delay_old});
    mag  = diff[DELAY_W] ? (DELAY_W+1)'(-diff) : diff;
    unique case (strategy)
      STRAT_ONE_STEP:     step = diff;
      STRAT_UNIT_STEP:    step = diff[DELAY_W] ? -(DELAY_W+1)'(1) : (DELAY_W+1)'(1);
      default:            step = diff[DELAY_W] ? -$signed((mag + 1'b1) >> 1)
                                               :  $signed((mag + 1'b1) >> 1);
    endcase

    we        = 1'b0;
    adapted   = 1'b0;
    delay_new = delay_old;
    if (prog_hit) begin
      we        = 1'b1;
      delay_new = (mode == MODE_PROGRAM) ? ramp : rand_val;
    end else if (adapt_hit && mode == MODE_ADAPT && diff != 0) begin
      we        = 1'b1;
      adapted   = 1'b1;
      delay_new = DELAY_W'($signed({1'b0, delay_old}) + step);
    end
  end
endmodule
