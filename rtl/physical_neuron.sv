// physical_neuron -- one coincidence-detecting neuron of the physical neuron array.
//
// Address comparator: the neuron reacts to the physical pre-synaptic bus when
// the bus address equals its index ID. Each of its four synapses (active
// lines 0..3) has a timer: a spike on a synapse whose timer is idle starts it;
// a spike on a synapse whose timer is running is ignored. A timer counts clock
// cycles since its spike and stops after WINDOW cycles (1 ms = 66000 cycles at
// 66 MHz).
// Comparator & adder: when a spike makes three or more timers run at once,
// the neuron sums the elapsed counts of all running timers and waits
// sum >> INTEG_SHIFT cycles before firing; tightly coincident inputs
// therefore fire sooner than dispersed ones, a cheap stand-in for a real
// integration time. The sum-of-timers rule is the published one; the scale
// (1/16 by default) is this implementation's choice: at full scale the extra
// delay adds up from neuron to neuron along a recalled pattern and pushes
// its later spikes out of the checker's detection windows.
// Spike generator: `fire` is high for one clock; afterwards the timers are
// cleared and the neuron is refractory (ignores input) for WINDOW cycles.
// `assign_i` with a selecting bus word means the controller has just handed
// this neuron to a new virtual neuron: all state is cleared before the spike
// is applied (this clearing is the implementation's own choice).
module physical_neuron #(
  parameter int  ID     = 0,
  parameter int  PW     = 7,          // physical address width (128 neurons)
  parameter int  WINDOW = 66000,      // coincidence window and refractory time, in clocks
  parameter int  INTEG_SHIFT = 4,     // integration delay = timer sum >> INTEG_SHIFT clocks
  localparam int TW     = $clog2(WINDOW + 1),
  localparam int SW     = TW + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3:0]    p_active,     // physical pre-synaptic bus
  input  logic [PW-1:0] p_addr,
  input  logic          p_assign,
  output logic          fire
);
  logic [3:0]    t_run, starts;
  logic [TW-1:0] t_val [4];
  logic          pending, refr;
  logic [SW-1:0] wait_cnt, sum;
  logic [TW-1:0] refr_cnt;
  logic          sel;
  logic [2:0]    n_run;

  assign sel = (p_addr == PW'(ID)) && (p_active != '0);

  always_comb begin
    logic [3:0] base;
    base   = (sel && p_assign) ? 4'b0 : t_run;
    starts = (sel && !refr) ? (p_active & ~base) : 4'b0;
    n_run  = 3'(base[0] | starts[0]) + 3'(base[1] | starts[1])
           + 3'(base[2] | starts[2]) + 3'(base[3] | starts[3]);
    sum    = '0;
    for (int k = 0; k < 4; k++)
      if (base[k]) sum += SW'(t_val[k]);
  end

  assign fire = pending && (wait_cnt == '0);

  logic clear, trigger;
  assign clear   = sel && p_assign;
  assign trigger = (starts != '0) && (n_run >= 3'd3) && (clear || !pending);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_run    <= '0;
      for (int k = 0; k < 4; k++) t_val[k] <= '0;
      pending  <= 1'b0;
      wait_cnt <= '0;
      refr     <= 1'b0;
      refr_cnt <= '0;
    end else if (fire && !clear) begin
      pending  <= 1'b0;
      t_run    <= '0;
      refr     <= 1'b1;
      refr_cnt <= TW'(WINDOW - 1);
    end else begin
      // timers: a new spike starts an idle timer, a running one counts to WINDOW
      for (int k = 0; k < 4; k++) begin
        if (starts[k]) begin
          t_run[k] <= 1'b1;
          t_val[k] <= '0;
        end else if (clear || !t_run[k]) begin
          t_run[k] <= 1'b0;
        end else if (t_val[k] == TW'(WINDOW - 1)) begin
          t_run[k] <= 1'b0;
        end else begin
          t_val[k] <= t_val[k] + 1'b1;
        end
      end
      // comparator & adder: third coincident input schedules the output spike
      if (trigger) begin
        pending  <= 1'b1;
        wait_cnt <= sum >> INTEG_SHIFT;
      end else if (clear) begin
        pending  <= 1'b0;
      end else if (pending) begin
        wait_cnt <= wait_cnt - 1'b1;
      end
      // refractory period
      if (clear) begin
        refr <= 1'b0;
      end else if (refr) begin
        if (refr_cnt == '0) refr <= 1'b0;
        else                refr_cnt <= refr_cnt - 1'b1;
      end
    end
  end
endmodule
