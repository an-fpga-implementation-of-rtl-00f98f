// pnn_pkg -- types and constants shared by the polychronous spiking network.
//
// The network talks over two handshake-free address-event (AER) buses. The
// post-synaptic bus carries a 12-bit neuron address and one "active" line;
// the pre-synaptic bus carries the 12-bit address of the target neuron and
// four active lines, one per synapse of that neuron. A spike is present on a
// bus for every clock in which an active line is high. There is no arbiter:
// several drivers are merged with a bitwise OR, so a collision shows up as a
// wrong address, exactly as on an unarbitrated wired bus.
//
// The widths (4096 neurons -> 12 address bits, 9-bit axonal delays, four
// synapses per neuron) follow the published design; the enum encodings are
// this implementation's own.
package pnn_pkg;

  localparam int ADDR_W  = 12;  // 4096 virtual neurons
  localparam int DELAY_W = 9;   // ramp / axonal delay width
  localparam int N_SYN   = 4;   // synapses per neuron = delay paths per axon module

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DELAY_W-1:0] delay_t;

  // AER post-synaptic bus: neurons (and the pattern generator) -> axon arrays
  typedef struct packed {
    logic  active;
    addr_t addr;
  } aer_post_t;

  // AER pre-synaptic bus: axon arrays -> neuron array
  typedef struct packed {
    logic [N_SYN-1:0] active;
    addr_t            addr;
  } aer_pre_t;

  // How axonal delays are set
  typedef enum logic {
    MODE_PROGRAM = 1'b0,  // delay = ramp value when the target spike arrives, once
    MODE_ADAPT   = 1'b1   // random start value, adapted on every target spike
  } delay_mode_e;

  // Delay adaptation step strategies
  typedef enum logic [1:0] {
    STRAT_ONE_STEP     = 2'd0,  // jump to the measured value
    STRAT_UNIT_STEP    = 2'd1,  // move by one count towards it
    STRAT_PROPORTIONAL = 2'd2   // move by half of the difference
  } adapt_strategy_e;

endpackage
