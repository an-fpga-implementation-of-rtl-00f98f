// pnn_system -- polychronous spiking neural network with programmable and
// adaptive axonal delays: the complete system.
//
// A pattern of spikes is stored as axonal delays: the neuron of every spike
// in the pattern receives four axons, from the neurons of the four spikes
// before it, whose delays equal the time between those spikes and its own.
// When the first spikes of a stored pattern are replayed, each later neuron
// receives three or four coincident inputs and fires, and the pattern
// continues on its own.
//
// Blocks:
//  * N_ARRAYS time-multiplexed axon arrays (tm_axon_array), each N_AXON
//    virtual axon modules with four delay paths. During configuration they
//    fill one after the other: array a is enabled once array a-1 is full.
//    In recall they all work in parallel.
//  * a multiplexed neuron array (mux_neuron_array): 4096 virtual
//    coincidence-detecting neurons on NP physical ones;
//  * a pattern generator and a pattern checker.
// The AER post-synaptic bus joins the neuron array, the pattern generator and
// its noise source and feeds all axon arrays; the AER pre-synaptic bus joins
// all axon arrays and feeds the neuron array. Neither has an arbiter.
//
// The run-time settings (mode, strategy, pulse width, pattern settings,
// threshold, noise) and the results are plain ports; on the FPGA they are
// reached through vendor debug cores, which are not part of this RTL.
// The ev_* outputs are one-clock event strobes for monitoring.
// Defaults: 70 arrays x 4096 modules x 4 paths (about 1.15 M axons), 128
// physical neurons, 1 ms = 66000 clocks at 66 MHz.
module pnn_system
  import pnn_pkg::*;
#(
  parameter int          N_ARRAYS = 70,
  parameter int          N_AXON   = 4096,
  parameter int          NP       = 128,
  parameter int          WINDOW   = 66000,     // 1 ms
  parameter int          INTEG_SHIFT = 4,      // neuron integration delay scale
  parameter int unsigned ISI_MIN  = 66000,     // 1 ms
  parameter int unsigned ISI_STEP = 1650,      // 25 us
  parameter int unsigned GAP      = 2640000,   // 40 ms
  parameter int unsigned PULSE    = 264000,    // 4 ms
  parameter int unsigned OFF_MIN  = 33000,     // 500 us
  parameter int unsigned OFF_SPAN = 33000      // 500 us
) (
  input  logic            clk,
  input  logic            rst_n,
  // run-time settings
  input  logic            start,           // start a training or recall run
  input  logic            recall,          // 0: training, 1: recall
  input  logic            configure,       // training spikes configure new axon modules
  input  delay_mode_e     mode,
  input  adapt_strategy_e strategy,
  input  logic [4:0]      pulse_width,     // pre-synaptic pulse, 1..16 clocks
  input  logic [15:0]     n_patterns,
  input  logic [7:0]      pat_len,
  input  logic [11:0]     seed_idx,
  input  logic [15:0]     seed_isi,
  input  logic            noise_en,
  input  logic [31:0]     noise_period,
  input  logic [6:0]      threshold_pct,
  input  logic            clear_stats,
  // results
  output logic            gen_busy,
  output logic            gen_done,
  output logic            result_valid,
  output logic [7:0]      result_hits,
  output logic [7:0]      result_checked,
  output logic            result_ok,
  output logic [15:0]     n_seen,
  output logic [15:0]     n_recalled,
  output logic [N_ARRAYS-1:0] arrays_full,
  output aer_post_t       post_bus,
  output aer_pre_t        pre_bus,
  // monitoring strobes
  output logic            ev_axon_fire,
  output logic            ev_axon_drop,
  output logic            ev_delay_prog,
  output logic            ev_delay_adapt,
  output logic            ev_ramp_start,
  output logic            ev_neuron_assign,
  output logic            ev_neuron_evict,
  output logic            ev_neuron_collision,
  output logic            ev_post_collision,
  output logic            ev_pre_collision,
  output logic            ev_net_spike
);
  // ---------------- pattern generator and checker ----------------
  aer_post_t   pat_spike, noise_spike, net_spike;
  logic        exp_valid, exp_check, pattern_end;
  addr_t       exp_addr;
  logic [31:0] exp_isi;

  pattern_generator #(.ISI_MIN(ISI_MIN), .ISI_STEP(ISI_STEP), .GAP(GAP)) u_gen (
    .clk, .rst_n, .start, .recall, .n_patterns, .pat_len, .seed_idx, .seed_isi,
    .noise_en, .noise_period, .pat_spike, .noise_spike, .exp_valid, .exp_addr,
    .exp_isi, .exp_check, .pattern_end, .busy(gen_busy), .done(gen_done)
  );

  pattern_checker #(.PULSE(PULSE), .OFF_MIN(OFF_MIN), .OFF_SPAN(OFF_SPAN)) u_chk (
    .clk, .rst_n, .clear(clear_stats), .exp_valid, .exp_addr, .exp_isi, .exp_check,
    .net_spike, .pattern_end, .threshold_pct, .result_valid, .result_hits,
    .result_checked, .result_ok, .n_seen, .n_recalled
  );

  // ---------------- AER post-synaptic bus ----------------
  aer_post_t post_src [3];
  assign post_src[0] = net_spike;
  assign post_src[1] = pat_spike;
  assign post_src[2] = noise_spike;

  aer_post_bus #(.NS(3)) u_post_bus (.src(post_src), .bus(post_bus), .collision(ev_post_collision));

  // ---------------- axon arrays ----------------
  aer_pre_t          pre_src [N_ARRAYS];
  logic [N_ARRAYS-1:0] a_fire, a_drop, a_prog, a_adapt, a_start;

  for (genvar a = 0; a < N_ARRAYS; a++) begin : g_axon
    logic [3:0]               fire, drop, prog, adapt;
    logic [$clog2(N_AXON):0]  cnt;
    logic                     cfg_en;

    if (a == 0) begin : g_first
      assign cfg_en = configure;
    end else begin : g_next
      assign cfg_en = configure && arrays_full[a-1];
    end

    tm_axon_array #(.N(N_AXON)) u_array (
      .clk, .rst_n, .post_bus, .cfg_en, .mode, .strategy, .pulse_width,
      .pre_bus(pre_src[a]), .full(arrays_full[a]), .prog_cnt(cnt),
      .ev_fire(fire), .ev_drop(drop), .ev_prog(prog), .ev_adapt(adapt), .ev_start(a_start[a])
    );

    assign a_fire[a]  = |fire;
    assign a_drop[a]  = |drop;
    assign a_prog[a]  = |prog;
    assign a_adapt[a] = |adapt;
  end

  aer_pre_bus #(.NS(N_ARRAYS)) u_pre_bus (.src(pre_src), .bus(pre_bus), .collision(ev_pre_collision));

  // ---------------- neuron array ----------------
  logic ev_event_unused;

  mux_neuron_array #(.NP(NP), .WINDOW(WINDOW), .INTEG_SHIFT(INTEG_SHIFT)) u_neurons (
    .clk, .rst_n, .pre_bus, .post_bus(net_spike), .ev_event(ev_event_unused),
    .ev_assign(ev_neuron_assign), .ev_evict(ev_neuron_evict), .ev_collision(ev_neuron_collision)
  );

  assign ev_axon_fire   = |a_fire;
  assign ev_axon_drop   = |a_drop;
  assign ev_delay_prog  = |a_prog;
  assign ev_delay_adapt = |a_adapt;
  assign ev_ramp_start  = |a_start;
  assign ev_net_spike   = net_spike.active;
endmodule
