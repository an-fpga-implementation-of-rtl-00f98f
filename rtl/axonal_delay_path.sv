// axonal_delay_path -- delay path K of all virtual axon modules of one array.
//
// Holds the stored delay of path K for every virtual module (delay_array RAM),
// a delay adaptor and a spike generator. Path K of module i leads to the
// neuron whose spike configured module i+1+K, so its output address is that
// module's input address (`out_addr`, supplied by the array) and it drives
// synapse K (active line K) of the target neuron.
// In the processing clock of module i (one clock after its read), with the
// module's ramp value `ramp` (before this step):
//  * the path is valid once its target spike has been counted: i+1+K < cnt;
//  * if the held spike is the configuring spike number i+1+K, the delay is
//    programmed (ramp value or random, see delay_adaptor) and nothing fires;
//  * otherwise, if the held spike's address equals `out_addr` and the ramp is
//    running, the delay is adapted (adaptation mode only);
//  * a valid path whose running ramp equals its stored delay fires a
//    pre-synaptic spike: the ramp is about to step past the delay.
module axonal_delay_path
  import pnn_pkg::*;
#(
  parameter int  N  = 4096,
  parameter int  K  = 0,
  localparam int IW = $clog2(N),
  localparam int CW = IW + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IW-1:0]   ridx,
  input  logic [IW-1:0]   pidx,
  input  logic            proc_en,
  input  logic [CW-1:0]   cnt,          // modules/spikes counted by the programming index
  input  delay_t          ramp,
  input  logic            running,
  input  addr_t           out_addr,
  input  logic            l_valid,      // held post-synaptic spike
  input  addr_t           l_addr,
  input  logic            l_prog,
  input  logic [CW-1:0]   l_idx,
  input  delay_mode_e     mode,
  input  adapt_strategy_e strategy,
  input  delay_t          rand_val,
  input  logic [4:0]      pulse_width,
  output logic            active,
  output addr_t           addr,
  output logic            ev_fire,
  output logic            ev_drop,
  output logic            ev_prog,
  output logic            ev_adapt
);
  delay_t         delay_stored, delay_new;
  logic           we, adapted, valid, prog_hit, adapt_hit, fire;
  logic [CW-1:0]  target;

  assign target    = CW'(pidx) + CW'(K + 1);
  assign valid     = proc_en && (target < cnt);
  assign prog_hit  = valid && l_valid && l_prog && (l_idx == target);
  assign adapt_hit = valid && l_valid && !prog_hit && running && (l_addr == out_addr);
  assign fire      = valid && !prog_hit && running && (ramp == delay_stored);

  delay_adaptor u_adaptor (
    .mode, .strategy, .prog_hit, .adapt_hit, .ramp, .delay_old(delay_stored),
    .rand_val, .we, .delay_new, .adapted
  );

  sdp_ram #(.W(DELAY_W), .DEPTH(N)) u_delay_array (
    .clk, .we(we && proc_en), .waddr(pidx), .wdata(delay_new), .raddr(ridx), .rdata(delay_stored)
  );

  spike_generator u_spike_gen (
    .clk, .rst_n, .pulse_width, .fire, .fire_addr(out_addr), .active, .addr, .dropped(ev_drop)
  );

  assign ev_fire  = fire;
  assign ev_prog  = prog_hit;
  assign ev_adapt = adapted && proc_en;
endmodule
