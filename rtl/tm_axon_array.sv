// tm_axon_array -- time-multiplexed axon array: N virtual axon modules, one
// physical axon module.
//
// A virtual axon module has one input address (the neuron whose spike starts
// its ramp), a ramp generator and four axonal delay paths. Path K of module i
// delivers a pre-synaptic spike to synapse K of the neuron that configured
// module i+1+K, so one address per module is enough: the four output
// addresses of module i are the input addresses of modules i+1..i+4.
//
// Sweep. The axon-module index generator reads module `ridx` from the RAMs
// (configured_address_array, ramp_out_array, four delay_arrays); one clock
// later that module is processed and written back. Every module is therefore
// updated once every N clocks (N = 4096: 62 us at 66 MHz). The configured
// address RAM is read four modules ahead and the last five values are kept in
// a shift register, which gives module i its input address and its four output
// addresses from a single read port. Output addresses that fall beyond the
// array (modules N..N+3) come from four tail registers that hold the first
// four spikes after the array filled up, i.e. the first inputs of the next
// array.
//
// Configuration. While `cfg_en` is high (training, and the previous array is
// full) every post-synaptic spike takes the next programming index p: its
// address is written to configured_address_array[p] and module p's ramp is
// started. During the next sweep the paths whose target is p (module p-1-K,
// path K) get their delay programmed. Each module is configured once.
//
// Recall / adaptation. Every post-synaptic spike is held for one sweep by the
// AER address latch; a configured module whose input address matches
// restarts its ramp, and in adaptation mode every running path whose output
// address matches adapts its delay.
//
// Output: the four spike generators' pulses, OR-ed onto one pre-synaptic bus
// (address = OR of the active generators' addresses; no arbiter).
// Configured-address reads are up to four clocks old, so an address written
// just before its lookahead read is seen one sweep late; programming and ramp
// starts use the programming index, not that address, so they are exact.
module tm_axon_array
  import pnn_pkg::*;
#(
  parameter int  N  = 4096,
  localparam int IW = $clog2(N),
  localparam int CW = IW + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  aer_post_t       post_bus,      // AER post-synaptic bus
  input  logic            cfg_en,        // configure modules from bus spikes
  input  delay_mode_e     mode,
  input  adapt_strategy_e strategy,
  input  logic [4:0]      pulse_width,
  output aer_pre_t        pre_bus,       // AER pre-synaptic bus contribution
  output logic            full,          // all N modules configured
  output logic [CW-1:0]   prog_cnt,
  output logic [3:0]      ev_fire,       // per path: a pre-synaptic spike fired
  output logic [3:0]      ev_drop,       // per path: a spike dropped (generator busy)
  output logic [3:0]      ev_prog,       // per path: a delay programmed
  output logic [3:0]      ev_adapt,      // per path: a delay adapted
  output logic            ev_start       // a ramp was started
);
  // ---------------- index generators ----------------
  logic [IW-1:0] ridx, pidx;
  logic          proc_en;
  logic          take;

  axon_index_gen #(.N(N)) u_axon_index (.clk, .rst_n, .idx(ridx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pidx    <= '0;
      proc_en <= 1'b0;
    end else begin
      pidx    <= ridx;
      proc_en <= 1'b1;
    end
  end

  prog_index_gen #(.N(N)) u_prog_index (
    .clk, .rst_n, .en(cfg_en), .spike(post_bus.active), .cnt(prog_cnt), .take, .full
  );

  // ---------------- AER address latch ----------------
  logic          l_valid, l_prog;
  addr_t         l_addr;
  logic [CW-1:0] l_idx;

  aer_addr_latch #(.HOLD(N), .CW(CW)) u_latch (
    .clk, .rst_n, .bus(post_bus), .prog(take), .prog_idx(prog_cnt),
    .valid(l_valid), .addr(l_addr), .l_prog, .l_idx
  );

  // ---------------- configured address array ----------------
  addr_t         cfg_rdata;
  addr_t         tail [4];
  addr_t         win  [1:4];      // cfg of modules i-1+1 .. i-1+4 from the previous clock
  addr_t         cur  [0:4];      // cfg of modules i .. i+4 for the processed module i
  logic [IW-1:0] look;

  assign look = ridx + IW'(4);

  sdp_ram #(.W(ADDR_W), .DEPTH(N)) u_configured_address_array (
    .clk, .we(take && !full), .waddr(prog_cnt[IW-1:0]), .wdata(post_bus.addr),
    .raddr(look), .rdata(cfg_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 4; j++) tail[j] <= '0;
    end else if (take && full) begin
      tail[prog_cnt[1:0]] <= post_bus.addr;
    end
  end

  always_comb begin
    cur[0] = win[1];
    cur[1] = win[2];
    cur[2] = win[3];
    cur[3] = win[4];
    cur[4] = cfg_rdata;
    // module indices i+m beyond the array take the tail registers
    for (int m = 1; m <= 4; m++)
      if ((CW'(pidx) + CW'(m)) >= CW'(N)) cur[m] = tail[2'(pidx + IW'(m))];
  end

  always_ff @(posedge clk) begin
    win[1] <= win[2];
    win[2] <= win[3];
    win[3] <= win[4];
    win[4] <= cfg_rdata;
  end

  // ---------------- ramp generator ----------------
  delay_t ramp;
  logic   running, configured, start;

  assign configured = proc_en && (CW'(pidx) < prog_cnt);
  assign start      = configured && l_valid &&
                      ((l_prog && l_idx == CW'(pidx)) || (l_addr == cur[0]));
  assign ev_start   = start;

  ramp_generator #(.N(N)) u_ramp (
    .clk, .ridx, .pidx, .proc_en, .start, .ramp_out(ramp), .running
  );

  // ---------------- random start delays for adaptation mode ----------------
  delay_t rand_val;
  lfsr #(.W(DELAY_W), .TAPS(9'h110), .INIT(9'h1A5)) u_init_lfsr (
    .clk, .rst_n, .load(1'b0), .seed('0), .step(1'b1), .q(rand_val)
  );

  // ---------------- four axonal delay paths ----------------
  logic  [3:0] p_active;
  addr_t       p_addr [4];

  for (genvar k = 0; k < 4; k++) begin : g_path
    axonal_delay_path #(.N(N), .K(k)) u_path (
      .clk, .rst_n, .ridx, .pidx, .proc_en, .cnt(prog_cnt), .ramp, .running,
      .out_addr(cur[k+1]), .l_valid, .l_addr, .l_prog, .l_idx, .mode, .strategy,
      .rand_val, .pulse_width, .active(p_active[k]), .addr(p_addr[k]),
      .ev_fire(ev_fire[k]), .ev_drop(ev_drop[k]), .ev_prog(ev_prog[k]), .ev_adapt(ev_adapt[k])
    );
  end

  always_comb begin
    pre_bus.active = p_active;
    pre_bus.addr   = '0;
    for (int k = 0; k < 4; k++)
      if (p_active[k]) pre_bus.addr |= p_addr[k];
  end
endmodule
