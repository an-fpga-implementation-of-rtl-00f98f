// neuron_controller -- maps 4096 virtual neurons onto NP physical neurons.
//
// Register array: NP virtual addresses, one per physical neuron. Timer array:
// NP timers of WINDOW clocks (1 ms); a physical neuron is "assigned" while
// its timer runs. Neuron index generator: a log2(NP)-bit counter naming the
// next physical neuron to hand out; it wraps around.
//
// Input side: the AER pre-synaptic bus carries pulses several clocks long. A
// new event is taken when an active line rises or the address changes while
// lines are active (the latter is how a collision on the bus shows up). For
// an event with virtual address A the register array is searched in
// parallel. If an assigned neuron holds A, the spike goes to it. Otherwise, in
// the same clock, A is stored in the register named by the index generator,
// its timer is started, the spike is sent to that neuron with `assign` set,
// and the index generator advances. The spike leaves on the physical
// pre-synaptic bus one clock later, for one clock.
// Output side: a spike on the physical post-synaptic bus from neuron j is sent
// out on the AER post-synaptic bus one clock later, for one clock, with the
// virtual address held in register j.
module neuron_controller
  import pnn_pkg::*;
#(
  parameter int  NP     = 128,
  parameter int  WINDOW = 66000,
  localparam int PW     = $clog2(NP),
  localparam int TW     = $clog2(WINDOW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  aer_pre_t      pre_bus,
  output logic [3:0]    p_active,     // physical pre-synaptic bus
  output logic [PW-1:0] p_addr,
  output logic          p_assign,
  input  logic          q_active,     // physical post-synaptic bus
  input  logic [PW-1:0] q_addr,
  output aer_post_t     post_bus,     // AER post-synaptic bus
  output logic          ev_event,     // a pre-synaptic event was taken
  output logic          ev_assign,    // ... and a physical neuron was assigned to it
  output logic          ev_evict      // ... evicting one whose timer still ran
);
  addr_t         regs  [NP];
  logic [TW-1:0] tval  [NP];
  logic [NP-1:0] trun;
  logic [PW-1:0] nidx;

  // ---------------- event detection ----------------
  aer_pre_t   prev;
  logic [3:0] lines;
  logic       fresh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev <= '0;
    else        prev <= pre_bus;
  end

  always_comb begin
    fresh = (prev.active == '0) || (prev.addr != pre_bus.addr);
    lines = fresh ? pre_bus.active : (pre_bus.active & ~prev.active);
  end
  assign ev_event = (lines != '0);

  // ---------------- associative search ----------------
  logic          hit;
  logic [PW-1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int j = NP - 1; j >= 0; j--)
      if (trun[j] && regs[j] == pre_bus.addr) begin
        hit     = 1'b1;
        hit_idx = PW'(j);
      end
  end

  assign ev_assign = ev_event && !hit;
  assign ev_evict  = ev_assign && trun[nidx];

  // ---------------- register array, timer array, index generator ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trun     <= '0;
      nidx     <= '0;
      p_active <= '0;
      p_addr   <= '0;
      p_assign <= 1'b0;
      for (int j = 0; j < NP; j++) begin
        regs[j] <= '0;
        tval[j] <= '0;
      end
    end else begin
      for (int j = 0; j < NP; j++)
        if (trun[j]) begin
          if (tval[j] == TW'(WINDOW - 1)) trun[j] <= 1'b0;
          else                            tval[j] <= tval[j] + 1'b1;
        end
      p_active <= lines;
      p_assign <= ev_assign;
      if (ev_event && hit) begin
        p_addr <= hit_idx;
      end else if (ev_assign) begin
        p_addr     <= nidx;
        regs[nidx] <= pre_bus.addr;
        trun[nidx] <= 1'b1;
        tval[nidx] <= '0;
        nidx       <= nidx + 1'b1;
      end
    end
  end

  // ---------------- post-synaptic remapping ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) post_bus <= '0;
    else begin
      post_bus.active <= q_active;
      post_bus.addr   <= q_active ? regs[q_addr] : '0;
    end
  end
endmodule
