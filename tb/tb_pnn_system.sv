// tb_pnn_system -- end-to-end test of the polychronous network, scaled down.
//
// Two axon arrays of 64 virtual modules, 4 physical neurons (few, so that
// the controller must evict busy neurons under noise). Time is scaled
// with the sweep: one ramp step is a 64-clock sweep, and "1 ms" is 16 steps =
// 1024 clocks, the same ratio as 62 us to 1 ms in the full-size system. All
// other times (intervals, gap, checker pulse and offset) are scaled alike.
//  A. Delay programming: three 30-spike patterns are trained once with
//     configuration on. 90 spikes overflow the first array (64 modules), so
//     configuration must move on to the second array.
//  B. Recall with the same seeds: the four cue spikes of each pattern must
//     make the network replay the rest; every pattern must be recalled at the
//     70 % threshold.
//  C. Delay adaptation (proportional strategy) after a reset: one pass with
//     configuration on gives random delays, eight more passes adapt them,
//     then recall must bring back at least two of the three patterns.
//  D. Recall again under heavy noise, to exercise the unarbitrated buses.
// Every mechanism is counted and must have happened at least once: delay
// programming, delay adaptation, ramp starts, pre-synaptic spikes, neuron
// assignment, network spikes, array switch-over, noise spikes, successful
// recall, post- and pre-synaptic bus collisions, eviction of a busy physical
// neuron, and a pre-synaptic spike dropped because its generator was busy.
// Same-clock fires of two physical neurons are counted and reported only.
module tb_pnn_system;
  import pnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  logic            start, recall, configure, noise_en, clear_stats;
  delay_mode_e     mode;
  adapt_strategy_e strategy;
  logic [4:0]      pulse_width;
  logic [15:0]     n_patterns;
  logic [7:0]      pat_len;
  logic [11:0]     seed_idx;
  logic [15:0]     seed_isi;
  logic [31:0]     noise_period;
  logic [6:0]      threshold_pct;
  logic            gen_busy, gen_done, result_valid, result_ok;
  logic [7:0]      result_hits, result_checked;
  logic [15:0]     n_seen, n_recalled;
  logic [1:0]      arrays_full;
  aer_post_t       post_bus;
  aer_pre_t        pre_bus;
  logic ev_axon_fire, ev_axon_drop, ev_delay_prog, ev_delay_adapt, ev_ramp_start,
        ev_neuron_assign, ev_neuron_evict, ev_neuron_collision, ev_post_collision,
        ev_pre_collision, ev_net_spike;

  pnn_system #(
    .N_ARRAYS(2), .N_AXON(64), .NP(4), .WINDOW(1024), .ISI_MIN(1024), .ISI_STEP(24),
    .GAP(41000), .PULSE(4096), .OFF_MIN(512), .OFF_SPAN(512)
  ) dut (.*);

  int c_prog = 0, c_adapt = 0, c_start = 0, c_fire = 0, c_drop = 0, c_assign = 0,
      c_net = 0, c_postcol = 0, c_precol = 0, c_noise = 0, c_switch = 0, c_ok = 0,
      c_evict = 0, c_ncol = 0;
  logic full0_q = 0;
  always @(posedge clk) if (rst_n) begin
    c_prog    += ev_delay_prog;
    c_adapt   += ev_delay_adapt;
    c_start   += ev_ramp_start;
    c_fire    += ev_axon_fire;
    c_drop    += ev_axon_drop;
    c_assign  += ev_neuron_assign;
    c_net     += ev_net_spike;
    c_postcol += ev_post_collision;
    c_precol  += ev_pre_collision;
    c_evict   += ev_neuron_evict;
    c_ncol    += ev_neuron_collision;
    c_noise   += dut.noise_spike.active;
    c_switch  += (arrays_full[0] && !full0_q);
    full0_q   <= arrays_full[0];
    if (result_valid) begin
      c_ok += result_ok;
      $display("pattern result: %0d of %0d recalled spikes, %s", result_hits, result_checked,
               result_ok ? "recalled" : "not recalled");
    end
  end

  task automatic run(input bit rec, input bit cfg);
    int d0;
    recall = rec; configure = cfg;
    d0 = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!gen_done) @(negedge clk);
    configure = 0;
    @(negedge clk);
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; recall = 0; configure = 0; noise_en = 0; clear_stats = 0;
    mode = MODE_PROGRAM; strategy = STRAT_PROPORTIONAL; pulse_width = 5'd8;
    n_patterns = 3; pat_len = 30; seed_idx = 12'h3C5; seed_isi = 16'h9E37;
    noise_period = 32'd200000; threshold_pct = 7'd70;
    do_reset();

    // ---- A: delay programming ----
    run(1'b0, 1'b1);
    check(arrays_full[0] && !arrays_full[1], "90 training spikes fill array 0 and spill into array 1");
    check(dut.g_axon[1].cnt == 7'(90 - 64), $sformatf("array 1 configured %0d modules, want 26",
                                                      dut.g_axon[1].cnt));
    check(c_prog == 4 * 90 - 10, $sformatf("delay-programming events %0d, want %0d", c_prog, 4 * 90 - 10));

    // ---- B: recall ----
    clear_stats = 1; @(negedge clk); clear_stats = 0;
    run(1'b1, 1'b0);
    check(n_seen == 3, "three patterns checked");
    check(n_recalled == 3, $sformatf("programmed network recalls all 3 patterns (got %0d)", n_recalled));

    // ---- C: delay adaptation ----
    do_reset();
    mode = MODE_ADAPT;
    run(1'b0, 1'b1);
    for (int pass = 0; pass < 8; pass++) run(1'b0, 1'b0);
    clear_stats = 1; @(negedge clk); clear_stats = 0;
    run(1'b1, 1'b0);
    check(n_recalled >= 2, $sformatf("adapted network recalls >= 2 of 3 patterns (got %0d)", n_recalled));

    // ---- D: recall under heavy noise ----
    noise_en = 1; noise_period = 32'd2; pulse_width = 5'd16;
    run(1'b1, 1'b0);
    noise_en = 0;

    $display("events: prog %0d adapt %0d start %0d fire %0d drop %0d assign %0d evict %0d ncol %0d net %0d postcol %0d precol %0d noise %0d switch %0d ok %0d",
             c_prog, c_adapt, c_start, c_fire, c_drop, c_assign, c_evict, c_ncol, c_net, c_postcol, c_precol, c_noise, c_switch, c_ok);
    check(c_prog    > 0, "delay programming happened");
    check(c_adapt   > 0, "delay adaptation happened");
    check(c_start   > 0, "ramps started");
    check(c_fire    > 0, "pre-synaptic spikes generated");
    check(c_drop    > 0, "a pre-synaptic spike was dropped by a busy generator");
    check(c_assign  > 0, "physical neurons assigned");
    check(c_net     > 0, "network spikes produced");
    check(c_postcol > 0, "post-synaptic bus collision seen");
    check(c_precol  > 0, "pre-synaptic bus collision seen");
    check(c_evict   > 0, "a physical neuron was evicted by a new assignment");
    check(c_noise   > 0, "noise spikes injected");
    check(c_switch  > 0, "configuration switched to the next axon array");
    check(c_ok      > 0, "patterns recalled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
