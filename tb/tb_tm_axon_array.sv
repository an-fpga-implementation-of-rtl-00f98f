// tb_tm_axon_array -- self-checking test of the time-multiplexed axon array.
//
// Uses a 64-module array (one sweep = 64 clocks, one ramp step = 64 clocks)
// and an 8-module array for the fill-up behaviour.
//  1. Delay programming: eight training spikes with known intervals configure
//     modules 0..7. The number of delay-programming events must be 22 (path K
//     of module m is programmed when spike m+1+K arrives). Replaying the first
//     neuron alone must make module 0's four paths fire, on active line K, at
//     the address of spike 1+K, after the trained interval (within two ramp
//     steps), each as a pulse of exactly `pulse_width` clocks.
//  2. Sweep rate: every virtual module is visited once per 64 clocks, so the
//     replayed spikes must land on the trained intervals quantised to 64.
//  3. Delay adaptation (proportional strategy): the same pattern is configured
//     with random start delays, presented eight more times, and then the
//     replay must again hit the trained intervals.
//     Each path fires once per replay, and nothing fires after every ramp
//     has saturated at its maximum.
//  4. Fill-up: the 8-module array becomes full after 8 spikes, counts 4 more
//     and then stops; module 5's path 2 must point at the first tail spike.
module tb_tm_axon_array;
  import pnn_pkg::*;

  localparam int N = 64;
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

  aer_post_t       post_bus;
  logic            cfg_en;
  delay_mode_e     mode;
  adapt_strategy_e strategy;
  logic [4:0]      pulse_width;
  aer_pre_t        pre_bus;
  logic            full;
  logic [6:0]      prog_cnt;
  logic [3:0]      ev_fire, ev_drop, ev_prog, ev_adapt;
  logic            ev_start;

  tm_axon_array #(.N(N)) dut (
    .clk, .rst_n, .post_bus, .cfg_en, .mode, .strategy, .pulse_width, .pre_bus,
    .full, .prog_cnt, .ev_fire, .ev_drop, .ev_prog, .ev_adapt, .ev_start
  );

  // small array for the fill-up test
  aer_pre_t   pre8;
  logic       full8;
  logic [3:0] prog_cnt8;
  logic [3:0] f8, d8, p8, a8;
  logic       s8;
  tm_axon_array #(.N(8)) dut8 (
    .clk, .rst_n, .post_bus, .cfg_en, .mode, .strategy, .pulse_width, .pre_bus(pre8),
    .full(full8), .prog_cnt(prog_cnt8), .ev_fire(f8), .ev_drop(d8), .ev_prog(p8),
    .ev_adapt(a8), .ev_start(s8)
  );

  // ---------------- stimulus pattern ----------------
  addr_t pat_addr [8] = '{12'h101, 12'h2A2, 12'h033, 12'hF44, 12'h555, 12'h0C6, 12'h707, 12'h888};
  int    pat_time [8] = '{0, 900, 2100, 2800, 4000, 5300, 6000, 7400};

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic send(input addr_t a);
    @(negedge clk);
    post_bus = '{active: 1'b1, addr: a};
    @(negedge clk);
    post_bus = '0;
  endtask

  task automatic send_pattern(input int n);
    int t0;
    t0 = cyc;
    for (int j = 0; j < n; j++) begin
      while (cyc - t0 < pat_time[j]) @(negedge clk);
      send(pat_addr[j]);
    end
  endtask

  // ---------------- pre-synaptic spike monitor ----------------
  int    rise_t   [4][$];
  addr_t rise_a   [4][$];
  int    width    [4][$];
  int    run_len  [4];
  logic [3:0] prev_act;
  int    n_prog = 0, n_adapt = 0, n_start = 0;

  always @(posedge clk) begin
    n_prog  += $countones(ev_prog);
    n_adapt += $countones(ev_adapt);
    n_start += ev_start;
    for (int k = 0; k < 4; k++) begin
      if (pre_bus.active[k] && !prev_act[k]) begin
        rise_t[k].push_back(cyc);
        rise_a[k].push_back(pre_bus.addr);
        run_len[k] = 1;
      end else if (pre_bus.active[k]) begin
        run_len[k]++;
      end else if (prev_act[k]) begin
        width[k].push_back(run_len[k]);
      end
    end
    prev_act <= pre_bus.active;
  end

  int    r8_t[$], r8_k[$];
  addr_t r8_a[$];
  logic [3:0] prev8;
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++)
      if (pre8.active[k] && !prev8[k]) begin
        r8_t.push_back(cyc);
        r8_k.push_back(k);
        r8_a.push_back(pre8.addr);
      end
    prev8 <= pre8.active;
  end

  task automatic clear_monitor();
    for (int k = 0; k < 4; k++) begin
      rise_t[k].delete();
      rise_a[k].delete();
      width[k].delete();
    end
  endtask

  // Replay spike 0 and check module 0's four paths
  task automatic replay_and_check(input string tag);
    int t0;
    clear_monitor();
    t0 = cyc;
    send(pat_addr[0]);
    repeat (N * 140) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      bit found = 0;
      for (int e = 0; e < rise_t[k].size(); e++) begin
        int dt = rise_t[k][e] - t0;
        int want = pat_time[k+1] - pat_time[0];
        if (rise_a[k][e] == pat_addr[k+1] && dt > want - 2*N && dt < want + 2*N) found = 1;
      end
      check(found, $sformatf("%s: path %0d fires at the trained interval with address %h",
                             tag, k, pat_addr[k+1]));
      check(rise_t[k].size() == 1, $sformatf("%s: path %0d fires once (%0d)", tag, k, rise_t[k].size()));
    end
    foreach (width[k]) foreach (width[k][e])
      check(width[k][e] == int'(pulse_width), $sformatf("%s: pulse width %0d", tag, width[k][e]));
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    post_bus    = '0;
    cfg_en      = 1'b1;
    mode        = MODE_PROGRAM;
    strategy    = STRAT_PROPORTIONAL;
    pulse_width = 5'd6;
    prev_act    = '0;
    prev8       = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);

    // ---- 1. delay programming ----
    send_pattern(8);
    cfg_en = 1'b0;
    repeat (2 * N) @(negedge clk);
    check(prog_cnt == 7'd8, $sformatf("programming index counts 8 spikes (got %0d)", prog_cnt));
    check(!full, "array not full after 8 spikes");
    check(n_prog == 22, $sformatf("22 delay-programming events (got %0d)", n_prog));
    repeat (N * 520) @(negedge clk);      // let every ramp run out
    replay_and_check("program");
    // a ramp saturates and stays idle: nothing fires again once every ramp has ended
    repeat (N * 400) @(negedge clk);
    clear_monitor();
    repeat (N * 600) @(negedge clk);
    check(rise_t[0].size() + rise_t[1].size() + rise_t[2].size() + rise_t[3].size() == 0,
          "no spikes after the ramps have run out");

    // ---- 3. delay adaptation ----
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mode   = MODE_ADAPT;
    cfg_en = 1'b1;
    n_adapt = 0;
    send_pattern(8);                       // configure, random start delays
    cfg_en = 1'b0;
    for (int pass = 0; pass < 9; pass++) begin
      repeat (N * 140) @(negedge clk);
      send_pattern(8);
    end
    check(n_adapt > 20, $sformatf("delays were adapted (%0d steps)", n_adapt));
    repeat (N * 520) @(negedge clk);
    replay_and_check("adapt");

    // ---- 4. fill-up of the 8-module array ----
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mode   = MODE_PROGRAM;
    cfg_en = 1'b1;
    for (int j = 0; j < 14; j++) begin
      repeat (300) @(negedge clk);
      check(full8 == (j >= 8), $sformatf("8-module array full only after 8 spikes (j=%0d)", j));
      send(addr_t'(12'h900 + j));
    end
    cfg_en = 1'b0;
    check(prog_cnt8 == 4'd12, $sformatf("8-module array stops counting at N+4 (got %0d)", prog_cnt8));
    repeat (5000) @(negedge clk);
    begin
      int t0;
      bit f2 = 0, f3 = 0;
      t0 = cyc;
      send(12'h905);
      repeat (1600) @(posedge clk);
      // module 5, path 2 -> spike 8 (first tail spike), path 3 -> spike 9
      foreach (r8_t[e]) begin
        if (r8_k[e] == 2 && r8_a[e] == 12'h908 && r8_t[e] - t0 > 900 - 24 && r8_t[e] - t0 < 900 + 24) f2 = 1;
        if (r8_k[e] == 3 && r8_a[e] == 12'h909 && r8_t[e] - t0 > 1200 - 24 && r8_t[e] - t0 < 1200 + 24) f3 = 1;
      end
      check(f2, "module N-3 path 2 reaches the first tail spike");
      check(f3, "module N-3 path 3 reaches the second tail spike");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
