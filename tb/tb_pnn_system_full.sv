// tb_pnn_system_full -- one training and recall cycle of the full-size system.
//
// All parameters at their defaults: 70 axon arrays of 4096 virtual modules,
// 128 physical neurons, 66 MHz timing (1 ms = 66000 clocks, 32 ms maximum
// axonal delay). One 12-spike pattern is trained by delay programming and
// then recalled from its first four spikes; the eight remaining spikes must
// come back from the network, and the pattern must be scored as recalled.
// Counts are also checked against the structure: 12 configured modules in
// array 0, 4*12-10 programmed delay paths, and no other array configured.
module tb_pnn_system_full;
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
  logic [69:0]     arrays_full;
  aer_post_t       post_bus;
  aer_pre_t        pre_bus;
  logic ev_axon_fire, ev_axon_drop, ev_delay_prog, ev_delay_adapt, ev_ramp_start,
        ev_neuron_assign, ev_neuron_evict, ev_neuron_collision, ev_post_collision,
        ev_pre_collision, ev_net_spike;

  pnn_system dut (.*);

  int c_prog = 0, c_net = 0;
  always @(posedge clk) if (rst_n) begin
    c_prog += ev_delay_prog;
    c_net  += ev_net_spike;
    if (result_valid)
      $display("pattern result: %0d of %0d spikes recalled", result_hits, result_checked);
  end

  task automatic run(input bit rec, input bit cfg);
    recall = rec; configure = cfg;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!gen_done) @(negedge clk);
    configure = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; recall = 0; configure = 0; noise_en = 0; clear_stats = 0;
    mode = MODE_PROGRAM; strategy = STRAT_PROPORTIONAL; pulse_width = 5'd16;
    n_patterns = 1; pat_len = 12; seed_idx = 12'h2B7; seed_isi = 16'h1F3D;
    noise_period = 32'd66000; threshold_pct = 7'd70;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    run(1'b0, 1'b1);
    check(dut.g_axon[0].cnt == 13'd12, "array 0 configured 12 modules");
    check(dut.g_axon[1].cnt == 13'd0 && arrays_full == '0, "no other array configured");
    check(c_prog == 4 * 12 - 10, $sformatf("programmed delay paths %0d, want 38", c_prog));

    c_net = 0;
    clear_stats = 1; @(negedge clk); clear_stats = 0;
    run(1'b1, 1'b0);
    check(n_seen == 1, "one pattern checked");
    check(result_checked == 8'd8, "eight spikes checked");
    check(n_recalled == 1, "pattern recalled");
    check(c_net >= 8, $sformatf("network produced the pattern's spikes (%0d)", c_net));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
