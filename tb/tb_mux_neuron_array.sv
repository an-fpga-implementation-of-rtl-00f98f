// tb_mux_neuron_array -- self-checking test of the multiplexed neuron array.
//
// Eight physical neurons, a 200-clock coincidence window and an unscaled
// integration delay (INTEG_SHIFT = 0). Pre-synaptic
// pulses (4 clocks long, like those of the axon arrays) are driven on chosen
// synapses of chosen virtual neurons, and the AER post-synaptic output is
// compared with what the coincidence rule predicts:
//  * three synapses within the window fire the virtual neuron, after a delay
//    equal to the sum of the elapsed times of the earlier inputs (checked to
//    within a few clocks of pipeline latency), with the virtual address;
//  * two synapses, or one synapse hit twice plus another, do not fire;
//  * inputs spread over more than the window do not fire;
//  * four simultaneous inputs fire almost at once;
//  * a fired neuron is refractory for the window;
//  * the controller assigns one physical neuron per new virtual neuron and
//    evicts round-robin when all are taken.
module tb_mux_neuron_array;
  import pnn_pkg::*;

  localparam int NP = 8, WINDOW = 200;
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

  aer_pre_t  pre_bus;
  aer_post_t post_bus;
  logic      ev_event, ev_assign, ev_evict, ev_collision;

  mux_neuron_array #(.NP(NP), .WINDOW(WINDOW), .INTEG_SHIFT(0)) dut (
    .clk, .rst_n, .pre_bus, .post_bus, .ev_event, .ev_assign, .ev_evict, .ev_collision
  );

  int cyc = 0;
  always @(posedge clk) cyc++;

  int    post_t[$];
  addr_t post_a[$];
  int    n_assign = 0, n_evict = 0, n_event = 0;
  always @(posedge clk) begin
    if (post_bus.active && rst_n) begin
      post_t.push_back(cyc);
      post_a.push_back(post_bus.addr);
    end
    n_assign += ev_assign;
    n_evict  += ev_evict;
    n_event  += ev_event;
  end

  // drive one 4-clock pre-synaptic pulse
  task automatic pulse(input addr_t a, input logic [3:0] lines);
    @(negedge clk);
    pre_bus = '{active: lines, addr: a};
    repeat (4) @(negedge clk);
    pre_bus = '0;
  endtask

  // fire-time window relative to the rise of the third pulse
  function automatic int count_posts(input addr_t a, input int from, input int to);
    int n = 0;
    foreach (post_t[e]) if (post_a[e] == a && post_t[e] >= from && post_t[e] <= to) n++;
    return n;
  endfunction

  task automatic wait_until(input int t);
    while (cyc < t) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t3;
    pre_bus = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---- a: three inputs at 0, 20, 50 -> elapsed counts 49 + 29 ----
    t0 = cyc;
    pulse(12'h123, 4'b0001);
    wait_until(t0 + 20); pulse(12'h123, 4'b0010);
    wait_until(t0 + 50); t3 = cyc; pulse(12'h123, 4'b0100);
    // ---- b: only two inputs on another neuron ----
    wait_until(t0 + 60); pulse(12'h456, 4'b0001);
    wait_until(t0 + 80); pulse(12'h456, 4'b1000);
    // ---- e: refractory ----
    wait_until(t0 + 140); pulse(12'h123, 4'b0001);
    wait_until(t0 + 150); pulse(12'h123, 4'b0010);
    wait_until(t0 + 160); pulse(12'h123, 4'b1000);
    wait_until(t0 + 700);
    // elapsed counts at the third input: 49 and 29; 5 clocks of pipeline
    check(count_posts(12'h123, t3 + 78 + 3, t3 + 78 + 7) == 1,
          "three coincident inputs fire after the summed timer values");
    check(count_posts(12'h123, 0, t3 + 78 + 2) == 0, "no early firing");
    check(count_posts(12'h123, 0, t0 + 700) == 1, "refractory neuron does not fire again");
    check(count_posts(12'h456, 0, t0 + 700) == 0, "two inputs do not fire");

    // ---- c: one synapse twice plus another ----
    t0 = cyc;
    pulse(12'h789, 4'b0001);
    wait_until(t0 + 10); pulse(12'h789, 4'b0001);
    wait_until(t0 + 30); pulse(12'h789, 4'b0010);
    wait_until(t0 + 600);
    check(count_posts(12'h789, 0, cyc) == 0, "a repeated synapse counts once");

    // ---- d: spread over more than the window ----
    t0 = cyc;
    pulse(12'hABC, 4'b0001);
    wait_until(t0 + 120); pulse(12'hABC, 4'b0010);
    wait_until(t0 + 260); pulse(12'hABC, 4'b0100);
    wait_until(t0 + 900);
    check(count_posts(12'hABC, 0, cyc) == 0, "inputs outside the window do not fire");

    // ---- f: four simultaneous inputs ----
    t0 = cyc;
    pulse(12'h321, 4'b1111);
    wait_until(t0 + 300);
    check(count_posts(12'h321, t0, t0 + 12) == 1, "four simultaneous inputs fire at once");

    // ---- h: 0, 100, 110 -> elapsed counts 109 + 9 ----
    t0 = cyc;
    pulse(12'h0F0, 4'b0100);
    wait_until(t0 + 100); pulse(12'h0F0, 4'b0001);
    wait_until(t0 + 110); t3 = cyc; pulse(12'h0F0, 4'b1000);
    wait_until(t0 + 600);
    check(count_posts(12'h0F0, t3 + 118 + 3, t3 + 118 + 7) == 1, "integration delay grows with dispersion");

    // new virtual neurons: a 1, b 1, e 0, c 1, d 2, f 1, h 1
    check(n_assign == 7, $sformatf("physical neurons assigned: %0d, want 7", n_assign));
    check(n_evict == 0, "no eviction yet");

    // ---- g: nine new neurons in quick succession evict round-robin ----
    for (int i = 0; i < NP + 1; i++) pulse(addr_t'(12'hE00 + i), 4'b0001);
    repeat (10) @(negedge clk);
    check(n_evict == 1, $sformatf("one eviction after %0d back-to-back assignments (got %0d)", NP + 1, n_evict));
    check(n_assign == 7 + NP + 1, "each new virtual neuron assigned");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
