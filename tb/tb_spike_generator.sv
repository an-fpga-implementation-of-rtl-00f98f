// tb_spike_generator -- self-checking test of the spike generator.
//
// A fire request starts a pre-synaptic pulse carrying the request's address
// for pulse_width clocks (0 counts as 1, more than 16 as 16). A request that
// arrives while a pulse is still out is dropped and flagged. The test
// measures each pulse's length and address and counts the dropped requests.
module tb_spike_generator;
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

  logic [4:0] pulse_width = 5'd4;
  logic       fire = 0, active, dropped;
  addr_t      fire_addr = '0, addr;

  spike_generator dut (.clk, .rst_n, .pulse_width, .fire, .fire_addr, .active, .addr, .dropped);

  // fire once, then measure the pulse
  task automatic one_pulse(input int pw, input addr_t a, input int expect_len);
    int len;
    bit addr_ok;
    @(negedge clk);
    pulse_width = 5'(pw); fire = 1; fire_addr = a;
    @(negedge clk);
    fire = 0; fire_addr = '0;
    len = 0; addr_ok = 1;
    while (active) begin
      len++;
      if (addr != a) addr_ok = 0;
      @(negedge clk);
    end
    check(len == expect_len, $sformatf("width %0d gives %0d clocks (expected %0d)", pw, len, expect_len));
    check(addr_ok, "pulse carries the fire address");
  endtask

  initial begin
    int nd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!active, "idle after reset");
    one_pulse(1, 12'h123, 1);
    one_pulse(4, 12'hABC, 4);
    one_pulse(16, 12'h001, 16);
    one_pulse(0, 12'hFFF, 1);
    one_pulse(31, 12'h555, 16);

    // a second request during a pulse is dropped
    @(negedge clk);
    pulse_width = 5'd8; fire = 1; fire_addr = 12'h100;
    @(negedge clk);
    fire_addr = 12'h200;       // fire held high: requests while active
    nd = 0;
    repeat (3) begin
      if (dropped) nd++;
      @(negedge clk);
    end
    fire = 0;
    check(nd == 3, "requests during a pulse are flagged as dropped");
    check(addr == 12'h100, "dropped request does not change the address");
    while (active) @(negedge clk);
    check(!dropped, "no drop when idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
