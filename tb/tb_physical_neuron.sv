// tb_physical_neuron -- self-checking test of one physical neuron.
//
// The neuron (ID 3 on a 3-bit physical bus, 100-clock window, unscaled
// integration delay) is driven with one-clock strobes on its physical
// pre-synaptic bus, as the controller issues them. The expected firing time
// is worked out here from the input times: the third distinct synapse inside
// the window schedules a fire after the sum of the times elapsed since the
// two earlier inputs. Checked: fire time and one-clock width, no fire for two
// inputs, for a repeated synapse, for an input on another address, for inputs
// spread beyond the window, for inputs while refractory, and after an assign
// has cleared the state; four simultaneous inputs fire at once.
module tb_physical_neuron;
  localparam int WINDOW = 100;
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

  logic [3:0] p_active = '0;
  logic [2:0] p_addr = '0;
  logic       p_assign = 1'b0;
  logic       fire;

  physical_neuron #(.ID(3), .PW(3), .WINDOW(WINDOW), .INTEG_SHIFT(0)) dut (
    .clk, .rst_n, .p_active, .p_addr, .p_assign, .fire
  );

  int cyc = 0, n_fire = 0, last_fire = -1;
  always @(posedge clk) begin
    cyc++;
    if (fire) begin
      n_fire++;
      last_fire = cyc;
    end
  end

  // one-clock strobe on synapse mask m at address a
  task automatic strobe(input logic [3:0] m, input logic [2:0] a, input bit asg = 0);
    @(negedge clk);
    p_active = m; p_addr = a; p_assign = asg;
    @(negedge clk);
    p_active = '0; p_assign = 1'b0;
  endtask
  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    int t0, f0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    idle(2);

    // three synapses sampled at clocks 0, 11 and 32; the timers read 31 and 20
    // when the third arrives (a timer is 0 on its start clock), so the fire
    // is seen 31+20+1 = 52 clocks after the third input
    t0 = cyc; strobe(4'b0001, 3); idle(9);
    strobe(4'b0010, 3); idle(19);
    f0 = n_fire; strobe(4'b0100, 3);
    t0 = cyc;
    idle(60);
    check(n_fire == f0 + 1, "three inputs fire once");
    check(last_fire >= t0 + 51 && last_fire <= t0 + 53, $sformatf("fire time %0d after third input", last_fire - t0));

    // refractory: three inputs right after the fire are ignored
    f0 = n_fire;
    strobe(4'b0001, 3); strobe(4'b0010, 3); strobe(4'b0100, 3);
    idle(WINDOW + 20);
    check(n_fire == f0, "no fire while refractory");

    // two inputs only
    f0 = n_fire;
    strobe(4'b0001, 3); idle(5); strobe(4'b1000, 3);
    idle(2 * WINDOW);
    check(n_fire == f0, "two inputs do not fire");

    // repeated synapse counts once
    f0 = n_fire;
    strobe(4'b0001, 3); idle(5); strobe(4'b0001, 3); idle(5); strobe(4'b0010, 3);
    idle(2 * WINDOW);
    check(n_fire == f0, "repeated synapse ignored");

    // other address
    f0 = n_fire;
    strobe(4'b0001, 2); strobe(4'b0010, 2); strobe(4'b0100, 2);
    idle(2 * WINDOW);
    check(n_fire == f0, "inputs for another neuron ignored");

    // spread beyond the window: first input expired before the third
    f0 = n_fire;
    strobe(4'b0001, 3); idle(60); strobe(4'b0010, 3); idle(60); strobe(4'b0100, 3);
    idle(2 * WINDOW);
    check(n_fire == f0, "inputs spread beyond the window do not fire");

    // assign clears the state: the third input arrives with the assign flag
    f0 = n_fire;
    strobe(4'b0001, 3); idle(3); strobe(4'b0010, 3); idle(3); strobe(4'b0100, 3, 1);
    idle(2 * WINDOW);
    check(n_fire == f0, "assign clears earlier inputs");

    // four at once: fire on the next clock
    f0 = n_fire;
    strobe(4'b1111, 3);
    t0 = cyc;
    idle(20);
    check(n_fire == f0 + 1, "four simultaneous inputs fire");
    check(last_fire <= t0 + 2, "four simultaneous inputs fire at once");

    // window still works after that (refractory over)
    idle(WINDOW);
    f0 = n_fire;
    strobe(4'b0001, 3); strobe(4'b0010, 3); strobe(4'b0100, 3);
    idle(20);
    check(n_fire == f0 + 1, "fires again after refractory time");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
