// tb_aer_post_bus -- self-checking test of the post-synaptic AER bus merge.
//
// Three sources (network, pattern generator, noise) drive random traffic in which usually none or one is
// active and sometimes several are. With one active source the bus must carry
// exactly its address and active line; with none it must be idle; with two
// or more the collision flag must be raised and the lines are the OR of the
// active sources (the bus has no arbiter, so the address is then corrupt).
module tb_aer_post_bus;
  import pnn_pkg::*;
  localparam int NS = 3;

  int checks = 0, failures = 0;
  aer_post_t src [NS];
  aer_post_t bus;
  logic     collision;

  aer_post_bus #(.NS(NS)) dut (.src, .bus, .collision);

  initial begin
    int n, n_col;
    aer_post_t e;
    n_col = 0;
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom_range(0, 9);          // number of active sources: mostly 0 or 1
      if (k > 3) k = (k > 6) ? 1 : 0;
      for (int s = 0; s < NS; s++) src[s] = '0;
      e = '0; n = 0;
      for (int j = 0; j < k; j++) begin
        int s;
        s = $urandom_range(0, NS - 1);
        if (!src[s].active) begin
          src[s].active = 1'b1;
          src[s].addr   = ADDR_W'($urandom);
          e.active |= src[s].active;
          e.addr   |= src[s].addr;
          n++;
        end
      end
      // an inactive source with stray address bits must not leak onto the bus
      if (n == 0) src[$urandom_range(0, NS - 1)].addr = ADDR_W'($urandom);
      #1;
      checks++;
      if (bus != e || collision != (n > 1)) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d bus=%h/%h expected %h/%h col=%0b",
                                    n, bus.active, bus.addr, e.active, e.addr, collision);
      end
      if (n > 1) n_col++;
    end
    checks++;
    if (n_col == 0) begin failures++; $display("FAIL: no collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
