// tb_pattern_checker -- self-checking test of the pattern checker.
//
// Short windows (PULSE = 40 clocks, offset 5..9 clocks) keep the run small.
// Each round announces five checked spikes, 20 clocks apart, plus one
// unchecked one, and then answers from the "network":
//  round 1: spikes 0-2 on time with the right address, spike 3 with a wrong
//           address, spike 4 missing -> 3 of 5, recalled at a 50 % threshold;
//  round 2: the same answers at a 70 % threshold -> not recalled;
//  round 3: every answer either 12 clocks before its window opens or after
//           it has closed -> 0 hits.
// Totals: 3 patterns seen, 1 recalled.
module tb_pattern_checker;
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

  logic        clear, exp_valid, exp_check, pattern_end;
  addr_t       exp_addr;
  logic [31:0] exp_isi;
  aer_post_t   net_spike;
  logic [6:0]  threshold_pct;
  logic        result_valid, result_ok;
  logic [7:0]  result_hits, result_checked;
  logic [15:0] n_seen, n_recalled;

  pattern_checker #(.PULSE(40), .OFF_MIN(5), .OFF_SPAN(5), .SLOTS(8)) dut (
    .clk, .rst_n, .clear, .exp_valid, .exp_addr, .exp_isi, .exp_check, .net_spike,
    .pattern_end, .threshold_pct, .result_valid, .result_hits, .result_checked,
    .result_ok, .n_seen, .n_recalled
  );

  int cyc = 0;
  always @(posedge clk) cyc++;

  // network answers are scheduled in a queue of (time, address)
  int    ans_t[$];
  addr_t ans_a[$];
  always @(negedge clk) begin
    net_spike = '0;
    foreach (ans_t[e]) if (ans_t[e] == cyc) net_spike = '{active: 1'b1, addr: ans_a[e]};
  end

  task automatic round(input int kind, input logic [6:0] thr,
                       input int want_hits, input bit want_ok);
    int t0;
    ans_t.delete(); ans_a.delete();
    threshold_pct = thr;
    t0 = cyc;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      exp_valid = 1; exp_check = (i < 5); exp_addr = addr_t'(12'h300 + i); exp_isi = 20;
      if (i < 5) begin
        int due;
        due = cyc + 20;
        if (kind == 0) begin
          if (i < 3)       begin ans_t.push_back(due); ans_a.push_back(addr_t'(12'h300 + i)); end
          else if (i == 3) begin ans_t.push_back(due); ans_a.push_back(12'h7FF); end
        end else begin
          if (i % 2 == 0)  begin ans_t.push_back(due - 30); ans_a.push_back(addr_t'(12'h300 + i)); end
          else             begin ans_t.push_back(due + 36); ans_a.push_back(addr_t'(12'h300 + i)); end
        end
      end
      @(negedge clk);
      exp_valid = 0;
      repeat (18) @(negedge clk);
    end
    repeat (120) @(negedge clk);
    pattern_end = 1; @(negedge clk); pattern_end = 0;
    @(negedge clk);
    check(result_hits == 8'(want_hits), $sformatf("hits %0d, want %0d", result_hits, want_hits));
    check(result_checked == 8'd5, $sformatf("checked %0d, want 5", result_checked));
    check(result_ok == want_ok, "recall verdict");
  endtask


  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; exp_valid = 0; exp_check = 0; exp_addr = '0; exp_isi = '0;
    pattern_end = 0; threshold_pct = 70; net_spike = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    round(0, 7'd50, 3, 1'b1);
    round(0, 7'd70, 3, 1'b0);
    round(1, 7'd10, 0, 1'b0);
    check(n_seen == 16'd3, "three patterns seen");
    check(n_recalled == 16'd1, "one pattern recalled");
    clear = 1; @(negedge clk); clear = 0; @(negedge clk);
    check(n_seen == 0 && n_recalled == 0, "totals cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
