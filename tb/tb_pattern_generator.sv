// tb_pattern_generator -- self-checking test of the pattern generator.
//
// Short intervals (ISI_MIN = 10, ISI_STEP = 2, GAP = 50) keep the run small.
// A reference model in the testbench steps its own copies of the two Galois
// LFSRs to predict every neuron address and every interval.
//  * training: all spikes of two 6-spike patterns appear, with the predicted
//    addresses and exactly the predicted intervals; nothing is marked for
//    checking; one pattern_end per pattern and one done;
//  * recall with the same seeds: only the first four spikes of each pattern
//    appear, the other two are announced for checking with the predicted
//    addresses and intervals;
//  * noise: with a mean period of 40 clocks about 500 spikes appear in
//    20000 clocks, none when noise is disabled.
module tb_pattern_generator;
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

  logic        start, recall, noise_en;
  logic [15:0] n_patterns;
  logic [7:0]  pat_len;
  logic [11:0] seed_idx;
  logic [15:0] seed_isi;
  logic [31:0] noise_period;
  aer_post_t   pat_spike, noise_spike;
  logic        exp_valid, exp_check, pattern_end, busy, done;
  addr_t       exp_addr;
  logic [31:0] exp_isi;

  pattern_generator #(.ISI_MIN(10), .ISI_STEP(2), .GAP(50)) dut (
    .clk, .rst_n, .start, .recall, .n_patterns, .pat_len, .seed_idx, .seed_isi,
    .noise_en, .noise_period, .pat_spike, .noise_spike, .exp_valid, .exp_addr,
    .exp_isi, .exp_check, .pattern_end, .busy, .done
  );

  // reference LFSRs
  function automatic logic [11:0] step12(input logic [11:0] s);
    return s[0] ? ((s >> 1) ^ 12'hE08) : (s >> 1);
  endfunction
  function automatic logic [15:0] step16(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  int    sp_t[$];
  addr_t sp_a[$];
  int    ex_n = 0, ex_chk = 0, n_end = 0, n_done = 0, n_noise = 0;
  addr_t ex_a[$];
  int    ex_i[$];
  always @(posedge clk) if (rst_n) begin
    if (pat_spike.active) begin
      sp_t.push_back(cyc);
      sp_a.push_back(pat_spike.addr);
    end
    if (exp_valid) begin
      ex_n++;
      if (exp_check) begin
        ex_chk++;
        ex_a.push_back(exp_addr);
        ex_i.push_back(int'(exp_isi));
      end
    end
    n_end   += pattern_end;
    n_done  += done;
    n_noise += noise_spike.active;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] mi;
    logic [15:0] ms;
    addr_t       m_addr [12];
    int          m_isi  [12];
    start = 0; recall = 0; noise_en = 0; noise_period = 40;
    n_patterns = 2; pat_len = 6; seed_idx = 12'h5A3; seed_isi = 16'hC0DE;
    mi = seed_idx; ms = seed_isi;
    for (int j = 0; j < 12; j++) begin
      m_addr[j] = mi;
      m_isi[j]  = 10 + 2 * int'(ms[7:0]);
      mi = step12(mi);
      ms = step16(ms);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // ---- training ----
    start = 1; @(negedge clk); start = 0;
    wait (n_done == 1);
    repeat (5) @(negedge clk);
    check(sp_t.size() == 12, $sformatf("training sends all 12 spikes (got %0d)", sp_t.size()));
    if (sp_t.size() == 12) begin
      for (int j = 0; j < 12; j++)
        check(sp_a[j] == m_addr[j], $sformatf("training spike %0d address", j));
      for (int j = 1; j < 12; j++)
        if (j != 6)
          check(sp_t[j] - sp_t[j-1] == m_isi[j], $sformatf("interval before spike %0d: %0d, want %0d",
                                                           j, sp_t[j] - sp_t[j-1], m_isi[j]));
      check(sp_t[6] - sp_t[5] >= 50 + m_isi[6], "gap between patterns");
    end
    check(ex_n == 12 && ex_chk == 0, "training announces 12 spikes, none to check");
    check(n_end == 2, "one pattern_end per pattern");

    // ---- recall ----
    sp_t.delete(); sp_a.delete();
    recall = 1;
    start = 1; @(negedge clk); start = 0;
    wait (n_done == 2);
    repeat (5) @(negedge clk);
    check(sp_t.size() == 8, $sformatf("recall sends 4 cue spikes per pattern (got %0d)", sp_t.size()));
    if (sp_t.size() == 8)
      for (int j = 0; j < 8; j++)
        check(sp_a[j] == m_addr[(j / 4) * 6 + j % 4], $sformatf("recall cue spike %0d address", j));
    check(ex_chk == 4, $sformatf("recall announces 4 spikes to check (got %0d)", ex_chk));
    if (ex_chk == 4)
      for (int e = 0; e < 4; e++) begin
        int j;
        j = (e / 2) * 6 + 4 + e % 2;
        check(ex_a[e] == m_addr[j] && ex_i[e] == m_isi[j], $sformatf("checked spike %0d announced", j));
      end

    // ---- noise ----
    n_noise = 0;
    repeat (20000) @(negedge clk);
    check(n_noise == 0, "no noise while disabled");
    noise_en = 1;
    repeat (20000) @(negedge clk);
    noise_en = 0;
    check(n_noise > 400 && n_noise < 600, $sformatf("noise rate: %0d spikes in 20000 clocks, ~500 expected", n_noise));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
