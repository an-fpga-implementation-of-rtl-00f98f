// tb_delay_adaptor -- self-checking test of the delay adaptor.
//
// The adaptor is combinational. Random ramp, stored delay and random values
// are applied under every mode, strategy and hit combination, and the write
// enable and new delay are compared with a reference written here from the
// rules: programming stores the ramp (program mode) or the random value
// (adapt mode); adaptation moves the stored delay toward the ramp by the
// whole difference, by one, or by half of it rounded away from zero.
module tb_delay_adaptor;
  import pnn_pkg::*;

  int checks = 0, failures = 0;

  delay_mode_e     mode;
  adapt_strategy_e strategy;
  logic            prog_hit, adapt_hit;
  delay_t          ramp, delay_old, rand_val, delay_new;
  logic            we, adapted;

  delay_adaptor dut (.mode, .strategy, .prog_hit, .adapt_hit, .ramp, .delay_old,
                     .rand_val, .we, .delay_new, .adapted);

  function automatic int ref_delay(int d, int r, int rv, int md, int st, bit ph, bit ah,
                                   output bit w, output bit ad);
    int diff, step;
    w = 0; ad = 0;
    if (ph) begin
      w = 1;
      return (md == 0) ? r : rv;
    end
    diff = r - d;
    if (!ah || md == 0 || diff == 0) return d;
    w = 1; ad = 1;
    case (st)
      0: step = diff;
      1: step = (diff > 0) ? 1 : -1;
      default: step = (diff > 0) ? (diff + 1) / 2 : -((-diff + 1) / 2);
    endcase
    return d + step;
  endfunction

  initial begin
    bit w, ad;
    int exp_d;
    for (int i = 0; i < 4000; i++) begin
      mode      = delay_mode_e'($urandom_range(0, 1));
      strategy  = adapt_strategy_e'($urandom_range(0, 2));
      prog_hit  = ($urandom_range(0, 3) == 0);
      adapt_hit = $urandom_range(0, 1);
      ramp      = DELAY_W'($urandom);
      delay_old = (i % 5 == 0) ? ramp : DELAY_W'($urandom);
      rand_val  = DELAY_W'($urandom);
      #1;
      exp_d = ref_delay(delay_old, ramp, rand_val, mode, strategy, prog_hit, adapt_hit, w, ad);
      checks++;
      if (we !== w || adapted !== ad || (w && delay_new !== DELAY_W'(exp_d))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: mode=%0d st=%0d ph=%0b ah=%0b ramp=%0d old=%0d -> we=%0b new=%0d, expected we=%0b new=%0d",
                   mode, strategy, prog_hit, adapt_hit, ramp, delay_old, we, delay_new, w, exp_d);
      end
    end
    // two worked cases: proportional step from 100 toward 107 is +4, toward 93 is -4
    mode = MODE_ADAPT; strategy = STRAT_PROPORTIONAL; prog_hit = 0; adapt_hit = 1;
    delay_old = 9'd100; ramp = 9'd107; #1;
    checks++; if (delay_new != 9'd104) begin failures++; $display("FAIL: 100->107 gave %0d", delay_new); end
    ramp = 9'd93; #1;
    checks++; if (delay_new != 9'd96) begin failures++; $display("FAIL: 100->93 gave %0d", delay_new); end
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
