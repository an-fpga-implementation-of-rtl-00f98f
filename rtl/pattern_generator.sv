// pattern_generator -- LFSR-driven spatio-temporal patterns and noise spikes.
//
// A pattern is a sequence of `pat_len` spikes. For every spike, one LFSR (12
// bit, one value per neuron address) picks the neuron and a second LFSR (16
// bit) picks the interval since the previous spike:
//     isi = ISI_MIN + isi_lfsr[7:0] * ISI_STEP   clocks
// (defaults: 1 ms + 0..255 x 25 us, i.e. 1 to 7.4 ms at 66 MHz; ISI_MIN >= 2). Both LFSRs are
// loaded from the seeds at `start`, so a training run and a recall run with
// the same seeds produce the same patterns. `n_patterns` patterns are
// produced back to back, each followed by a GAP-clock pause so that the
// network falls silent before the next one.
// Training (`recall` = 0): every spike is put on `pat_spike`.
// Recall (`recall` = 1): only the first four spikes are sent; the rest are
// announced to the checker instead. Each spike is announced (`exp_*`) when
// it is drawn, which is one interval before it is due, so that the checker
// can open its window ahead of the spike.
// A third, free-running 16-bit LFSR produces noise spikes: its value is both
// the address (low 12 bits) of the next noise spike and, scaled, the interval
// to it, uniform on [0, 2*noise_period) so the mean rate is 1/noise_period.
// Noise spikes leave on `noise_spike` only while `noise_en` is high.
// All spikes are one clock long. The LFSR polynomials, the interval
// formula and the gap are this implementation's choices.
module pattern_generator
  import pnn_pkg::*;
#(
  parameter int unsigned ISI_MIN  = 66000,     // 1 ms
  parameter int unsigned ISI_STEP = 1650,      // 25 us
  parameter int unsigned GAP      = 2640000    // 40 ms after each pattern
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        recall,
  input  logic [15:0] n_patterns,
  input  logic [7:0]  pat_len,          // spikes per pattern (>= 5)
  input  logic [11:0] seed_idx,
  input  logic [15:0] seed_isi,
  input  logic        noise_en,
  input  logic [31:0] noise_period,     // mean clocks between noise spikes
  output aer_post_t   pat_spike,
  output aer_post_t   noise_spike,
  output logic        exp_valid,        // next pattern spike drawn ...
  output addr_t       exp_addr,         // ... for this neuron
  output logic [31:0] exp_isi,          // ... due this many clocks from now
  output logic        exp_check,        // ... and the checker must look for it
  output logic        pattern_end,      // gap after a pattern is over
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_DRAW, S_WAIT, S_GAP} state_e;
  state_e       state;
  logic [11:0]  idx_q;
  logic [15:0]  isi_q, noise_q;
  logic [31:0]  cnt, isi_now;
  logic [7:0]   j;
  logic [15:0]  pat;
  addr_t        cur_addr;
  logic         step_pat;

  assign isi_now  = ISI_MIN + 32'(isi_q[7:0]) * ISI_STEP;
  assign step_pat = (state == S_DRAW);
  assign busy     = (state != S_IDLE);

  lfsr #(.W(12), .TAPS(12'hE08), .INIT(12'h001)) u_idx_lfsr (
    .clk, .rst_n, .load(start), .seed(seed_idx), .step(step_pat), .q(idx_q)
  );
  lfsr #(.W(16), .TAPS(16'hB400), .INIT(16'h0001)) u_isi_lfsr (
    .clk, .rst_n, .load(start), .seed(seed_isi), .step(step_pat), .q(isi_q)
  );

  always_comb begin
    exp_valid = (state == S_DRAW);
    exp_addr  = idx_q;
    exp_isi   = isi_now;
    exp_check = recall && (j >= 8'd4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      j           <= '0;
      pat         <= '0;
      cur_addr    <= '0;
      pat_spike   <= '0;
      pattern_end <= 1'b0;
      done        <= 1'b0;
    end else begin
      pat_spike   <= '0;
      pattern_end <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          j     <= '0;
          pat   <= '0;
          state <= (n_patterns == '0) ? S_IDLE : S_DRAW;
        end
        S_DRAW: begin
          cur_addr <= idx_q;
          cnt      <= isi_now - 2;    // DRAW + WAIT cycles = one interval
          state    <= S_WAIT;
        end
        S_WAIT: if (cnt != '0) cnt <= cnt - 1;
        else begin
          if (!recall || j < 8'd4) pat_spike <= '{active: 1'b1, addr: cur_addr};
          j <= j + 1'b1;
          if (j + 1'b1 >= pat_len) begin
            cnt   <= GAP - 1;
            state <= S_GAP;
          end else begin
            state <= S_DRAW;
          end
        end
        S_GAP: if (cnt != '0) cnt <= cnt - 1;
        else begin
          pattern_end <= 1'b1;
          j           <= '0;
          pat         <= pat + 1'b1;
          if (pat + 1'b1 >= n_patterns) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_DRAW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- noise source ----------------
  logic [31:0] ncnt;
  logic [47:0] nprod;
  logic        ntick;

  assign ntick = (ncnt == '0);
  assign nprod = 48'(noise_q) * 48'({noise_period, 1'b0});

  lfsr #(.W(16), .TAPS(16'hB400), .INIT(16'hACE1)) u_noise_lfsr (
    .clk, .rst_n, .load(1'b0), .seed('0), .step(ntick), .q(noise_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncnt        <= '0;
      noise_spike <= '0;
    end else begin
      noise_spike <= '0;
      if (ntick) begin
        ncnt <= nprod[47:16];
        if (noise_en) noise_spike <= '{active: 1'b1, addr: noise_q[ADDR_W-1:0]};
      end else begin
        ncnt <= ncnt - 1;
      end
    end
  end
endmodule
