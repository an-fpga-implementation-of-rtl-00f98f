// pattern_checker -- scores how much of a pattern the network recalled.
//
// For every spike the generator announces as checked, the checker opens a
// detection pulse of PULSE clocks (4 ms) that starts a random offset before
// the spike is due: offset = OFF_MIN + rnd * OFF_SPAN / 2^16 clocks, 500 us to
// 1 ms by default, rnd from its own 16-bit LFSR. Up to SLOTS pulses may be
// open at once (pulses overlap when intervals are shorter than 4 ms). A
// spike from the network whose address equals a pulse's neuron, while that
// pulse is open, marks the pulse as hit. When a pulse closes its hit is
// added to the pattern's score.
// At `pattern_end` the checker reports the number of hits and of checked
// spikes, and declares the pattern recalled if
//     100 * hits > threshold_pct * checked.
// It also keeps running totals of patterns seen and recalled. The slot count,
// the offset LFSR and comparing against the checked spikes (the spikes after
// the four cue spikes) are this implementation's choices.
module pattern_checker
  import pnn_pkg::*;
#(
  parameter int unsigned PULSE    = 264000,   // 4 ms
  parameter int unsigned OFF_MIN  = 33000,    // 500 us
  parameter int unsigned OFF_SPAN = 33000,    // up to 1 ms
  parameter int          SLOTS    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,             // reset the running totals
  input  logic        exp_valid,
  input  addr_t       exp_addr,
  input  logic [31:0] exp_isi,
  input  logic        exp_check,
  input  aer_post_t   net_spike,         // spikes from the neuron array
  input  logic        pattern_end,
  input  logic [6:0]  threshold_pct,
  output logic        result_valid,
  output logic [7:0]  result_hits,
  output logic [7:0]  result_checked,
  output logic        result_ok,
  output logic [15:0] n_seen,
  output logic [15:0] n_recalled
);
  localparam int SW = $clog2(SLOTS);

  logic [31:0]    now;
  logic [31:0]    s_open  [SLOTS];
  logic [31:0]    s_close [SLOTS];
  addr_t          s_addr  [SLOTS];
  logic [SLOTS-1:0] s_live, s_hit;
  logic [SW-1:0]  wp;
  logic [7:0]     hits, checked;
  logic [15:0]    rnd;
  logic [31:0]    off, open_t;
  logic [SLOTS-1:0] retire, match;
  logic [7:0]     retire_hits;
  logic           take;

  lfsr #(.W(16), .TAPS(16'hB400), .INIT(16'h1D2B)) u_off_lfsr (
    .clk, .rst_n, .load(1'b0), .seed('0), .step(exp_valid), .q(rnd)
  );

  assign take   = exp_valid && exp_check;
  assign off    = OFF_MIN + 32'((64'(rnd) * 64'(OFF_SPAN)) >> 16);
  assign open_t = (exp_isi > off) ? now + exp_isi - off : now;

  always_comb begin
    retire_hits = '0;
    for (int s = 0; s < SLOTS; s++) begin
      retire[s] = s_live[s] && (now >= s_close[s]);
      match[s]  = s_live[s] && net_spike.active && (net_spike.addr == s_addr[s]) &&
                  (now >= s_open[s]) && (now < s_close[s]);
      if (retire[s] && s_hit[s]) retire_hits += 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now          <= '0;
      s_live       <= '0;
      s_hit        <= '0;
      wp           <= '0;
      hits         <= '0;
      checked      <= '0;
      result_valid <= 1'b0;
      result_hits  <= '0;
      result_checked <= '0;
      result_ok    <= 1'b0;
      n_seen       <= '0;
      n_recalled   <= '0;
      for (int s = 0; s < SLOTS; s++) begin
        s_open[s]  <= '0;
        s_close[s] <= '0;
        s_addr[s]  <= '0;
      end
    end else begin
      now          <= now + 1;
      result_valid <= 1'b0;
      s_hit        <= s_hit | match;
      s_live       <= s_live & ~retire;
      if (take) begin
        s_open[wp]  <= open_t;
        s_close[wp] <= open_t + PULSE;
        s_addr[wp]  <= exp_addr;
        s_live[wp]  <= 1'b1;
        s_hit[wp]   <= 1'b0;
        wp          <= (wp == SW'(SLOTS - 1)) ? '0 : wp + 1'b1;
      end
      if (pattern_end) begin
        result_valid   <= 1'b1;
        result_hits    <= hits + retire_hits;
        result_checked <= checked;
        result_ok      <= (checked != '0) &&
                          (16'(hits + retire_hits) * 16'd100 > 16'(threshold_pct) * 16'(checked));
        n_seen         <= n_seen + 1'b1;
        if ((checked != '0) &&
            (16'(hits + retire_hits) * 16'd100 > 16'(threshold_pct) * 16'(checked)))
          n_recalled <= n_recalled + 1'b1;
        hits           <= '0;
        checked        <= '0;
      end else begin
        hits    <= hits + retire_hits;
        checked <= checked + 8'(take);
      end
      if (clear) begin
        n_seen     <= '0;
        n_recalled <= '0;
      end
    end
  end
endmodule
