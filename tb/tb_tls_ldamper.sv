// End-to-end test of tls_ldamper with every parameter at its default:
// 200 bunches, eight lanes and processors, down-sampling 20, 4-tap filters,
// 256 kB record memory per processor.
//
// The ADC outputs carry a synthetic phase oscillation per bunch (a
// different phase advance and amplitude for every bunch).  A reference
// model computes, for every sampled turn, the kick of every bunch with its
// own 4-tap FIR history.  Checks, turn by turn and bunch by bunch: the DAC
// code is the kick of the latest set the unit has switched to, each set is
// switched in within a few turns of its sampled turn and played for 20
// turns, the DAC rests at mid-scale before the first set and while the
// feedback is off, and a record of REC samples per bunch, read back from all
// eight processors, holds the raw samples of the first REC sampled turns.
// Mechanisms counted (each must occur): sampled and skipped turns, set
// switches, 20-turn replays, copy-through (coefficients {1,0,0,0}: the DAC
// reproduces the ADC input), plain sign inversion, full FIR, saturation,
// kick timing offset,
// feedback off, record completion.
module tb_tls_ldamper;
  import ldamper_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rev_marker = 0;
  logic [7:0] adc_a = 0, adc_b = 0;
  coef_t coef [TAPS];
  logic fb_enable = 1;
  logic [7:0] kick_offset = 0;
  logic rec_arm = 0;
  logic [13:0] rec_len = 0;
  logic [LANES-1:0] rec_busy, rec_done;
  logic [2:0] rd_chan = 0;
  logic [17:0] rd_addr = 0;
  logic [7:0] rd_data, dac_data;
  logic new_set, sample_turn, overflow;
  int checks = 0, failures = 0;
  int n_sampled = 0, n_skipped = 0, n_swaps = 0, n_rep20 = 0, n_sign = 0, n_fir = 0;
  int n_sat = 0, n_off = 0, n_copy = 0, max_delay = 0, n_offset = 0;

  localparam int NSETS = 8;
  localparam int NTURNS = 20 * (NSETS - 1) + 15;
  localparam int REC = 4;

  tls_ldamper dut (.*);

  always #5 clk = ~clk;

  // synthetic bunch phase: offset + amplitude * triangle wave
  function automatic logic [7:0] phase(int b, int t);
    int p, tri_v, amp;
    amp = 20 + (b % 9) * 12;               // some bunches large enough to saturate
    p = (t * (3 + b % 5) + b * 7) % 64;    // phase, 64 steps per period
    tri_v = (p < 32) ? p - 16 : 48 - p;    // -16 .. 16
    return 8'(128 + 10 + (tri_v * amp) / 16);
  endfunction

  coef_t coef_sets [3][TAPS] = '{'{16'sd16384, 16'sd0, 16'sd0, 16'sd0},
                                 '{-16'sd16384, 16'sd0, 16'sd0, 16'sd0},
                                 '{-16'sd20000, 16'sd9000, 16'sd6000, -16'sd4000}};
  function automatic int cset(int k);
    return (k < 2) ? 0 : (k < NSETS / 2) ? 1 : 2;
  endfunction
  int hist [NBUNCH][TAPS];
  logic [7:0] kick_ref [NSETS][NBUNCH];

  // reference: set k is formed from sampled turn 20k with the coefficients
  // in force at that time (set 0..3: sign inversion, then the FIR)
  initial begin
    for (int b = 0; b < NBUNCH; b++) for (int k = 0; k < TAPS; k++) hist[b][k] = 0;
    for (int k = 0; k < NSETS; k++) begin
      int cs;
      cs = cset(k);
      for (int b = 0; b < NBUNCH; b++) begin
        longint acc, y;
        int x0;
        x0 = int'(phase(b, 20 * k)) - 128;
        acc = longint'(x0) * coef_sets[cs][0];
        for (int i = 1; i < TAPS; i++) acc += longint'(hist[b][i-1]) * coef_sets[cs][i];
        y = acc >>> COEF_FRAC;
        if (y > 127 || y < -128) n_sat++;
        if (y > 127) y = 127;
        if (y < -128) y = -128;
        for (int i = TAPS - 1; i > 0; i--) hist[b][i] = hist[b][i-1];
        hist[b][0] = x0;
        kick_ref[k][b] = 8'(y + 128);
      end
    end
  end

  initial begin
    int cur, turns_in_set, last_sampled;
    cur = -1; turns_in_set = 0; last_sampled = 0;
    coef = coef_sets[0];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (31) @(negedge clk);
    rec_len = 14'(REC);
    rec_arm = 1;
    @(negedge clk) rec_arm = 0;
    for (int t = 0; t < NTURNS; t++) begin
      if (t % 20 == 0) begin n_sampled++; last_sampled = t; end else n_skipped++;
      // change filters between sets, when no data is in flight
      if (t % 20 == 15) coef = coef_sets[cset(t / 20 + 1)];
      fb_enable = !(t >= 45 && t < 48);
      kick_offset = (t >= 100 && t < 120) ? 8'd37 : 8'd0;
      for (int b = 0; b < NBUNCH; b++) begin
        rev_marker = (b == 0);
        if (b % 2 == 0) adc_a = phase(b, t);
        else            adc_b = phase(b, t);
        @(negedge clk);
        if (b == 0 && new_set) begin
          n_swaps++;
          checks++;
          if (t - last_sampled > max_delay) max_delay = t - last_sampled;
          if (t - last_sampled < 1 || t - last_sampled > 10) begin
            failures++; $display("turn %0d: set switched %0d turns after sampling", t, t - last_sampled);
          end
          if (cur >= 0) begin
            checks++;
            if (turns_in_set == 20) n_rep20++;
            else begin failures++; $display("set %0d played %0d turns", cur, turns_in_set); end
          end
          cur++;
          turns_in_set = 0;
        end
        if (b == 0) turns_in_set++;
        checks++;
        if (cur < 0 || !fb_enable) begin
          if (dac_data !== ZERO_CODE) begin failures++; $display("turn %0d bunch %0d not mid-scale", t, b); end
        end else if (cur >= NSETS) begin
          failures++; $display("more sets than sampled turns");
        end else if (dac_data !== kick_ref[cur][(b - kick_offset + NBUNCH) % NBUNCH]) begin
          failures++;
          if (failures < 20) $display("turn %0d bunch %0d: dac %h exp %h (set %0d)", t, b, dac_data,
                                      kick_ref[cur][(b - kick_offset + NBUNCH) % NBUNCH], cur);
        end else begin
          if (kick_offset != 0) n_offset++;
          case (cset(cur))
            0: n_copy++;
            1: n_sign++;
            default: n_fir++;
          endcase
        end
      end
      if (!fb_enable) n_off++;
    end
    rev_marker = 0;
    // read the records of all eight processors
    checks++;
    if (rec_done !== '1 || rec_busy !== '0) begin failures++; $display("records not done %b", rec_done); end
    for (int b = 0; b < NBUNCH; b++)
      for (int i = 0; i < REC; i++) begin
        @(negedge clk);
        rd_chan = 3'(b % LANES);
        rd_addr = 18'((b / LANES) * REC_STRIDE + i);
        @(posedge clk); #1;
        checks++;
        if (rd_data !== phase(b, 20 * i)) begin
          failures++; $display("record bunch %0d idx %0d got %h exp %h", b, i, rd_data, phase(b, 20 * i));
        end
      end
    checks++;
    if (overflow) begin failures++; $display("FIFO overflow"); end
    $display("largest delay from sampled turn to switch: %0d turns; copy-through %0d", max_delay, n_copy);
    $display("sampled %0d skipped %0d switches %0d replays20 %0d sign-only %0d fir %0d saturated %0d fb-off turns %0d",
             n_sampled, n_skipped, n_swaps, n_rep20, n_sign, n_fir, n_sat, n_off);
    checks++;
    if (n_sampled == 0 || n_skipped == 0 || n_swaps != NSETS || n_rep20 < NSETS - 2 ||
        n_copy == 0 || n_sign == 0 || n_fir == 0 || n_sat == 0 || n_off == 0 || n_offset == 0) begin
      failures++; $display("a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * NTURNS + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
