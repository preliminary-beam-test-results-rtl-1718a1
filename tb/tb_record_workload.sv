// Observation workloads on tls_ldamper at its default size: the recording
// of bunch phase oscillations of all 200 bunches, first 1024 samples per
// bunch (8 ms), then the full 10,000 samples per bunch (80 ms, 10 kB per
// bunch in each processor's 256 kB record memory), while the feedback keeps
// running.  The ADC carries a synthetic oscillation per bunch.  Checks: the
// record takes one sample per bunch every 20 turns (8 us at 2 ns per bunch
// clock), so its duration in clocks is (length - 1) * 4000 plus the link
// latency; every recorded byte of every bunch, read back through the host
// port, equals the sample of its sampled turn; the kick sets keep changing
// during the record.
module tb_record_workload;
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
  int checks = 0, failures = 0, sets = 0;
  longint cyc = 0;

  tls_ldamper dut (.*);

  always #1 clk = ~clk;    // 2 ns bunch clock (500 MHz)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (new_set) sets <= sets + 1;
  end

  function automatic logic [7:0] phase(int b, int t);
    int p, tri_v, amp;
    amp = 10 + (b % 7) * 9;
    p = (t / 20 * (1 + b % 3) + b * 5) % 100;
    tri_v = (p < 50) ? p - 25 : 75 - p;    // -25 .. 25
    return 8'(128 + (tri_v * amp) / 25);
  endfunction

  int turn = 0;
  bit running = 0;

  // beam and timing: markers and ADC samples, turn after turn
  initial begin
    wait (running);
    forever begin
      for (int b = 0; b < NBUNCH; b++) begin
        rev_marker = (b == 0);
        if (b % 2 == 0) adc_a = phase(b, turn);
        else            adc_b = phase(b, turn);
        @(negedge clk);
      end
      turn++;
    end
  end

  task automatic run_record(int len);
    longint t_arm, t_done;
    int first_turn, sets0;
    // arm in the middle of a non-sampled turn
    wait (turn % 20 == 7);
    @(negedge clk);
    rec_len = 14'(len);
    rec_arm = 1;
    @(negedge clk) rec_arm = 0;
    t_arm = cyc;
    sets0 = sets;
    first_turn = (turn / 20 + 1) * 20;     // the next sampled turn
    wait (rec_done == '1);
    t_done = cyc;
    checks++;
    if (t_done - t_arm < longint'(len - 1) * 4000 + 13 * 200 ||
        t_done - t_arm > longint'(len - 1) * 4000 + 13 * 200 + 6000) begin
      failures++; $display("record of %0d took %0d clocks", len, t_done - t_arm);
    end
    checks++;
    if (sets - sets0 < len - 1) begin failures++; $display("feedback stopped during record"); end
    $display("record of %0d samples per bunch: %0d clocks = %0d us", len, t_done - t_arm, (t_done - t_arm) * 2 / 1000);
    for (int b = 0; b < NBUNCH; b++)
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        rd_chan = 3'(b % LANES);
        rd_addr = 18'((b / LANES) * REC_STRIDE + i);
        @(posedge clk); #0.5;
        checks++;
        if (rd_data !== phase(b, first_turn + 20 * i)) begin
          failures++;
          if (failures < 10) $display("bunch %0d sample %0d: %h exp %h", b, i, rd_data, phase(b, first_turn + 20 * i));
        end
      end
  endtask

  initial begin
    coef = '{-16'sd16384, 16'sd0, 16'sd0, 16'sd0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    running = 1;
    run_record(1024);
    run_record(REC_STRIDE);
    checks++;
    if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64'd60_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
