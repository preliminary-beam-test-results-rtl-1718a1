// Self-checking test of adc_demux_unit at its full size (200 bunches,
// down-sampling 20).  The two ADC outputs are driven as the fast ADC would:
// bunch b's sample on adc_a (b even) or adc_b (b odd), each held two clocks,
// with a known pattern sample(b, turn).  Eight behavioural link receivers
// with random answer delays collect the words.  Checks: every lane gets
// exactly bunches 8m+j of the sampled turns (turn 0, 20, 40, ...) in order
// with the right samples and nothing from other turns; each sampled turn is
// fully delivered before the next one; no FIFO overflows.
module tb_adc_demux_unit;
  import ldamper_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rev_marker = 0;
  logic [7:0] adc_a = 0, adc_b = 0;
  logic [7:0] cd [LANES];
  logic cstrb_n [LANES], crdy_n [LANES];
  logic sample_turn, overflow;
  logic hold = 1;
  int checks = 0, failures = 0, sampled_turns = 0, skipped_turns = 0;
  localparam int NTURNS = 75;

  adc_demux_unit dut (.*);

  for (genvar j = 0; j < LANES; j++) begin : g_sink
    c4x_link_sink #(.MAXWAIT(2)) sink (.clk, .cd(cd[j]), .cstrb_n(cstrb_n[j]),
                                       .crdy_n(crdy_n[j]), .hold);
  end

  always #5 clk = ~clk;

  function automatic logic [7:0] sample(int b, int t);
    return 8'(b * 37 + t * 11 + (b * t) % 7);
  endfunction

  int got_n [LANES];
  always @(posedge clk) begin
    hold <= !rst_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (57) @(negedge clk);          // arbitrary phase before the first marker
    for (int t = 0; t < NTURNS; t++) begin
      if (t % DOWNSAMPLE == 0) begin
        sampled_turns++;
        // everything of the previous sampled turn must be out by now
        if (t > 0) begin
          checks++;
          if (g_sink[0].sink.got.size() != SLOTS * (sampled_turns - 1) ||
              g_sink[7].sink.got.size() != SLOTS * (sampled_turns - 1)) begin
            failures++; $display("turn %0d: lane words not delivered in time", t);
          end
        end
      end else skipped_turns++;
      for (int b = 0; b < NBUNCH; b++) begin
        rev_marker = (b == 0);
        if (b % 2 == 0) adc_a = sample(b, t);
        else            adc_b = sample(b, t);
        @(negedge clk);
        // sample_turn is visible during the whole turn
        if (b == 100) begin
          checks++;
          if (sample_turn != (t % DOWNSAMPLE == 0)) begin failures++; $display("sample_turn wrong"); end
        end
      end
    end
    rev_marker = 0;
    repeat (3000) @(negedge clk);
    for (int j = 0; j < LANES; j++) begin
      logic [31:0] q[$];
      case (j)
        0: q = g_sink[0].sink.got; 1: q = g_sink[1].sink.got;
        2: q = g_sink[2].sink.got; 3: q = g_sink[3].sink.got;
        4: q = g_sink[4].sink.got; 5: q = g_sink[5].sink.got;
        6: q = g_sink[6].sink.got; default: q = g_sink[7].sink.got;
      endcase
      checks++;
      if (q.size() != SLOTS * sampled_turns) begin
        failures++; $display("lane %0d: %0d words, exp %0d", j, q.size(), SLOTS * sampled_turns);
      end
      for (int n = 0; n < q.size() && n < SLOTS * sampled_turns; n++) begin
        int m, t, b;
        m = n % SLOTS; t = (n / SLOTS) * DOWNSAMPLE; b = m * LANES + j;
        checks++;
        if (q[n] !== {16'h0, 8'(b), sample(b, t)}) begin
          failures++; $display("lane %0d word %0d got %h exp %h", j, n, q[n], {16'h0, 8'(b), sample(b, t)});
        end
      end
    end
    checks++;
    if (overflow) begin failures++; $display("overflow"); end
    checks++;
    if (sampled_turns < 2 || skipped_turns == 0) failures++;
    $display("sampled turns %0d, skipped turns %0d", sampled_turns, skipped_turns);
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
