// Self-checking test of dac_mux_unit at its full size (200 bunches, eight
// links).  Eight behavioural link senders deliver a new set of 200 tagged
// kicks every 20 turns, each lane in its own random bunch order within the
// lane, so the unit must put them in bunch sequence.  Checks: the double
// buffer swaps at the first revolution marker after a set is complete,
// each set is played for 20 turns, every DAC code of every turn equals the
// kick of its bunch in the current set, and the DAC sits at mid-scale
// before the first set and while feedback is disabled, and that a kick
// offset of k bunches plays bunch b-k's kick in bunch b's clock (an offset
// of 200 or more counts as 0).
module tb_dac_mux_unit;
  import ldamper_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rev_marker = 0, fb_enable = 1;
  logic [7:0] kick_offset = 0;
  logic [7:0] cd [LANES];
  logic cstrb_n [LANES], crdy_n [LANES];
  logic [7:0] dac_data;
  logic new_set;
  int checks = 0, failures = 0, swaps = 0, repeats20 = 0, disabled_turns = 0, offset_turns = 0;
  localparam int NSETS = 5, NTURNS = 20 * NSETS + 10;

  dac_mux_unit dut (.*);

  for (genvar j = 0; j < LANES; j++) begin : g_src
    c4x_link_src #(.MAXWAIT(2)) src (.clk, .cd(cd[j]), .cstrb_n(cstrb_n[j]), .crdy_n(crdy_n[j]));
  end

  always #5 clk = ~clk;

  function automatic logic [7:0] kick(int b, int k);
    return 8'(b * 13 + k * 71 + 5);
  endfunction

  task automatic push_set(int k);
    for (int j = 0; j < LANES; j++) begin
      int order [SLOTS];
      for (int m = 0; m < SLOTS; m++) order[m] = m;
      order.shuffle();
      for (int m = 0; m < SLOTS; m++) begin
        logic [31:0] w;
        int b;
        b = order[m] * LANES + j;
        w = {16'h0, 8'(b), kick(b, k)};
        case (j)
          0: g_src[0].src.push(w); 1: g_src[1].src.push(w);
          2: g_src[2].src.push(w); 3: g_src[3].src.push(w);
          4: g_src[4].src.push(w); 5: g_src[5].src.push(w);
          6: g_src[6].src.push(w); default: g_src[7].src.push(w);
        endcase
      end
    end
  endtask

  function automatic int total_sent();
    return g_src[0].src.sent + g_src[1].src.sent + g_src[2].src.sent + g_src[3].src.sent +
           g_src[4].src.sent + g_src[5].src.sent + g_src[6].src.sent + g_src[7].src.sent;
  endfunction

  initial begin
    int cur_set, pushed, turns_in_set;
    cur_set = -1; pushed = 0; turns_in_set = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(negedge clk);
    for (int t = 0; t < NTURNS; t++) begin
      bit expect_swap;
      if (t % 20 == 1 && pushed < NSETS) begin push_set(pushed); pushed++; end
      fb_enable = !(t >= 50 && t < 53);
      kick_offset = (t >= 60 && t < 70) ? 8'(t * 7 % NBUNCH) : (t == 70) ? 8'd250 : 8'd0;
      if (kick_offset != 0) offset_turns++;
      // a set is complete when every word of it has been sent; the sender
      // counts a word only after the receiver's last acknowledge
      expect_swap = (cur_set + 1 < pushed) && (total_sent() == NBUNCH * (cur_set + 2));
      for (int b = 0; b < NBUNCH; b++) begin
        rev_marker = (b == 0);
        @(negedge clk);
        if (b == 0) begin
          checks++;
          if (new_set !== expect_swap) begin
            failures++; $display("turn %0d: new_set %0b exp %0b", t, new_set, expect_swap);
          end
          if (expect_swap) begin
            if (cur_set >= 1 && turns_in_set == 20) repeats20++;
            if (cur_set >= 1 && turns_in_set != 20) begin
              failures++; $display("set %0d played %0d turns", cur_set, turns_in_set);
            end
            cur_set++; swaps++; turns_in_set = 0;
          end
          turns_in_set++;
        end
        checks++;
        if (cur_set < 0 || !fb_enable) begin
          if (dac_data !== ZERO_CODE) begin failures++; $display("turn %0d bunch %0d: not mid-scale", t, b); end
        end else begin
          int o, rb;
          o = (kick_offset < NBUNCH) ? int'(kick_offset) : 0;
          rb = (b - o + NBUNCH) % NBUNCH;
          if (dac_data !== kick(rb, cur_set)) begin
            failures++; $display("turn %0d bunch %0d: dac %h exp %h", t, b, dac_data, kick(rb, cur_set));
          end
        end
      end
      if (!fb_enable) disabled_turns++;
    end
    checks++;
    if (swaps != NSETS || repeats20 < NSETS - 2 || disabled_turns == 0 || offset_turns == 0) begin
      failures++; $display("swaps %0d repeats20 %0d disabled %0d", swaps, repeats20, disabled_turns);
    end
    $display("swaps %0d, sets played 20 turns %0d", swaps, repeats20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * NTURNS + 5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
