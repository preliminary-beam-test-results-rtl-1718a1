// Self-checking test of dsp_channel at its full size: tagged samples for
// the 25 bunches of lane 3 arrive on the input link for 12 turns; every kick
// on the output link is compared with a reference 4-tap FIR with its own
// per-bunch history, and a record of 5 samples per bunch armed at the start
// is read back through the host port.  The output link stalls at random,
// so the input link must be held off without losing a word.
module tb_dsp_channel;
  import ldamper_pkg::*;
  logic clk = 0, rst_n = 0;
  coef_t coef [TAPS];
  logic [7:0] in_cd, out_cd;
  logic in_cstrb_n, in_crdy_n, out_cstrb_n, out_crdy_n;
  logic rec_arm = 0;
  logic [13:0] rec_len = 5;
  logic rec_busy, rec_done;
  logic [17:0] rd_addr = 0;
  logic [7:0] rd_data;
  logic hold = 1;
  int checks = 0, failures = 0, stalls = 0;
  localparam int LANE = 3, NTURN = 12;

  dsp_channel dut (.*);
  c4x_link_src  #(.MAXWAIT(2)) src  (.clk, .cd(in_cd), .cstrb_n(in_cstrb_n), .crdy_n(in_crdy_n));
  c4x_link_sink #(.MAXWAIT(2)) sink (.clk, .cd(out_cd), .cstrb_n(out_cstrb_n), .crdy_n(out_crdy_n), .hold);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    hold <= !rst_n || ((($time / 10) % 1500) > 1100) || ($urandom_range(30) == 0);
    if (hold && rst_n) stalls++;
  end

  logic [7:0] samp [NTURN][SLOTS];
  logic [31:0] exp_q[$];

  initial begin
    int hist [SLOTS][TAPS];
    coef = '{-16'sd12000, 16'sd4000, 16'sd2000, -16'sd1000};
    for (int s = 0; s < SLOTS; s++) for (int k = 0; k < TAPS; k++) hist[s][k] = 0;
    for (int t = 0; t < NTURN; t++)
      for (int s = 0; s < SLOTS; s++) begin
        longint acc, y;
        int x0;
        samp[t][s] = 8'($urandom_range(60, 200));
        x0 = int'(samp[t][s]) - 128;
        acc = longint'(x0) * coef[0];
        for (int k = 1; k < TAPS; k++) acc += longint'(hist[s][k-1]) * coef[k];
        y = acc >>> COEF_FRAC;
        if (y > 127) y = 127;
        if (y < -128) y = -128;
        for (int k = TAPS - 1; k > 0; k--) hist[s][k] = hist[s][k-1];
        hist[s][0] = x0;
        exp_q.push_back({16'h0, 8'(s * LANES + LANE), 8'(y + 128)});
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk) rec_arm = 1;
    @(negedge clk) rec_arm = 0;
    for (int t = 0; t < NTURN; t++)
      for (int s = 0; s < SLOTS; s++)
        src.push({16'h0, 8'(s * LANES + LANE), samp[t][s]});
    wait (sink.got.size() == NTURN * SLOTS);
    for (int n = 0; n < NTURN * SLOTS; n++) begin
      checks++;
      if (sink.got[n] !== exp_q[n]) begin
        failures++; $display("kick %0d got %h exp %h", n, sink.got[n], exp_q[n]);
      end
    end
    checks++;
    if (!rec_done || rec_busy) begin failures++; $display("record not done"); end
    for (int s = 0; s < SLOTS; s++)
      for (int i = 0; i < 5; i++) begin
        @(negedge clk) rd_addr = 18'(s * REC_STRIDE + i);
        @(posedge clk); #1;
        checks++;
        if (rd_data !== samp[i][s]) begin
          failures++; $display("record slot %0d idx %0d got %h exp %h", s, i, rd_data, samp[i][s]);
        end
      end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
