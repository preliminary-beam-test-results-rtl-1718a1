// Self-checking test of c4x_tx against a behavioural comm-port receiver
// with random answer delays and stalls.  Checks every word arrives intact
// and in order, exactly four strobes per word, that the data bus is stable
// while the strobe is low, and the minimum of 28 clocks per word.
module tb_c4x_tx;
  logic clk = 0, rst_n = 0;
  logic [31:0] word = 0;
  logic valid = 0, ready;
  logic [7:0] cd;
  logic cstrb_n, crdy_n, hold = 1;
  int checks = 0, failures = 0, strobes = 0, stalls = 0;
  logic [31:0] sent[$];
  longint t_first = -1, t_last = 0;
  localparam int NWORDS = 300;

  c4x_tx dut (.*);
  c4x_link_sink #(.MAXWAIT(3)) sink (.clk, .cd, .cstrb_n, .crdy_n, .hold);

  always #5 clk = ~clk;

  // protocol monitor
  logic strb_prev = 1;
  logic [7:0] cd_prev = 0;
  always @(posedge clk) begin
    if (rst_n && !cstrb_n && strb_prev) strobes++;
    if (!cstrb_n && !strb_prev) begin
      checks++;
      if (cd !== cd_prev) begin failures++; $display("cd changed under strobe"); end
    end
    strb_prev <= cstrb_n;
    cd_prev   <= cd;
  end

  always @(posedge clk) begin
    hold <= !rst_n || ($urandom_range(20) == 0);
    if (hold) stalls++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NWORDS; n++) begin
      @(negedge clk);
      word  = $urandom;
      valid = 1;
      do @(posedge clk); while (!ready);
      if (t_first < 0) t_first = $time;
      sent.push_back(word);
      @(negedge clk) valid = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    wait (sink.got.size() == NWORDS);
    t_last = $time;
    for (int n = 0; n < NWORDS; n++) begin
      checks++;
      if (sink.got[n] !== sent[n]) begin
        failures++; $display("word %0d got %h exp %h", n, sink.got[n], sent[n]);
      end
    end
    checks++;
    if (strobes != 4 * NWORDS) begin failures++; $display("strobes %0d", strobes); end
    checks++;
    if ((t_last - t_first) / 10 < 28 * (NWORDS - 1)) begin
      failures++; $display("faster than 28 clocks per word?");
    end
    checks++;
    if (stalls == 0) failures++;
    $display("clocks per word %0d", (t_last - t_first) / 10 / NWORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
