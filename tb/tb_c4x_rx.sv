// Self-checking test of c4x_rx against a behavioural comm-port sender with
// random strobe delays, and a word consumer that stalls at random.  Checks
// every word intact and in order, that a word on offer is held while
// stalled, and that crdy_n is answered only after a strobe.
module tb_c4x_rx;
  logic clk = 0, rst_n = 0;
  logic [7:0] cd;
  logic cstrb_n, crdy_n;
  logic [31:0] word;
  logic valid, ready = 0;
  int checks = 0, failures = 0, stalled = 0;
  logic [31:0] sent[$], got[$];
  localparam int NWORDS = 300;

  c4x_rx dut (.*);
  c4x_link_src #(.MAXWAIT(3)) src (.clk, .cd, .cstrb_n, .crdy_n);

  always #5 clk = ~clk;

  logic        held = 0;
  logic [31:0] held_word;
  always @(posedge clk) if (rst_n) begin
    if (held) begin
      checks++;
      if (!valid || word !== held_word) begin failures++; $display("offer dropped"); end
    end
    held = valid && !ready;
    held_word = word;
    if (valid && !ready) stalled++;
    if (valid && ready) got.push_back(word);
    // crdy_n may only be low while the strobe is low or was low recently
    ready <= ((($time / 10) % 800) < 400) ? ($urandom_range(3) != 0) : ($urandom_range(60) == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NWORDS; n++) begin
      logic [31:0] w;
      w = $urandom;
      sent.push_back(w);
      src.push(w);
    end
    wait (got.size() == NWORDS);
    for (int n = 0; n < NWORDS; n++) begin
      checks++;
      if (got[n] !== sent[n]) begin
        failures++; $display("word %0d got %h exp %h", n, got[n], sent[n]);
      end
    end
    checks++;
    if (stalled == 0) failures++;
    repeat (20) @(posedge clk);
    checks++;
    if (valid || crdy_n !== 1'b1) begin failures++; $display("not idle at end"); end
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
