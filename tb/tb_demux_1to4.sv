// Self-checking test of demux_1to4: a random word stream with random gaps
// and occasional frame re-syncs is compared with a reference model of the
// four-word framing (oldest word on dout[0]).
module tb_demux_1to4;
  logic clk = 0, rst_n = 0;
  logic strobe = 0, sync = 0;
  logic [7:0] din = 0;
  logic [7:0] dout [4];
  logic dout_valid;
  int checks = 0, failures = 0, frames = 0, resyncs = 0;

  demux_1to4 #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  // reference
  logic [7:0] ref_w [4];
  int         ref_pos = 0;
  logic       exp_valid = 0;
  logic [7:0] exp_w [4];

  always @(posedge clk) if (rst_n) begin
    // compare what the DUT shows after the previous edge
    if (dout_valid !== exp_valid) begin
      failures++; $display("valid mismatch t=%0t", $time);
    end
    checks++;
    if (exp_valid) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (dout[i] !== exp_w[i]) begin
          failures++; $display("word %0d: got %h exp %h", i, dout[i], exp_w[i]);
        end
      end
      frames++;
    end
    exp_valid = 0;
    if (strobe) begin
      if (sync) ref_pos = 0;
      ref_w[ref_pos] = din;
      if (ref_pos == 3) begin
        exp_valid = 1;
        exp_w = ref_w;
      end
      ref_pos = (ref_pos + 1) % 4;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      strobe = ($urandom_range(3) != 0);
      sync   = strobe && ($urandom_range(40) == 0);
      if (sync) resyncs++;
      din    = 8'($urandom);
    end
    @(negedge clk) strobe = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (frames < 100 || resyncs == 0) begin
      failures++; $display("too few frames %0d or resyncs %0d", frames, resyncs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
