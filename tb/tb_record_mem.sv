// Self-checking test of record_mem at its full size (25 bunches, 10,000
// bytes per bunch, 256 kB): a stream of samples in bunch order is fed, a
// record of 7 samples per bunch is armed mid-turn and must start at slot 0
// of the next turn; then a second record of 3; every recorded byte is read
// back through the host port and compared with what was fed.
module tb_record_mem;
  import ldamper_pkg::*;
  logic clk = 0, rst_n = 0;
  logic arm = 0;
  logic [13:0] rec_len = 0;
  logic busy, done;
  logic in_valid = 0;
  logic [7:0] in_bunch = 0, in_sample = 0;
  logic [17:0] rd_addr = 0;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;
  localparam int LANE = 2;

  record_mem dut (.*);

  always #5 clk = ~clk;

  logic [7:0] fed [int];   // turn*SLOTS+slot -> sample
  int turn = 0;

  task automatic feed_turn();
    for (int s = 0; s < SLOTS; s++) begin
      @(negedge clk);
      in_valid  = 1;
      in_bunch  = 8'(s * LANES + LANE);
      in_sample = 8'($urandom);
      fed[turn * SLOTS + s] = in_sample;
      if (turn == 2 && s == 10) begin arm = 1; rec_len = 7; end
      else arm = 0;
      @(negedge clk) in_valid = 0; arm = 0;
    end
    turn++;
  endtask

  task automatic check_record(int first_turn, int len);
    for (int s = 0; s < SLOTS; s++)
      for (int i = 0; i < len; i++) begin
        @(negedge clk) rd_addr = 18'(s * REC_STRIDE + i);
        @(posedge clk); #1;
        checks++;
        if (rd_data !== fed[(first_turn + i) * SLOTS + s]) begin
          failures++; $display("slot %0d idx %0d got %h exp %h", s, i, rd_data,
                               fed[(first_turn + i) * SLOTS + s]);
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3; t++) feed_turn();   // armed during turn 2
    checks++;
    if (!busy || done) begin failures++; $display("not armed"); end
    for (int t = 0; t < 7; t++) feed_turn();   // turns 3..9
    checks++;
    if (busy || !done) begin failures++; $display("not done after 7"); end
    feed_turn();   // turn 10: not recorded
    check_record(3, 7);
    // second record, armed between turns
    @(negedge clk) arm = 1; rec_len = 3;
    @(negedge clk) arm = 0;
    checks++;
    if (done) begin failures++; $display("done not cleared"); end
    for (int t = 0; t < 3; t++) feed_turn();   // 11..13
    checks++;
    if (!done) begin failures++; $display("second not done"); end
    check_record(11, 3);
    // index 3 of slot 0 still holds the first record's sample from turn 6
    @(negedge clk) rd_addr = 18'(3);
    @(posedge clk); #1;
    checks++;
    if (rd_data !== fed[6 * SLOTS]) begin failures++; $display("overwrote beyond length"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
