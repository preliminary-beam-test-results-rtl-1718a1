// Self-checking test of sample_fifo: random writes and reads against a
// queue model; checks data order, empty, full and the sticky overflow flag
// after writes into a full FIFO.
module tb_sample_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic empty, full, overflow;
  int checks = 0, failures = 0, fulls = 0;
  logic [7:0] q[$];
  logic exp_ovf = 0;

  sample_fifo #(.W(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      int bias;
      bias = (n / 500) % 2 ? 3 : 1;   // phases that fill and phases that drain
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(overflow == exp_ovf, "overflow");
      if (q.size() != 0) check(rd_data == q[0], "data");
      if (full) fulls++;
      wr_en   = ($urandom_range(3) < bias);
      rd_en   = ($urandom_range(3) >= bias);
      wr_data = 8'($urandom);
      @(posedge clk);
      #1;
    end
    // model update is done in the loop below in step with the DUT
  end

  always @(posedge clk) if (rst_n) begin
    logic do_rd, do_wr;
    do_rd = rd_en && q.size() != 0;
    do_wr = wr_en && q.size() != DEPTH;
    if (wr_en && q.size() == DEPTH) exp_ovf = 1;
    if (do_rd) void'(q.pop_front());
    if (do_wr) q.push_back(wr_data);
  end

  initial begin
    wait (rst_n);
    repeat (4005) @(posedge clk);
    check(fulls > 10, "full reached");
    check(exp_ovf, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
