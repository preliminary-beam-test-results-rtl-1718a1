// Testbench model of a comm-port receiver (not synthesizable).
//
// Answers each strobe on `cstrb_n` after a random wait of 0..MAXWAIT clocks:
// takes the byte on `cd`, pulls `crdy_n` low, waits for the strobe to be
// released and releases `crdy_n`.  While `hold` is high no new strobe is
// answered.  Four bytes, least significant first, make a word, appended to
// the queue `got`.  Written independently of the design's c4x_rx.
module c4x_link_sink #(
  parameter int MAXWAIT = 3
) (
  input  logic       clk,
  input  logic [7:0] cd,
  input  logic       cstrb_n,
  output logic       crdy_n,
  input  logic       hold
);
  logic [31:0] got[$];
  int          nbytes = 0;
  logic [31:0] acc;

  initial begin
    crdy_n = 1'b1;
    acc = '0;
    forever begin
      do @(posedge clk); while (cstrb_n !== 1'b0 || hold);
      repeat ($urandom_range(MAXWAIT)) @(posedge clk);
      acc[8*(nbytes%4) +: 8] = cd;
      crdy_n <= 1'b0;
      do @(posedge clk); while (cstrb_n !== 1'b1);
      crdy_n <= 1'b1;
      nbytes++;
      if (nbytes % 4 == 0) got.push_back(acc);
    end
  end
endmodule
