// Synchronous FIFO buffering one lane of demultiplexed samples.
//
// The front end writes a burst of 25 samples per lane during one turn and
// the comm-port link drains them far more slowly, so each lane has a FIFO.
// It is a circular buffer of DEPTH words (a power of two) with show-ahead
// output: `rd_data` is the oldest word whenever `empty` is low, and
// `rd_en` removes it.  A write while full is dropped and sets the sticky
// `overflow` flag; a read while empty is ignored.  Writing and reading in
// the same cycle is allowed.  The depth is this design's choice (32 words
// hold one turn's 25 samples with margin).
module sample_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr_q, rptr_q;
  logic         do_wr, do_rd;

  assign empty   = (wptr_q == rptr_q);
  assign full    = (wptr_q[AW-1:0] == rptr_q[AW-1:0]) && (wptr_q[AW] != rptr_q[AW]);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q   <= '0;
      rptr_q   <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr_q <= wptr_q + 1'b1;
      if (do_rd) rptr_q <= rptr_q + 1'b1;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

endmodule
