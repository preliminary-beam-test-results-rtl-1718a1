// 1:4 word demultiplexer (serial-to-parallel converter).
//
// Each of the two 250 MHz outputs of the fast ADC is split into four
// parallel words, so that each output word changes at a quarter of the
// input rate.  On every cycle with `strobe` high the input word is stored
// at position 0..3; `sync` together with `strobe` forces that word to
// position 0 and so aligns the frame (the bunch numbering).  When position 3
// is stored, all four words are presented on `dout` together, `dout[0]`
// being the oldest, and `dout_valid` pulses for one cycle.  `dout` holds
// until the next frame completes.
//
// Timing: `dout_valid` rises on the clock edge after the strobe that
// delivers the fourth word.  The splitting ratio of four follows the
// described front end; word order and the frame-sync input are this
// design's choice.
module demux_1to4 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         strobe,     // input word valid this cycle
  input  logic         sync,       // with strobe: this word is position 0
  input  logic [W-1:0] din,
  output logic [W-1:0] dout [4],
  output logic         dout_valid
);

  logic [1:0]   pos_q;
  logic [1:0]   pos;
  logic [W-1:0] shreg_q [3];

  assign pos = sync ? 2'd0 : pos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q      <= '0;
      dout_valid <= 1'b0;
      for (int i = 0; i < 3; i++) shreg_q[i] <= '0;
      for (int i = 0; i < 4; i++) dout[i] <= '0;
    end else begin
      dout_valid <= 1'b0;
      if (strobe) begin
        pos_q <= pos + 2'd1;
        if (pos == 2'd3) begin
          for (int i = 0; i < 3; i++) dout[i] <= shreg_q[i];
          dout[3]    <= din;
          dout_valid <= 1'b1;
        end else begin
          shreg_q[pos] <= din;
        end
      end
    end
  end

endmodule
