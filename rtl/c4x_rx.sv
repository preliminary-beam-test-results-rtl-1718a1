// Receive side of a byte-wide, 'C4x-style communication port link.
//
// Counterpart of c4x_tx: `cstrb_n` is synchronised with two flip-flops;
// when it is seen low the byte on `cd` (stable since before the strobe) is
// stored and `crdy_n` is pulled low; when the strobe is seen released,
// `crdy_n` is released.  After the fourth byte (bytes arrive least
// significant first) the word is offered on `word`/`valid` and held until
// `ready`.  While a finished word waits, the next strobe is not
// acknowledged, so the link itself applies back-pressure to the sender.
// `valid` rises two cycles after the last strobe falls.  The handshake is
// the usual 'C4x port scheme without token passing (one-way links).
module c4x_rx (
  input  logic        clk,
  input  logic        rst_n,
  // link side
  input  logic [7:0]  cd,
  input  logic        cstrb_n,
  output logic        crdy_n,
  // word side
  output logic [31:0] word,
  output logic        valid,
  input  logic        ready
);

  typedef enum logic {WAIT_STRB, WAIT_REL} state_t;

  state_t      state_q;
  logic [23:0] low_q;        // bytes 0..2 of the word in progress
  logic [1:0]  byte_q;
  logic [1:0]  strb_sync_q;  // [1] is the synchronised cstrb_n
  logic        strb_low;

  assign strb_low = !strb_sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= WAIT_STRB;
      low_q       <= '0;
      byte_q      <= '0;
      crdy_n      <= 1'b1;
      strb_sync_q <= 2'b11;
      word        <= '0;
      valid       <= 1'b0;
    end else begin
      strb_sync_q <= {strb_sync_q[0], cstrb_n};
      if (valid && ready) valid <= 1'b0;
      unique case (state_q)
        WAIT_STRB: if (strb_low && !(valid && !ready)) begin
          crdy_n  <= 1'b0;
          state_q <= WAIT_REL;
          if (byte_q == 2'd3) begin
            word  <= {cd, low_q};
            valid <= 1'b1;
          end else begin
            low_q[8*byte_q +: 8] <= cd;
          end
        end
        WAIT_REL: if (!strb_low) begin
          crdy_n  <= 1'b1;
          byte_q  <= byte_q + 2'd1;
          state_q <= WAIT_STRB;
        end
        default: state_q <= WAIT_STRB;
      endcase
    end
  end

  // A word on offer stays on offer, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    valid && !ready |=> valid && $stable(word));

endmodule
