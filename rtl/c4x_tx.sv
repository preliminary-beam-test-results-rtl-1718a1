// Transmit side of a byte-wide, 'C4x-style communication port link.
//
// A 32-bit word accepted on the valid/ready interface is sent as four
// bytes, least significant first, over an 8-bit data bus with a
// four-phase handshake on two active-low wires:
//   1. drive the byte on `cd` (one cycle of set-up),
//   2. pull `cstrb_n` low and wait until the receiver pulls `crdy_n` low,
//   3. release `cstrb_n` and wait until the receiver releases `crdy_n`.
// `crdy_n` comes from the other end of a cable and is synchronised with two
// flip-flops, so one byte takes at least 7 clock cycles and a word at least
// 28.  The byte-wide strobe/ready handshake is the usual 'C4x port scheme;
// the token-passing that lets a 'C4x port change direction is left out,
// because every link here only ever carries data one way.
module c4x_tx (
  input  logic        clk,
  input  logic        rst_n,
  // word side
  input  logic [31:0] word,
  input  logic        valid,
  output logic        ready,
  // link side
  output logic [7:0]  cd,
  output logic        cstrb_n,
  input  logic        crdy_n
);

  typedef enum logic [1:0] {IDLE, SETUP, STROBE, RELEASE} state_t;

  state_t      state_q;
  logic [31:0] word_q;
  logic [1:0]  byte_q;
  logic [1:0]  rdy_sync_q;   // [1] is the synchronised crdy_n
  logic        rdy_low;

  assign rdy_low = !rdy_sync_q[1];
  assign ready   = (state_q == IDLE);
  assign cd      = word_q[8*byte_q +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= IDLE;
      word_q     <= '0;
      byte_q     <= '0;
      cstrb_n    <= 1'b1;
      rdy_sync_q <= 2'b11;
    end else begin
      rdy_sync_q <= {rdy_sync_q[0], crdy_n};
      unique case (state_q)
        IDLE: if (valid) begin
          word_q  <= word;
          byte_q  <= '0;
          state_q <= SETUP;
        end
        SETUP: if (!rdy_low) begin   // previous byte fully released
          cstrb_n <= 1'b0;
          state_q <= STROBE;
        end
        STROBE: if (rdy_low) begin
          cstrb_n <= 1'b1;
          state_q <= RELEASE;
        end
        RELEASE: if (!rdy_low) begin
          if (byte_q == 2'd3) begin
            state_q <= IDLE;
          end else begin
            byte_q  <= byte_q + 2'd1;
            state_q <= SETUP;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // The byte on the bus must not change while the strobe is asserted.
  a_data_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !cstrb_n && $past(!cstrb_n) |-> $stable(cd));

endmodule
