// One processor's share of the feedback: 25 bunches from link to link.
//
// Hardware equivalent of the work one signal processor does for its lane:
// it receives tagged phase-error samples on a comm-port link (c4x_rx), logs
// them into its dual-port record memory (record_mem) for observation,
// filters each bunch with the 4-tap FIR (bunch_fir) and sends the tagged
// kick to the DAC/MUX unit on a second link (c4x_tx).  The incoming link is
// held off (no ready) while a kick is still waiting for the outgoing link,
// so nothing is dropped; at one word per 28 or more clocks per link the
// filter is never the bottleneck.  The kick of a sample is handed to the
// outgoing link two clocks after its word is complete on the incoming one.
//
// The split into 25 bunches per processor, the record memory and the FIR
// follow the described system (where this is DSP software); doing it in
// logic, and the word tag, are this design's choices.
module dsp_channel
  import ldamper_pkg::*;
#(
  parameter int unsigned N_SLOTS = SLOTS,
  parameter int unsigned STRIDE  = REC_STRIDE,
  parameter int unsigned BYTES   = REC_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  coef_t       coef [TAPS],
  // link from the ADC/DEMUX unit
  input  logic [7:0]  in_cd,
  input  logic        in_cstrb_n,
  output logic        in_crdy_n,
  // link to the DAC/MUX unit
  output logic [7:0]  out_cd,
  output logic        out_cstrb_n,
  input  logic        out_crdy_n,
  // record control and host read port
  input  logic        rec_arm,
  input  logic [13:0] rec_len,
  output logic        rec_busy,
  output logic        rec_done,
  input  logic [$clog2(BYTES)-1:0] rd_addr,
  output logic [SAMPLE_W-1:0]      rd_data
);

  logic [31:0]         rx_word;
  logic                rx_valid, rx_ready, take;
  link_word_t          in_w;
  logic                f_valid;
  logic [7:0]          f_bunch;
  logic [SAMPLE_W-1:0] f_kick;
  link_word_t          pend_q;
  logic                pend_valid_q, tx_ready;

  c4x_rx u_rx (
    .clk, .rst_n,
    .cd      (in_cd),
    .cstrb_n (in_cstrb_n),
    .crdy_n  (in_crdy_n),
    .word    (rx_word),
    .valid   (rx_valid),
    .ready   (rx_ready)
  );

  assign in_w     = link_word_t'(rx_word);
  assign rx_ready = !pend_valid_q && !f_valid;
  assign take     = rx_valid && rx_ready;

  record_mem #(.N_SLOTS(N_SLOTS), .STRIDE(STRIDE), .BYTES(BYTES)) u_rec (
    .clk, .rst_n,
    .arm       (rec_arm),
    .rec_len   (rec_len),
    .busy      (rec_busy),
    .done      (rec_done),
    .in_valid  (take),
    .in_bunch  (in_w.bunch),
    .in_sample (in_w.data),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data)
  );

  bunch_fir #(.N_SLOTS(N_SLOTS)) u_fir (
    .clk, .rst_n,
    .coef      (coef),
    .in_valid  (take),
    .in_bunch  (in_w.bunch),
    .in_sample (in_w.data),
    .out_valid (f_valid),
    .out_bunch (f_bunch),
    .out_kick  (f_kick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid_q <= 1'b0;
      pend_q       <= '0;
    end else begin
      if (pend_valid_q && tx_ready) pend_valid_q <= 1'b0;
      if (f_valid) begin
        pend_q       <= '{rsvd: '0, bunch: f_bunch, data: f_kick};
        pend_valid_q <= 1'b1;
      end
    end
  end

  c4x_tx u_tx (
    .clk, .rst_n,
    .word    (pend_q),
    .valid   (pend_valid_q),
    .ready   (tx_ready),
    .cd      (out_cd),
    .cstrb_n (out_cstrb_n),
    .crdy_n  (out_crdy_n)
  );

  // unused bits of the incoming word
  logic unused;
  assign unused = ^in_w.rsvd;

endmodule
