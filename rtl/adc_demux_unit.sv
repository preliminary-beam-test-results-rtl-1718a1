// ADC/DEMUX unit: 500 MS/s phase-error samples to eight comm-port links.
//
// The fast ADC delivers one 8-bit sample per bunch on two outputs that are
// 180 degrees apart: bunch b is on `adc_a` when b is even and on `adc_b`
// when b is odd, each output changing every second bunch clock.  Each
// output feeds a 1:4 demultiplexer, giving eight lanes; lane j carries
// bunches 8m+j (m = 0..24).  A controller counts bunches from the
// revolution marker `rev_marker` (high in the clock of bunch 0) and turns
// modulo DOWNSAMPLE; only in turn 0 of every DOWNSAMPLE turns are the eight
// lane words written, one group of eight bunches per eight clocks, into the
// eight lane FIFOs.  Each lane then drains its FIFO into its own c4x_tx
// link, tagging every sample with its bunch number (link_word_t).
//
// Timing: the group of bunches 8m..8m+7 enters the FIFOs two clocks after
// the clock of bunch 8m+7.  The FIFOs start writing only after the first
// revolution marker.  `overflow` reports a lane FIFO that lost a sample.
// Demultiplexing both ADC outputs 1:4, the FIFO memories, the down-sampling
// by 20 and the controller that moves FIFO data to the links follow the
// described unit; the single bunch-rate clock with enables (in place of
// separate ECL and TTL clock domains), the bunch tag and the FIFO depth
// are this design's own.
module adc_demux_unit
  import ldamper_pkg::*;
#(
  parameter int unsigned N_BUNCH    = NBUNCH,
  parameter int unsigned N_DOWN     = DOWNSAMPLE,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rev_marker,
  input  logic [SAMPLE_W-1:0] adc_a,
  input  logic [SAMPLE_W-1:0] adc_b,
  // comm-port links to the processors, one per lane
  output logic [7:0]          cd      [LANES],
  output logic                cstrb_n [LANES],
  input  logic                crdy_n  [LANES],
  // status
  output logic                sample_turn,   // current turn is a sampled one
  output logic                overflow
);

  localparam int unsigned BW     = $clog2(N_BUNCH);
  localparam int unsigned TW     = (N_DOWN > 1) ? $clog2(N_DOWN) : 1;
  localparam int unsigned N_SLOT = N_BUNCH / LANES;
  localparam int unsigned MW     = (N_SLOT > 1) ? $clog2(N_SLOT) : 1;

  // ---------------------------------------------------------------- timing
  logic [BW-1:0] bcnt_q, bidx;
  logic [TW-1:0] turn_q, turn;
  logic          locked_q;

  always_comb begin
    bidx = rev_marker ? '0 : bcnt_q;
    turn = turn_q;
    if (rev_marker) turn = (turn_q == TW'(N_DOWN - 1)) ? '0 : turn_q + 1'b1;
  end

  assign sample_turn = locked_q && (turn == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt_q   <= '0;
      turn_q   <= TW'(N_DOWN - 1);
      locked_q <= 1'b0;
    end else begin
      bcnt_q <= (bidx == BW'(N_BUNCH - 1)) ? '0 : bidx + 1'b1;
      turn_q <= turn;
      if (rev_marker) locked_q <= 1'b1;
    end
  end

  // ----------------------------------------------------------- demultiplex
  logic [SAMPLE_W-1:0] qa [4], qb [4];
  logic                vb;
  logic                grp_end_q;

  demux_1to4 #(.W(SAMPLE_W)) u_demux_a (
    .clk, .rst_n,
    .strobe (!bidx[0]),
    .sync   (bidx[2:0] == 3'd0),
    .din    (adc_a),
    .dout   (qa),
    .dout_valid ()
  );

  demux_1to4 #(.W(SAMPLE_W)) u_demux_b (
    .clk, .rst_n,
    .strobe (bidx[0]),
    .sync   (bidx[2:0] == 3'd1),
    .din    (adc_b),
    .dout   (qb),
    .dout_valid (vb)
  );

  // A group is complete when the B demultiplexer has its fourth word; keep
  // it only in a sampled turn.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grp_end_q <= 1'b0;
    else        grp_end_q <= sample_turn && (bidx[2:0] == 3'd7);
  end

  // ------------------------------------------------------ FIFOs and links
  logic [LANES-1:0] ovf;

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    logic [SAMPLE_W-1:0] rd_data;
    logic                empty, rd_en, tx_ready;
    logic [MW-1:0]       m_q;        // group number of the next word read
    link_word_t          w;

    sample_fifo #(.W(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en    (grp_end_q && vb),
      .wr_data  ((j % 2 == 0) ? qa[j/2] : qb[j/2]),
      .rd_en    (rd_en),
      .rd_data  (rd_data),
      .empty    (empty),
      .full     (),
      .overflow (ovf[j])
    );

    assign rd_en = tx_ready && !empty;

    always_comb begin
      w.rsvd  = '0;
      w.bunch = 8'(32'(m_q) * LANES + j);
      w.data  = rd_data;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     m_q <= '0;
      else if (rd_en) m_q <= (m_q == MW'(N_SLOT - 1)) ? '0 : m_q + 1'b1;
    end

    c4x_tx u_tx (
      .clk, .rst_n,
      .word    (w),
      .valid   (!empty),
      .ready   (tx_ready),
      .cd      (cd[j]),
      .cstrb_n (cstrb_n[j]),
      .crdy_n  (crdy_n[j])
    );
  end

  assign overflow = |ovf;

endmodule
