// DAC/MUX unit: eight kick streams back into one 500 MS/s DAC stream.
//
// Receives tagged kick words from the eight processors on eight comm-port
// links (c4x_rx) and puts each kick in bunch order into the back half of a
// double buffer of N_BUNCH codes.  Once all N_BUNCH kicks of a set have
// arrived, the halves are swapped at the next revolution marker, and from
// then on the front half is played out, one code per bunch clock, every
// turn, until the next set is complete.  With sets arriving every
// DOWNSAMPLE turns, each set is repeated for 20 turns.  `new_set` pulses in
// the clock after a marker at which the halves were swapped.
//
// Timing: `dac_data` for bunch b appears on the clock after the clock of
// bunch b + kick_offset (rev_marker marks bunch 0), so the kick can be
// lined up with the bunch at the kicker in steps of one bunch; an offset of
// N_BUNCH or more counts as 0.  With `fb_enable` low the DAC is held
// at the mid-scale (zero kick) code.  Before the first set the DAC shows
// mid-scale.  Reordering into bunch sequence and the 20-turn repetition
// follow the described unit, as does the need to adjust the kick timing;
// the tag-addressed double buffer, the swap rule, the offset in whole
// bunches and the feedback-enable gate are this design's own.
module dac_mux_unit
  import ldamper_pkg::*;
#(
  parameter int unsigned N_BUNCH = NBUNCH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rev_marker,
  input  logic                fb_enable,
  input  logic [7:0]          kick_offset,   // bunch clocks of kick delay, 0..N_BUNCH-1
  // comm-port links from the processors
  input  logic [7:0]          cd      [LANES],
  input  logic                cstrb_n [LANES],
  output logic                crdy_n  [LANES],
  // to the fast DAC
  output logic [SAMPLE_W-1:0] dac_data,
  output logic                new_set
);

  localparam int unsigned BW = $clog2(N_BUNCH);
  localparam int unsigned CW = $clog2(N_BUNCH + 1);
  localparam int unsigned LW = $clog2(LANES);

  logic [SAMPLE_W-1:0] buf_q [2][N_BUNCH];
  logic                front_q, back, swap, started_q;
  logic [CW-1:0]       cnt_q;
  logic [BW-1:0]       bcnt_q, bidx, ridx, off;

  // -------------------------------------------------- the eight link ends
  logic [31:0]      rx_word  [LANES];
  logic [LANES-1:0] rx_valid;
  logic [LANES-1:0] grant;
  logic [LW-1:0]    sel;
  logic             wr;
  link_word_t       w;

  for (genvar j = 0; j < LANES; j++) begin : g_rx
    c4x_rx u_rx (
      .clk, .rst_n,
      .cd      (cd[j]),
      .cstrb_n (cstrb_n[j]),
      .crdy_n  (crdy_n[j]),
      .word    (rx_word[j]),
      .valid   (rx_valid[j]),
      .ready   (grant[j])
    );
  end

  // one word per clock into the buffer: the lowest-numbered waiting lane
  always_comb begin
    grant = '0;
    sel   = '0;
    for (int j = LANES - 1; j >= 0; j--) begin
      if (rx_valid[j]) sel = LW'(j);
    end
    wr = |rx_valid;
    if (wr) grant[sel] = 1'b1;
    w = link_word_t'(rx_word[sel]);
  end

  // ------------------------------------------------------ double buffer
  assign bidx = rev_marker ? '0 : bcnt_q;
  assign swap = rev_marker && (cnt_q == CW'(N_BUNCH));
  assign back = swap ? front_q : !front_q;   // half being filled

  // kick played in the clock of bunch bidx: that of bunch bidx - kick_offset
  assign off  = (32'(kick_offset) < N_BUNCH) ? BW'(kick_offset) : '0;
  assign ridx = (bidx >= off) ? bidx - off : BW'(32'(bidx) + N_BUNCH - 32'(off));

  always_ff @(posedge clk) begin
    if (wr && 32'(w.bunch) < N_BUNCH) buf_q[back][BW'(w.bunch)] <= w.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt_q    <= '0;
      front_q   <= 1'b0;
      cnt_q     <= '0;
      started_q <= 1'b0;
      new_set   <= 1'b0;
      dac_data  <= ZERO_CODE;
    end else begin
      bcnt_q  <= (bidx == BW'(N_BUNCH - 1)) ? '0 : bidx + 1'b1;
      new_set <= 1'b0;
      if (swap) begin
        front_q   <= !front_q;
        started_q <= 1'b1;
        new_set   <= 1'b1;
        cnt_q     <= wr ? CW'(1) : '0;
      end else if (wr && cnt_q != CW'(N_BUNCH)) begin
        cnt_q <= cnt_q + 1'b1;
      end
      dac_data <= (fb_enable && (started_q || swap))
                  ? buf_q[swap ? !front_q : front_q][ridx] : ZERO_CODE;
    end
  end

  // halves are swapped only at a revolution marker
  a_swap_at_marker: assert property (@(posedge clk) disable iff (!rst_n)
    new_set |-> $past(rev_marker));

endmodule
