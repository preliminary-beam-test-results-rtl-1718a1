// Bunch-by-bunch longitudinal feedback for a 200-bunch, 500 MHz ring.
//
// Signal path: the phase error of every bunch, digitised by the fast ADC,
// enters adc_demux_unit, which splits the 500 MS/s stream into eight
// lanes, keeps one turn in DOWNSAMPLE and sends each lane over its own
// comm-port link to one of eight dsp_channel processors (25 bunches each).
// Each processor records the raw samples for observation and computes a
// kick per bunch with a 4-tap FIR; the kicks travel over eight more links to
// dac_mux_unit, which puts them back in bunch order and plays them to the
// DAC every turn until the next set arrives (20 turns).  The DAC output
// drives the kicker's amplitude modulator.
//
// Interface: one bunch-rate clock; `rev_marker` high in the clock of bunch
// 0 of every turn; ADC outputs `adc_a` (even bunches) and `adc_b` (odd
// bunches); `coef` programs all filters; `fb_enable` gates the kick; the
// record memories are armed together and read by a host through
// `rd_chan`/`rd_addr` with one clock of latency.  `dac_data` for bunch b
// appears in the clock after the clock of bunch b + kick_offset.  A sample taken in a sampled
// turn reaches the DAC at the first revolution marker after the whole set
// has come back, typically one turn later.
//
// The lane structure, the numbers (200 bunches, 8 processors, down-sampling
// 20, 4 taps, 256 kB per processor) and the data flow follow the described
// system.  The ADC, the DAC, the level translators and the vendor DSP and
// comm-port adapter boards are outside this RTL; the processors' software
// is replaced by dsp_channel logic.
module tls_ldamper
  import ldamper_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rev_marker,
  input  logic [SAMPLE_W-1:0] adc_a,
  input  logic [SAMPLE_W-1:0] adc_b,
  input  coef_t               coef [TAPS],
  input  logic                fb_enable,
  input  logic [7:0]          kick_offset,
  // observation
  input  logic                rec_arm,
  input  logic [13:0]         rec_len,
  output logic [LANES-1:0]    rec_busy,
  output logic [LANES-1:0]    rec_done,
  input  logic [2:0]          rd_chan,
  input  logic [$clog2(REC_BYTES)-1:0] rd_addr,
  output logic [SAMPLE_W-1:0] rd_data,
  // to the kicker
  output logic [SAMPLE_W-1:0] dac_data,
  output logic                new_set,
  // status
  output logic                sample_turn,
  output logic                overflow
);

  logic [7:0] a_cd [LANES], k_cd [LANES];
  logic       a_strb_n [LANES], a_rdy_n [LANES];
  logic       k_strb_n [LANES], k_rdy_n [LANES];
  logic [SAMPLE_W-1:0] ch_rd_data [LANES];
  logic [2:0] rd_chan_q;

  adc_demux_unit u_adc (
    .clk, .rst_n,
    .rev_marker (rev_marker),
    .adc_a      (adc_a),
    .adc_b      (adc_b),
    .cd         (a_cd),
    .cstrb_n    (a_strb_n),
    .crdy_n     (a_rdy_n),
    .sample_turn(sample_turn),
    .overflow   (overflow)
  );

  for (genvar j = 0; j < LANES; j++) begin : g_dsp
    dsp_channel u_dsp (
      .clk, .rst_n,
      .coef        (coef),
      .in_cd       (a_cd[j]),
      .in_cstrb_n  (a_strb_n[j]),
      .in_crdy_n   (a_rdy_n[j]),
      .out_cd      (k_cd[j]),
      .out_cstrb_n (k_strb_n[j]),
      .out_crdy_n  (k_rdy_n[j]),
      .rec_arm     (rec_arm),
      .rec_len     (rec_len),
      .rec_busy    (rec_busy[j]),
      .rec_done    (rec_done[j]),
      .rd_addr     (rd_addr),
      .rd_data     (ch_rd_data[j])
    );
  end

  dac_mux_unit u_dac (
    .clk, .rst_n,
    .rev_marker (rev_marker),
    .fb_enable  (fb_enable),
    .kick_offset(kick_offset),
    .cd         (k_cd),
    .cstrb_n    (k_strb_n),
    .crdy_n     (k_rdy_n),
    .dac_data   (dac_data),
    .new_set    (new_set)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_chan_q <= '0;
    else        rd_chan_q <= rd_chan;
  end

  assign rd_data = ch_rd_data[rd_chan_q];

endmodule
