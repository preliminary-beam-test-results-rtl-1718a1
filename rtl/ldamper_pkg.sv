// Shared constants and types of the bunch-by-bunch longitudinal damper.
//
// The ring holds 200 bunches spaced by one period of the 500 MHz bunch
// clock, so one turn is 200 clocks (2.5 MHz revolution frequency).  The
// 500 MS/s phase-error stream is split over 8 lanes (two ADC outputs, each
// demultiplexed 1:4), so lane j carries bunches j, j+8, ..., j+192: 25
// bunches per lane, which is the share of one DSP processor.  Only one turn
// in 20 is passed on (down-sampling ratio 20, one sample per bunch every
// 8 us), and the kick computed from it is replayed for 20 turns.
//
// Numbers taken from the described system: 200 bunches, 8 lanes, 25 bunches
// per processor, down-sampling 20, 4 filter taps, 256 kB record memory per
// processor with 10 kB per bunch.  The 8-bit sample width follows from
// "10 kB per bunch" holding 10,000 samples of 8 us (80 ms).  The 32-bit
// link word layout, the offset-binary codes and the coefficient format
// are this design's own choices.
package ldamper_pkg;

  localparam int unsigned NBUNCH     = 200;   // bunches per turn
  localparam int unsigned LANES      = 8;     // demultiplexed lanes = DSP processors
  localparam int unsigned SLOTS      = NBUNCH / LANES;  // bunches per lane (25)
  localparam int unsigned DOWNSAMPLE = 20;    // turns per processed sample
  localparam int unsigned TAPS       = 4;     // FIR taps per bunch
  localparam int unsigned SAMPLE_W   = 8;     // ADC / DAC code width
  localparam int unsigned COEF_W     = 16;    // signed filter coefficient
  localparam int unsigned COEF_FRAC  = 14;    // fractional bits (Q2.14)
  localparam int unsigned REC_STRIDE = 10000; // record bytes reserved per bunch
  localparam int unsigned REC_BYTES  = 262144;// record memory per processor (256 kB)

  // Mid-scale code: zero phase error at the ADC, zero kick at the DAC.
  localparam logic [SAMPLE_W-1:0] ZERO_CODE = 8'h80;

  // One 32-bit word on a comm-port link: a sample or a kick, tagged with
  // the number of the bunch it belongs to.
  typedef struct packed {
    logic [15:0] rsvd;    // zero
    logic [7:0]  bunch;   // 0 .. NBUNCH-1
    logic [7:0]  data;    // ADC sample or DAC kick code, offset binary
  } link_word_t;

  typedef logic signed [COEF_W-1:0] coef_t;

endpackage
