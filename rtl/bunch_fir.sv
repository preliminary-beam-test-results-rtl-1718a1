// Bunch-by-bunch 4-tap FIR filter: turns phase-error samples into kicks.
//
// Each bunch has its own filter.  A sample arrives tagged with its bunch
// number; the filter keeps the last TAPS-1 samples of every bunch of its
// lane (history slot = bunch / LANES) and computes
//     y = sum_{k=0}^{TAPS-1} coef[k] * x[n-k],
// with x the sample minus mid-scale (offset binary to signed) and coef in
// signed Q2.14.  y is shifted right by COEF_FRAC (rounding toward minus
// infinity), saturated to 8 bits and returned to offset binary as the DAC
// kick code.  The result appears one cycle after `in_valid`, with
// `out_valid` and the bunch number.  Bunch histories start at zero after
// reset.
//
// The per-bunch 4-tap FIR and the sign inversion that made the loop damp
// (coef = {-1, 0, 0, 0}) are the described processing, done there in DSP
// software; coefficient format, rounding and saturation are this design's
// own choices.
module bunch_fir
  import ldamper_pkg::*;
#(
  parameter int unsigned N_SLOTS = SLOTS,
  parameter int unsigned N_LANES = LANES
) (
  input  logic                clk,
  input  logic                rst_n,
  input  coef_t               coef [TAPS],
  input  logic                in_valid,
  input  logic [7:0]          in_bunch,
  input  logic [SAMPLE_W-1:0] in_sample,
  output logic                out_valid,
  output logic [7:0]          out_bunch,
  output logic [SAMPLE_W-1:0] out_kick
);

  localparam int unsigned ACC_W = SAMPLE_W + 1 + COEF_W + 2;
  localparam int unsigned SW    = (N_SLOTS > 1) ? $clog2(N_SLOTS) : 1;

  typedef logic signed [SAMPLE_W:0] xs_t;   // signed sample, one bit wider

  xs_t hist_q [N_SLOTS][TAPS-1];            // [slot][0] is the newest past sample
  xs_t x [TAPS];
  logic [SW-1:0]            slot;
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  y;
  logic [SAMPLE_W-1:0]      kick;

  localparam logic signed [ACC_W-1:0] YMAX = (2**(SAMPLE_W-1)) - 1;
  localparam logic signed [ACC_W-1:0] YMIN = -(2**(SAMPLE_W-1));

  assign slot = SW'(in_bunch / N_LANES);

  always_comb begin
    x[0] = xs_t'({1'b0, in_sample}) - xs_t'({1'b0, ZERO_CODE});
    for (int k = 1; k < TAPS; k++) x[k] = hist_q[slot][k-1];
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + ACC_W'(x[k]) * ACC_W'(coef[k]);
    y = acc >>> COEF_FRAC;
    if (y > YMAX)      kick = SAMPLE_W'(YMAX) ^ ZERO_CODE;
    else if (y < YMIN) kick = SAMPLE_W'(YMIN) ^ ZERO_CODE;
    else               kick = SAMPLE_W'(y) ^ ZERO_CODE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bunch <= '0;
      out_kick  <= ZERO_CODE;
      for (int s = 0; s < N_SLOTS; s++)
        for (int k = 0; k < TAPS-1; k++) hist_q[s][k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bunch <= in_bunch;
        out_kick  <= kick;
        hist_q[slot][0] <= x[0];
        for (int k = 1; k < TAPS-1; k++) hist_q[slot][k] <= hist_q[slot][k-1];
      end
    end
  end

endmodule
