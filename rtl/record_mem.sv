// Dual-port record memory of one processor: raw phase-error history.
//
// Holds up to REC_STRIDE samples for each of the N_SLOTS bunches of a lane
// in a REC_BYTES byte array, so that bunch oscillations can be read out by
// a host while the feedback keeps running.  Sample i of slot s is stored at
// byte address s*REC_STRIDE + i.  A pulse on `arm` starts a record: writing
// begins with the next sample of slot 0 (so every bunch starts at the same
// turn) and a sample index advances after each sample of the last slot.
// After `rec_len` samples per bunch (rec_len is clamped to 1..REC_STRIDE)
// writing stops and `done` is set until the next `arm`.  `busy` is high
// while a record is being taken.  The host port reads one byte per cycle;
// `rd_data` appears one cycle after `rd_addr`.
//
// 256 kB per processor and 10 kB per bunch are the described sizes; the arm
// and done control and the address layout are this design's choices.
module record_mem
  import ldamper_pkg::*;
#(
  parameter int unsigned N_SLOTS = SLOTS,
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned STRIDE  = REC_STRIDE,
  parameter int unsigned BYTES   = REC_BYTES
) (
  input  logic                clk,
  input  logic                rst_n,
  // record control
  input  logic                arm,
  input  logic [13:0]         rec_len,
  output logic                busy,
  output logic                done,
  // sample stream (same as the filter input)
  input  logic                in_valid,
  input  logic [7:0]          in_bunch,
  input  logic [SAMPLE_W-1:0] in_sample,
  // host read port
  input  logic [$clog2(BYTES)-1:0] rd_addr,
  output logic [SAMPLE_W-1:0]      rd_data
);

  localparam int unsigned AW = $clog2(BYTES);
  localparam int unsigned IW = $clog2(STRIDE + 1);

  logic [SAMPLE_W-1:0] mem [BYTES];

  typedef enum logic [1:0] {IDLE, ARMED, RUN} state_t;
  state_t        state_q;
  logic [IW-1:0] idx_q;      // sample index within each bunch's record
  logic [IW-1:0] len_q;      // clamped record length
  logic [IW-1:0] len_in;
  logic [AW-1:0] slot, wr_addr;
  logic          wr_en, start, last_slot;

  always_comb begin
    if (rec_len == 0)                  len_in = IW'(1);
    else if (32'(rec_len) > STRIDE)    len_in = IW'(STRIDE);
    else                               len_in = IW'(rec_len);
  end

  assign slot      = AW'(in_bunch / N_LANES);
  assign last_slot = (slot == AW'(N_SLOTS - 1));
  assign start     = (state_q == ARMED) && in_valid && (slot == '0);
  assign wr_en     = in_valid && ((state_q == RUN) || start);
  assign wr_addr   = AW'(slot * AW'(STRIDE)) + AW'(idx_q);
  assign busy      = (state_q != IDLE);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= in_sample;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      idx_q   <= '0;
      len_q   <= IW'(1);
      done    <= 1'b0;
    end else if (arm) begin
      state_q <= ARMED;
      idx_q   <= '0;
      len_q   <= len_in;
      done    <= 1'b0;
    end else begin
      if (start) state_q <= RUN;
      if (wr_en && last_slot) begin
        if (idx_q + 1'b1 == len_q) begin
          state_q <= IDLE;
          done    <= 1'b1;
        end
        idx_q <= idx_q + 1'b1;
      end
    end
  end

endmodule
