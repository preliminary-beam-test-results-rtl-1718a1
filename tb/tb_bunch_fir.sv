// Self-checking test of bunch_fir: random samples for random bunches of one
// lane, with random coefficients (and the plain sign inversion {-1,0,0,0}),
// against a reference that keeps its own per-bunch history and saturates
// the same way.  Also checks the one-cycle latency.
module tb_bunch_fir;
  import ldamper_pkg::*;
  logic clk = 0, rst_n = 0;
  coef_t coef [TAPS];
  logic in_valid = 0;
  logic [7:0] in_bunch = 0, in_sample = 0;
  logic out_valid;
  logic [7:0] out_bunch, out_kick;
  int checks = 0, failures = 0, sats = 0;
  localparam int LANE = 5;

  bunch_fir dut (.*);

  always #5 clk = ~clk;

  int hist [SLOTS][TAPS];   // reference: [slot][k] = x[n-k] after update

  function automatic logic [7:0] ref_kick(int slot, int x0);
    longint acc;
    longint y;
    acc = longint'(x0) * coef[0];
    for (int k = 1; k < TAPS; k++) acc += longint'(hist[slot][k-1]) * coef[k];
    y = acc >>> COEF_FRAC;
    if (y > 127) begin y = 127; sats++; end
    if (y < -128) begin y = -128; sats++; end
    return 8'(y + 128);
  endfunction

  initial begin
    for (int s = 0; s < SLOTS; s++) for (int k = 0; k < TAPS; k++) hist[s][k] = 0;
    coef = '{-16384, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      int slot, x0;
      logic [7:0] exp_k;
      if (n == 1000) coef = '{16'sd9000, -16'sd7000, 16'sd5000, -16'sd3000};
      if (n == 2000) coef = '{16'sd30000, 16'sd30000, 16'sd30000, 16'sd30000};
      @(negedge clk);
      slot      = $urandom_range(SLOTS - 1);
      in_bunch  = 8'(slot * LANES + LANE);
      in_sample = 8'($urandom);
      in_valid  = 1;
      x0        = int'(in_sample) - 128;
      exp_k     = ref_kick(slot, x0);
      for (int k = TAPS - 1; k > 0; k--) hist[slot][k] = hist[slot][k-1];
      hist[slot][0] = x0;
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_bunch !== in_bunch || out_kick !== exp_k) begin
        failures++;
        $display("n=%0d bunch %0d kick %0d exp %0d valid %0b", n, out_bunch, out_kick, exp_k, out_valid);
      end
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("valid stuck"); end
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
