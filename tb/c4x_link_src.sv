// Testbench model of a comm-port sender (not synthesizable).
//
// Words queued with push() are sent as four bytes, least significant
// first: the byte is put on `cd`, after a random wait of 0..MAXWAIT clocks
// the strobe is pulled low, the model waits for `crdy_n` low, releases the
// strobe and waits for `crdy_n` high.  It is written independently of the
// design's c4x_tx so that it can check c4x_rx.
module c4x_link_src #(
  parameter int MAXWAIT = 3
) (
  input  logic       clk,
  output logic [7:0] cd,
  output logic       cstrb_n,
  input  logic       crdy_n
);
  logic [31:0] q[$];
  int          sent = 0;

  function automatic void push(logic [31:0] w);
    q.push_back(w);
  endfunction

  initial begin
    cd = '0;
    cstrb_n = 1'b1;
    forever begin
      @(posedge clk);
      if (q.size() != 0) begin
        logic [31:0] w;
        w = q.pop_front();
        for (int b = 0; b < 4; b++) begin
          cd <= w[8*b +: 8];
          repeat (1 + $urandom_range(MAXWAIT)) @(posedge clk);
          cstrb_n <= 1'b0;
          do @(posedge clk); while (crdy_n !== 1'b0);
          cstrb_n <= 1'b1;
          do @(posedge clk); while (crdy_n !== 1'b1);
        end
        sent++;
      end
    end
  end
endmodule
