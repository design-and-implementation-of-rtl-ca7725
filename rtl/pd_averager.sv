// pd_averager: M-of-N filter that removes momentary spikes from the packet detection metric.
//
// The raw comparator decision enters one bit per clock. A shift register holds the last N
// decisions and a counter tracks how many of them are set (add the new bit, drop the bit leaving
// the window). The output is set when at least M of the last N decisions were set. The document
// gives M = 8 and N = 32 and the M-of-N rule; the counter-plus-shift-register structure is this
// design's choice.
//
// Interface: in_bit is the decision of the current clock; pd is registered (one clock of latency)
// and reflects the window that includes in_bit. Reset empties the window.
module pd_averager #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,
  output logic pd
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0] hist;
  logic [CW-1:0] cnt, cnt_next;

  always_comb cnt_next = cnt + CW'(in_bit) - CW'(hist[N-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
      cnt  <= '0;
      pd   <= 1'b0;
    end else begin
      hist <= {hist[N-2:0], in_bit};
      cnt  <= cnt_next;
      pd   <= (cnt_next >= CW'(M));
    end
  end

  initial assert (M >= 1 && M <= N) else $error("pd_averager: need 1 <= M <= N");
endmodule
