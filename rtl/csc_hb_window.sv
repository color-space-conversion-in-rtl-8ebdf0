// csc_hb_window: the state registers of one chroma filter, as a window of the
// last 2*HALF+1 distinct samples (w[0] newest, w[2*HALF] oldest).
//
// On adv the window shifts by one sample.  The entering sample is s when use_in
// is high, otherwise the newest sample is repeated (right-border padding by
// replication).  fill loads s into every position at once (left-border
// padding).  Between advances the window holds, which implements both pixel
// repetition and the constant output during blanking.  Reset clears it.
module csc_hb_window
  import csc_pkg::*;
#(
  parameter int HALF = 15
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  logic  fill,
  input  logic  use_in,
  input  chan_t s,
  output chan_t w [2*HALF+1]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= 2*HALF; i++) w[i] <= '0;
    end else if (adv) begin
      if (fill) begin
        for (int i = 0; i <= 2*HALF; i++) w[i] <= s;
      end else begin
        w[0] <= use_in ? s : w[0];
        for (int i = 1; i <= 2*HALF; i++) w[i] <= w[i-1];
      end
    end
  end
endmodule
