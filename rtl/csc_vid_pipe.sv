// csc_vid_pipe: a chain of STAGES pipeline registers for one video pixel.
//
// Every pixel-to-pixel stage of the converter computes its result in one block
// of combinational logic and then passes it through this chain, so that the
// registers sit together at the output and synthesis retiming can spread them
// across the arithmetic.  Data enable and syncs travel in the same registers as
// the colour channels and therefore stay aligned with them.
// Latency: STAGES clock cycles (STAGES >= 1).  Reset clears all stages.
module csc_vid_pipe
  import csc_pkg::*;
#(
  parameter int STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  vid_t d,
  output vid_t q
);
  vid_t stage [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];
endmodule
