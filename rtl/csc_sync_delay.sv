// csc_sync_delay: variable delay line for the signals that bypass a chroma
// filter (data enable, syncs and the luma/first channel).
//
// A shift register of MAXLAT stages; the output is taken from stage lat
// (1..MAXLAT), which lets the filter align these signals with its chroma
// output whatever the pixel repetition factor.  Reset clears every stage.
// Only de, hs, vs and channel 1 are stored: the chroma channels of d are not
// used and q.c2/q.c3 are constant zero, because the filter replaces them with
// its own output.  Interface: d/q pixels, lat the delay in cycles.
// Timing: q is d delayed by lat clock cycles.  The delay-line approach follows
// the thesis (sync chains tapped according to the repetition mode); storing
// luma in the same plain chain, not in enable-gated registers, is this
// design's choice.
module csc_sync_delay
  import csc_pkg::*;
#(
  parameter int MAXLAT = 152
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [$clog2(MAXLAT+1)-1:0] lat,
  input  vid_t d,
  output vid_t q
);
  typedef struct packed {
    logic  de;
    logic  hs;
    logic  vs;
    chan_t c1;
  } lane_t;

  lane_t sr [MAXLAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAXLAT; i++) sr[i] <= '0;
    end else begin
      sr[0] <= '{de: d.de, hs: d.hs, vs: d.vs, c1: d.c1};
      for (int i = 1; i < MAXLAT; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    lane_t t;
    t = sr[(lat == 0) ? 0 : int'(lat) - 1];
    q = '0;
    q.de = t.de;
    q.hs = t.hs;
    q.vs = t.vs;
    q.c1 = t.c1;
  end
endmodule
