// csc_resample_ctrl: pixel sequencing shared by the chroma resampling filters.
//
// The filters work on distinct pixels, not on clock cycles.  This block counts
// the copies of each pixel (pixel repetition: every pixel is sent px_rep+1
// times) with a counter restarted by the rising edge of data enable, and raises
// adv on the first copy only; adv is the enable of every filter state register.
// It also numbers the pixels of the line (q) so that the filters can pad the
// image borders by replication:
//  * at the first pixel of the line the left filter fills its whole window with
//    that pixel (fill_l);
//  * after the last pixel, adv keeps running for HALF more pixel periods
//    (the tail) while the filters repeat their newest sample, which flushes the
//    right half of the response out of the filter;
//  * in 3D side-by-side mode (sbs) the line holds two fields of half_hactive
//    pixels.  The left filter stops taking new pixels at the boundary and
//    repeats its last one, while the right filter fills at the first pixel of
//    the right field (fill_r).  out_sel_r tells which filter owns the pixel
//    that leaves the filter at this advance (pixel q - HALF).
// in_odd and out_odd are the parities of the entering and leaving pixel,
// counted from the start of their own field; out_vld is low while the
// leaving position is still before the first pixel of the line, so that the
// filter outputs do not change during the blanking that precedes it.
// The blanking after a line must last at least HALF*(px_rep+1)+2 cycles.
// The counters and the border/3D handling follow the thesis; the exact
// signalling is this design's.
module csc_resample_ctrl #(
  parameter int HALF = 15,     // half the filter order
  parameter int QW   = 14      // pixel counter width
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        de,
  input  logic [3:0]  px_rep,
  input  logic        sbs,
  input  logic [12:0] half_hactive,
  output logic        adv,
  output logic        fill_l,
  output logic        use_l,
  output logic        fill_r,
  output logic        use_r,
  output logic        in_odd,
  output logic        out_sel_r,
  output logic        out_odd,
  output logic        out_vld
);
  logic          de_d;
  logic [3:0]    rep_cnt;
  logic [QW-1:0] q;
  logic [5:0]    tail;

  logic          start, active;
  logic [3:0]    rc;
  logic [QW-1:0] qc;
  logic [5:0]    tl;
  logic [QW-1:0] h;
  logic signed [QW:0] p;

  always_comb begin
    start  = de && !de_d;
    rc     = start ? 4'd0 : rep_cnt;
    qc     = start ? '0 : q;
    tl     = de ? 6'd0 : ((de_d && !de) ? 6'(HALF) : tail);
    active = de || (tl != 6'd0);
    adv    = active && (rc == 4'd0);
    h      = sbs ? QW'(half_hactive) : '1;
    fill_l = adv && de && (qc == '0);
    use_l  = de && (qc < h);
    fill_r = adv && de && sbs && (qc == h);
    use_r  = de;
    in_odd = (sbs && qc >= h) ? qc[0] ^ h[0] : qc[0];
    p      = $signed({1'b0, qc}) - (QW+1)'(HALF);
    out_sel_r = sbs && (p >= $signed({1'b0, h}));
    out_odd   = out_sel_r ? p[0] ^ h[0] : p[0];
    out_vld   = !p[QW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_d    <= 1'b0;
      rep_cnt <= '0;
      q       <= '0;
      tail    <= '0;
    end else begin
      de_d <= de;
      if (active) rep_cnt <= (rc >= px_rep) ? 4'd0 : rc + 4'd1;
      else        rep_cnt <= 4'd0;
      q    <= adv ? qc + 1'b1 : qc;
      tail <= (!de && adv && tl != 6'd0) ? tl - 6'd1 : tl;
    end
  end
endmodule
