// csc_chroma_upsampler: 4:2:2 to 4:4:4 conversion of the two chroma channels
// with a half-band interpolation filter.
//
// In 4:2:2 the Cr (ch2) and Cb (ch3) samples are valid on the even pixels of
// each field; the filter rebuilds the odd ones.  It is the two-phase
// (polyphase) form of an ORDER-th order half-band low-pass: on even pixels the
// output is the received sample itself (the single non-zero even tap, 0.5 x 2),
// on odd pixels it is the symmetric sum of the ORDER/2+1 neighbouring received
// samples weighted by twice the odd taps.  Odd-pixel inputs are replaced by
// the preceding even sample, so the window and the border replication only
// ever see real chroma samples.  The result is clamped to [0, 2^24-1].
//
// Both filters of the design share this structure: csc_resample_ctrl sequences
// the distinct pixels (pixel repetition, border padding by replication, left
// and right fields of 3D side-by-side), and each chroma channel has two windows
// of 2*(ORDER/2)+1 samples (csc_hb_window), one per 3D field; in 2D only the
// left one is used.  Channel 1 and the syncs go through a delay line whose
// length follows the repetition factor.
//
// Interface: vin/vout pixels; en low gives a one-cycle registered bypass;
// px_rep, sbs and half_hactive describe the video format.
// Timing: latency (ORDER/2)*(px_rep+1)+2 cycles; one pixel per clock; during
// blanking the chroma outputs hold their last value.  The blanking after each
// line must last at least (ORDER/2)*(px_rep+1)+2 cycles.
// The filter orders (30, or 18 for the smaller variant), the half-band
// polyphase principle, the replication at the borders, the per-field filter
// pair and the pixel-repetition enables follow the thesis.  The tap values
// (an equiripple design) are this design's; the arithmetic is written as one
// combinational sum before a single output register rather than the thesis's
// three pipeline stages.
module csc_chroma_upsampler
  import csc_pkg::*;
#(
  parameter int ORDER   = 30,
  parameter int MAX_REP = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [3:0]  px_rep,
  input  logic        sbs,
  input  logic [12:0] half_hactive,
  input  vid_t        vin,
  output vid_t        vout
);
  localparam int HALF   = ORDER / 2;
  localparam int NODD   = (HALF + 1) / 2;
  localparam int MAXLAT = HALF * (MAX_REP + 1) + 2;
  localparam int LW     = $clog2(MAXLAT + 1);
  localparam hb_t TAPS  = hb_taps(ORDER);

  logic adv, fill_l, use_l, fill_r, use_r, in_odd, out_sel_r, out_odd, out_vld;

  csc_resample_ctrl #(.HALF(HALF)) u_ctrl (
    .clk, .rst_n, .de(vin.de), .px_rep, .sbs, .half_hactive,
    .adv, .fill_l, .use_l, .fill_r, .use_r, .in_odd, .out_sel_r, .out_odd, .out_vld);

  chan_t s_cr, s_cb;
  // Odd-pixel chroma is not transmitted: repeat the last even sample.
  chan_t hold_cr, hold_cb;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_cr <= '0;
      hold_cb <= '0;
    end else if (adv && vin.de && !in_odd) begin
      hold_cr <= vin.c2;
      hold_cb <= vin.c3;
    end
  end
  assign s_cr = in_odd ? hold_cr : vin.c2;
  assign s_cb = in_odd ? hold_cb : vin.c3;

  chan_t wl_cr [2*HALF+1];
  chan_t wr_cr [2*HALF+1];
  chan_t wl_cb [2*HALF+1];
  chan_t wr_cb [2*HALF+1];

  csc_hb_window #(.HALF(HALF)) u_wl_cr (.clk, .rst_n, .adv, .fill(fill_l), .use_in(use_l), .s(s_cr), .w(wl_cr));
  csc_hb_window #(.HALF(HALF)) u_wr_cr (.clk, .rst_n, .adv, .fill(fill_r), .use_in(use_r), .s(s_cr), .w(wr_cr));
  csc_hb_window #(.HALF(HALF)) u_wl_cb (.clk, .rst_n, .adv, .fill(fill_l), .use_in(use_l), .s(s_cb), .w(wl_cb));
  csc_hb_window #(.HALF(HALF)) u_wr_cb (.clk, .rst_n, .adv, .fill(fill_r), .use_in(use_r), .s(s_cb), .w(wr_cb));

  // The pixel leaving the filter at this advance: its field and parity.
  logic adv_d, sel_r_d, odd_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adv_d   <= 1'b0;
      sel_r_d <= 1'b0;
      odd_d   <= 1'b0;
    end else begin
      adv_d <= adv && out_vld;
      if (adv) begin
        sel_r_d <= out_sel_r;
        odd_d   <= out_odd;
      end
    end
  end

  // Odd output phase: sum over the received samples at odd distances.
  function automatic chan_t interp(input chan_t w [2*HALF+1]);
    logic signed [63:0] acc;
    acc = 64'sd0;
    for (int k = 0; k < NODD; k++)
      acc += 64'(2 * TAPS[k]) * ($signed({40'd0, w[HALF-(2*k+1)]}) + $signed({40'd0, w[HALF+(2*k+1)]}));
    return clamp(rshift_round(acc), '0, '1);
  endfunction

  chan_t cr_q, cb_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_q <= '0;
      cb_q <= '0;
    end else if (adv_d) begin
      if (odd_d) begin
        cr_q <= sel_r_d ? interp(wr_cr) : interp(wl_cr);
        cb_q <= sel_r_d ? interp(wr_cb) : interp(wl_cb);
      end else begin
        cr_q <= sel_r_d ? wr_cr[HALF] : wl_cr[HALF];
        cb_q <= sel_r_d ? wr_cb[HALF] : wl_cb[HALF];
      end
    end
  end

  // Channel 1 and the syncs follow with the same latency.
  logic [LW-1:0] lat;
  vid_t          dly;
  assign lat = LW'(HALF * (int'(px_rep) + 1) + 2);
  csc_sync_delay #(.MAXLAT(MAXLAT)) u_dly (.clk, .rst_n, .lat, .d(vin), .q(dly));

  vid_t byp;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) byp <= '0;
    else        byp <= vin;
  end

  always_comb begin
    if (en) begin
      vout    = dly;
      vout.c2 = cr_q;
      vout.c3 = cb_q;
    end else begin
      vout = byp;
    end
  end
endmodule
