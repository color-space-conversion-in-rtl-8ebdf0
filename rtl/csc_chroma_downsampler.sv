// csc_chroma_downsampler: 4:4:4 to 4:2:2 conversion of the two chroma
// channels with a half-band decimation filter.
//
// Every pixel enters the filter window; on the even pixels of each field the
// ORDER-th order half-band low-pass is evaluated (centre tap 0.5 plus the
// symmetric odd taps, each pair sharing one multiplier) and the result is
// kept for the following odd pixel too, so Cr (ch2) and Cb (ch3) carry one
// co-sited sample per pixel pair.  The result is clamped to [cmin, cmax], the
// chroma limits of the output range.
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
// The sequencer's in_odd output is not needed here: unlike the upsampler,
// every input pixel carries a real chroma sample.
module csc_chroma_downsampler
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
  input  chan_t       cmin,
  input  chan_t       cmax,
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
  assign s_cr = vin.c2;
  assign s_cb = vin.c3;

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

  // Full low-pass at the even (co-sited) positions.
  function automatic chan_t decim(input chan_t w [2*HALF+1], input chan_t lo, input chan_t hi);
    logic signed [63:0] acc;
    acc = 64'(CHROMA_MID) * $signed({40'd0, w[HALF]});
    for (int k = 0; k < NODD; k++)
      acc += 64'(TAPS[k]) * ($signed({40'd0, w[HALF-(2*k+1)]}) + $signed({40'd0, w[HALF+(2*k+1)]}));
    return clamp(rshift_round(acc), lo, hi);
  endfunction

  chan_t cr_q, cb_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_q <= '0;
      cb_q <= '0;
    end else if (adv_d && !odd_d) begin
      cr_q <= sel_r_d ? decim(wr_cr, cmin, cmax) : decim(wl_cr, cmin, cmax);
      cb_q <= sel_r_d ? decim(wr_cb, cmin, cmax) : decim(wl_cb, cmin, cmax);
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
