// csc_rgb2rgb: gamut conversion between linear RGB colour spaces.
//
// Each output channel is a weighted sum of the three input channels,
// out = M * in, where M = XYZ->RGB(dst) * RGB->XYZ(src).  The RGB->XYZ matrices
// come from the chromaticities of the primaries and the D65 white point, as
// the derivation C * diag(J), J = C^-1 * W / wy.  All 20 matrices between the
// five primary sets (BT.601-525, BT.601-625, BT.709/sRGB, BT.2020, opRGB) are
// elaborated as constants of 26 bits with 24 fractional bits and the pair in
// use is picked by a registered selection.  Products are summed at full width,
// rounded once (add one half, truncate), shifted right by 24 and saturated to
// [0, 2^24-1].  The pipeline registers of the conversion are placed together at
// the output (5 stages by default) for retiming.
//
// Interface: vin/vout video pixels; en selects conversion (else the data passes
// unchanged through the same pipeline); src/dst name the primaries.
// Timing: one pixel per clock, latency STAGES cycles in both modes.  The
// primaries, the five-stage pipeline, the coefficient width and the rounding
// follow the thesis; the primaries' numeric values come from the standards.
module csc_rgb2rgb
  import csc_pkg::*;
#(
  parameter int STAGES = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  prim_e src,
  input  prim_e dst,
  input  vid_t  vin,
  output vid_t  vout
);
  // Constant coefficient table, one matrix per (src, dst) pair.
  cmat_t tbl [NPRIM][NPRIM];
  for (genvar s = 0; s < NPRIM; s++) begin : g_src
    for (genvar t = 0; t < NPRIM; t++) begin : g_dst
      localparam cmat_t M = rgb2rgb_coef(prim_e'(s), prim_e'(t));
      assign tbl[s][t] = M;
    end
  end

  cmat_t coef;
  logic  conv;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef <= '0;
      conv <= 1'b0;
    end else begin
      coef <= tbl[src][dst];
      conv <= en && (src != dst);
    end
  end

  vid_t res;
  always_comb begin
    logic signed [63:0] acc [3];
    chan_t x [3];
    x[0] = vin.c1; x[1] = vin.c2; x[2] = vin.c3;
    res = vin;
    for (int i = 0; i < 3; i++) begin
      acc[i] = 64'sd0;
      for (int j = 0; j < 3; j++)
        acc[i] += 64'(coef[3*i+j]) * $signed({40'd0, x[j]});
      acc[i] = rshift_round(acc[i]);
    end
    if (conv) begin
      res.c1 = clamp(acc[0], '0, '1);
      res.c2 = clamp(acc[1], '0, '1);
      res.c3 = clamp(acc[2], '0, '1);
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
