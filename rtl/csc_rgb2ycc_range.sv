// csc_rgb2ycc_range: R'G'B' to Y'CrCb' conversion (non-constant luminance)
// with the output range conversion.
//
// The 3x3 matrix of the selected standard (BT.601, BT.709 or BT.2020, from its
// luma weights Kr and Kb) turns full-range R'G'B' into Y' in [0, 1] and signed
// Cr'/Cb' in [-0.5, 0.5]; the result is rounded.  It is then scaled to the
// output range: full range keeps Y' and adds the mid level 2^23 to the chroma;
// limited and extended ranges multiply by 219/256 (Y') or 224/256 (chroma) and
// add the offsets 16 and 128 (8-bit levels, times 2^16).  The scaling is
// rounded and every channel is clipped and clamped to the limits of the range:
// Y' 16..235 and Cr'/Cb' 16..240 for limited, 1..254 for extended.
//
// mode: Y_BYPASS passes the pixel unchanged, Y_RANGE only rescales RGB (every
// channel treated as Y'), Y_601/Y_709/Y_2020 select the matrix.  rng is the
// output range.  Timing: one pixel per clock, latency STAGES (9) cycles in every
// mode.  The order matrix-then-scaling, the two roundings, the clamping and the
// nine stages follow the thesis; coefficients come from the standards.
module csc_rgb2ycc_range
  import csc_pkg::*;
#(
  parameter int STAGES = 9
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ycc_mode_e mode,
  input  range_e    rng,
  input  vid_t      vin,
  output vid_t      vout
);
  cmat_t tbl [5];
  for (genvar m = 0; m < 5; m++) begin : g_mat
    localparam cmat_t M = rgb2ycc_coef(ycc_mode_e'(m));
    assign tbl[m] = M;
  end

  cmat_t     coef;
  ycc_mode_e md;
  range_e    rg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef <= '0;
      md   <= Y_BYPASS;
      rg   <= RNG_FULL;
    end else begin
      coef <= tbl[mode];
      md   <= mode;
      rg   <= rng;
    end
  end

  vid_t res;
  always_comb begin
    logic signed [63:0] x [3];
    logic signed [63:0] m [3];
    res = vin;
    x[0] = $signed({40'd0, vin.c1});
    x[1] = $signed({40'd0, vin.c2});
    x[2] = $signed({40'd0, vin.c3});
    for (int i = 0; i < 3; i++)
      m[i] = rshift_round(64'(coef[3*i]) * x[0] + 64'(coef[3*i+1]) * x[1] + 64'(coef[3*i+2]) * x[2]);
    if (md == Y_RANGE) begin
      res.c1 = clamp(luma_from_full(x[0], rg), range_min(rg), luma_max(rg));
      res.c2 = clamp(luma_from_full(x[1], rg), range_min(rg), luma_max(rg));
      res.c3 = clamp(luma_from_full(x[2], rg), range_min(rg), luma_max(rg));
    end else if (md != Y_BYPASS) begin
      res.c1 = clamp(luma_from_full(m[0], rg),   range_min(rg), luma_max(rg));
      res.c2 = clamp(chroma_from_full(m[1], rg), range_min(rg), chroma_max(rg));
      res.c3 = clamp(chroma_from_full(m[2], rg), range_min(rg), chroma_max(rg));
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
