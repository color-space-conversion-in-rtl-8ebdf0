// csc_ycc2rgb_range: Y'CrCb' to R'G'B' conversion (non-constant luminance)
// with the input range conversion.
//
// First the three channels are brought to full range: Y' (or, for RGB input,
// every channel) loses its footroom offset and is stretched by 256/219 when the
// input is limited or extended; Cr'/Cb' lose their mid-level offset, are
// stretched by 256/224 and become signed values in [-0.5, 0.5].  Each of these
// scalings is rounded.  Then the 3x3 matrix of the selected standard (BT.601,
// BT.709 or BT.2020, from its luma weights Kr and Kb) gives R'G'B', which is
// rounded once more and clamped to [0, 2^24-1] because Y'CrCb' can describe
// colours outside the RGB cube.
//
// mode: Y_BYPASS passes the pixel unchanged, Y_RANGE only rescales RGB,
// Y_601/Y_709/Y_2020 select the matrix.  rng is the input range.
// Timing: one pixel per clock, latency STAGES (7) cycles in every mode; the
// registers sit at the output for retiming.  The two roundings, the clamp and
// the seven stages follow the thesis; the coefficients come from the standards.
module csc_ycc2rgb_range
  import csc_pkg::*;
#(
  parameter int STAGES = 7
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
    localparam cmat_t M = ycc2rgb_coef(ycc_mode_e'(m));
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
    logic signed [63:0] acc;
    res = vin;
    if (md == Y_RANGE) begin
      res.c1 = clamp(luma_to_full(vin.c1, rg), '0, '1);
      res.c2 = clamp(luma_to_full(vin.c2, rg), '0, '1);
      res.c3 = clamp(luma_to_full(vin.c3, rg), '0, '1);
    end else if (md != Y_BYPASS) begin
      x[0] = luma_to_full(vin.c1, rg);
      x[1] = chroma_to_full(vin.c2, rg);
      x[2] = chroma_to_full(vin.c3, rg);
      for (int i = 0; i < 3; i++) begin
        acc = 64'(coef[3*i]) * x[0] + 64'(coef[3*i+1]) * x[1] + 64'(coef[3*i+2]) * x[2];
        acc = rshift_round(acc);
        case (i)
          0:       res.c1 = clamp(acc, '0, '1);
          1:       res.c2 = clamp(acc, '0, '1);
          default: res.c3 = clamp(acc, '0, '1);
        endcase
      end
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
