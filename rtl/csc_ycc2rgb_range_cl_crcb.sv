// csc_ycc2rgb_range_cl_crcb: first step of BT.2020 constant-luminance decoding,
// Y'c Cr'c Cb'c to Y' R' B'.
//
// The input is brought to full range as in the non-constant-luminance path
// (Y' stretched by 256/219, chroma by 256/224 for limited ranges).  Constant
// luminance codes B'-Y' and R'-Y' with a divisor that depends on their sign, so
// R' = Y' + Cr' * (1.7184 if Cr' <= 0 else 0.9936) and
// B' = Y' + Cb' * (1.9404 if Cb' <= 0 else 1.5816).  Both products of each
// channel are formed in parallel and the sign picks one at the end.  R' and B'
// are rounded and clamped to [0, 2^24-1].
//
// Output channel order: c1 = Y', c2 = R', c3 = B' (the gamma decoder then
// linearises all three; csc_ycc2rgb_range_cl_y recovers G).
// en low passes the pixel unchanged.  rng is the input range.
// Timing: one pixel per clock, latency STAGES (2) cycles.  The split of the
// constant-luminance path, the parallel sign evaluation and the stage count
// follow the thesis; the divisors come from BT.2020.
module csc_ycc2rgb_range_cl_crcb
  import csc_pkg::*;
#(
  parameter int STAGES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  range_e rng,
  input  vid_t   vin,
  output vid_t   vout
);
  localparam logic signed [63:0] KRN = 64'(to_coef(CL_NR));
  localparam logic signed [63:0] KRP = 64'(to_coef(CL_PR));
  localparam logic signed [63:0] KBN = 64'(to_coef(CL_NB));
  localparam logic signed [63:0] KBP = 64'(to_coef(CL_PB));

  vid_t res;
  always_comb begin
    logic signed [63:0] y, cr, cb, rn, rp, bn, bp;
    res = vin;
    y  = luma_to_full(vin.c1, rng);
    cr = chroma_to_full(vin.c2, rng);
    cb = chroma_to_full(vin.c3, rng);
    rn = y + rshift_round(cr * KRN);
    rp = y + rshift_round(cr * KRP);
    bn = y + rshift_round(cb * KBN);
    bp = y + rshift_round(cb * KBP);
    if (en) begin
      res.c1 = clamp(y, '0, '1);
      res.c2 = clamp((cr <= 0) ? rn : rp, '0, '1);
      res.c3 = clamp((cb <= 0) ? bn : bp, '0, '1);
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
