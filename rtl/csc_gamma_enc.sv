// csc_gamma_enc: gamma encoder for the three video channels, converting
// linear light to gamma-encoded (non-linear) values.
//
// The transfer function is one of three: BT.601/709/2020 (power 0.45 with a
// linear part below 0.018), sRGB (power 1/2.4 with a linear part below
// 0.0031308) or opRGB (pure power 256/563).  Each channel is a csc_gamma_lut:
// 1024 segments of 64 codes approximated by straight lines whose offset and
// gain come from two tables addressed by the 10 most significant input bits.
// Below code 1408 an exact table replaces the interpolation, which keeps the error
// within 1 LSB for all three curves.
// The curves work on 16 bits: the 16 most significant bits of each 24-bit
// channel are converted and the result is placed back in the 16 most
// significant bits (the low 8 bits become zero).
//
// mode G_BYPASS passes the pixel unchanged.  Timing: one pixel per clock,
// latency STAGES (2) cycles in every mode.  The segmentation, the 16-bit width,
// the extra table of exact outputs and the two stages follow the thesis; the
// contents of that table (a contiguous low range) are this design's choice.
module csc_gamma_enc
  import csc_pkg::*;
#(
  parameter int STAGES    = 2,
  parameter int SEG_BITS  = 6,
  parameter int EXC_CODES = 1408
) (
  input  logic   clk,
  input  logic   rst_n,
  input  gamma_e mode,
  input  vid_t   vin,
  output vid_t   vout
);
  logic [15:0] y1, y2, y3;

  csc_gamma_lut #(.ENC(1'b1), .SEG_BITS(SEG_BITS), .EXC_CODES(EXC_CODES)) u_lut1 (
    .mode, .x(vin.c1[23:8]), .y(y1));
  csc_gamma_lut #(.ENC(1'b1), .SEG_BITS(SEG_BITS), .EXC_CODES(EXC_CODES)) u_lut2 (
    .mode, .x(vin.c2[23:8]), .y(y2));
  csc_gamma_lut #(.ENC(1'b1), .SEG_BITS(SEG_BITS), .EXC_CODES(EXC_CODES)) u_lut3 (
    .mode, .x(vin.c3[23:8]), .y(y3));

  vid_t res;
  always_comb begin
    res = vin;
    if (mode != G_BYPASS) begin
      res.c1 = {y1, 8'd0};
      res.c2 = {y2, 8'd0};
      res.c3 = {y3, 8'd0};
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
