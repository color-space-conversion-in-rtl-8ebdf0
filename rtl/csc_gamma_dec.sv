// csc_gamma_dec: gamma decoder for the three video channels, converting
// gamma-encoded values back to linear light.
//
// The transfer function is one of three: BT.601/709/2020 (power 0.45 with a
// linear part below 0.018), sRGB (power 1/2.4 with a linear part below
// 0.0031308) or opRGB (pure power 256/563).  Each channel is a csc_gamma_lut:
// 1024 segments of 64 codes approximated by straight lines whose offset and
// gain come from two tables addressed by the 10 most significant input bits.
// The decoding curves are shallow near zero, so the table of exact outputs only
// covers the 64 codes of the segment that holds the break point of the BT curve
// (0.081, code 5308), where a straight line cannot follow the kink.  Every
// output is then within 1 LSB of the exact curve.
// The curves work on 16 bits: the 16 most significant bits of each 24-bit
// channel are converted and the result is placed back in the 16 most
// significant bits (the low 8 bits become zero).
//
// mode G_BYPASS passes the pixel unchanged.  Timing: one pixel per clock,
// latency STAGES (2) cycles in every mode.  The segmentation, the 16-bit width,
// the extra table of exact outputs and the two stages follow the thesis; the
// placement of that table (one contiguous range) is this design's choice.
module csc_gamma_dec
  import csc_pkg::*;
#(
  parameter int STAGES    = 2,
  parameter int SEG_BITS  = 6,
  parameter int EXC_CODES = 64,
  // first code of the segment holding the BT break point 0.081
  parameter int EXC_LO    = (int'(0.081 * 65535.0) >> SEG_BITS) << SEG_BITS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  gamma_e mode,
  input  vid_t   vin,
  output vid_t   vout
);
  logic [15:0] y1, y2, y3;

  csc_gamma_lut #(.ENC(1'b0), .SEG_BITS(SEG_BITS), .EXC_CODES(EXC_CODES), .EXC_LO(EXC_LO)) u_lut1 (
    .mode, .x(vin.c1[23:8]), .y(y1));
  csc_gamma_lut #(.ENC(1'b0), .SEG_BITS(SEG_BITS), .EXC_CODES(EXC_CODES), .EXC_LO(EXC_LO)) u_lut2 (
    .mode, .x(vin.c2[23:8]), .y(y2));
  csc_gamma_lut #(.ENC(1'b0), .SEG_BITS(SEG_BITS), .EXC_CODES(EXC_CODES), .EXC_LO(EXC_LO)) u_lut3 (
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
