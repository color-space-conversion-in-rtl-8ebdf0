// csc_ycc2rgb_range_cl_y: last step of BT.2020 constant-luminance decoding,
// linear Y, R, B to linear R, G, B.
//
// Constant luminance transmits the linear luminance Y = 0.2627 R + 0.6780 G +
// 0.0593 B instead of G, so G = Y/0.6780 - (0.2627/0.6780) R -
// (0.0593/0.6780) B.  The three products are summed, rounded once and clamped
// to [0, 2^24-1].
//
// Input channel order: c1 = Y, c2 = R, c3 = B (all linear).  Output: c1 = R,
// c2 = G, c3 = B.  en low passes the pixel unchanged.
// Timing: one pixel per clock, latency STAGES (5) cycles.  The placement after
// the gamma decoder and the stage count follow the thesis; the weights come
// from BT.2020.
module csc_ycc2rgb_range_cl_y
  import csc_pkg::*;
#(
  parameter int STAGES = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  vid_t vin,
  output vid_t vout
);
  localparam logic signed [63:0] KY = 64'(to_coef(1.0 / CL_KG));
  localparam logic signed [63:0] KR = 64'(to_coef(-CL_KR / CL_KG));
  localparam logic signed [63:0] KB = 64'(to_coef(-CL_KB / CL_KG));

  vid_t res;
  always_comb begin
    logic signed [63:0] g;
    res = vin;
    g = rshift_round(KY * $signed({40'd0, vin.c1}) + KR * $signed({40'd0, vin.c2})
                     + KB * $signed({40'd0, vin.c3}));
    if (en) begin
      res.c1 = vin.c2;
      res.c2 = clamp(g, '0, '1);
      res.c3 = vin.c3;
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
