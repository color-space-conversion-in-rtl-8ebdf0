// csc_rgb2ycc_range_cl_y: first step of BT.2020 constant-luminance encoding,
// linear R, G, B to linear Y, R, B.
//
// The linear luminance Y = 0.2627 R + 0.6780 G + 0.0593 B is computed before
// gamma encoding (that is what makes the luminance constant); G is dropped and
// R and B are kept for the colour differences.  The sum is rounded once and
// clamped to [0, 2^24-1].
//
// Input: c1 = R, c2 = G, c3 = B (linear).  Output: c1 = Y, c2 = R, c3 = B.
// en low passes the pixel unchanged.
// Timing: one pixel per clock, latency STAGES (2) cycles.  Placement before the
// gamma encoder and stage count follow the thesis; weights from BT.2020.
module csc_rgb2ycc_range_cl_y
  import csc_pkg::*;
#(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  vid_t vin,
  output vid_t vout
);
  localparam logic signed [63:0] KR = 64'(to_coef(CL_KR));
  localparam logic signed [63:0] KG = 64'(to_coef(CL_KG));
  localparam logic signed [63:0] KB = 64'(to_coef(CL_KB));

  vid_t res;
  always_comb begin
    logic signed [63:0] y;
    res = vin;
    y = rshift_round(KR * $signed({40'd0, vin.c1}) + KG * $signed({40'd0, vin.c2})
                     + KB * $signed({40'd0, vin.c3}));
    if (en) begin
      res.c1 = clamp(y, '0, '1);
      res.c2 = vin.c1;
      res.c3 = vin.c3;
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
