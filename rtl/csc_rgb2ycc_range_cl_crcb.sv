// csc_rgb2ycc_range_cl_crcb: last step of BT.2020 constant-luminance encoding,
// Y' R' B' to Y'c Cr'c Cb'c, with the output range conversion.
//
// Cb' = (B'-Y') / 1.9404 when B'-Y' <= 0, else / 1.5816;
// Cr' = (R'-Y') / 1.7184 when R'-Y' <= 0, else / 0.9936.
// The differences and both quotients (multiplications by the reciprocals) are
// computed in parallel and the sign of the difference selects one.  Then Y'
// and the chroma are scaled to the output range exactly as in
// csc_rgb2ycc_range and clamped to the range limits.
//
// Input channel order: c1 = Y' (gamma-encoded linear luminance), c2 = R',
// c3 = B'.  Output: c1 = Y'c, c2 = Cr'c, c3 = Cb'c.  en low passes the pixel
// unchanged; rng is the output range.
// Timing: one pixel per clock, latency STAGES (4) cycles.  Structure and stage
// count follow the thesis; the divisors come from BT.2020.
module csc_rgb2ycc_range_cl_crcb
  import csc_pkg::*;
#(
  parameter int STAGES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  range_e rng,
  input  vid_t   vin,
  output vid_t   vout
);
  localparam logic signed [63:0] QRN = 64'(to_coef(1.0 / CL_NR));
  localparam logic signed [63:0] QRP = 64'(to_coef(1.0 / CL_PR));
  localparam logic signed [63:0] QBN = 64'(to_coef(1.0 / CL_NB));
  localparam logic signed [63:0] QBP = 64'(to_coef(1.0 / CL_PB));

  vid_t res;
  always_comb begin
    logic signed [63:0] y, dr, db, cr, cb;
    res = vin;
    y  = $signed({40'd0, vin.c1});
    dr = $signed({40'd0, vin.c2}) - y;
    db = $signed({40'd0, vin.c3}) - y;
    cr = (dr <= 0) ? rshift_round(dr * QRN) : rshift_round(dr * QRP);
    cb = (db <= 0) ? rshift_round(db * QBN) : rshift_round(db * QBP);
    if (en) begin
      res.c1 = clamp(luma_from_full(y, rng),    range_min(rng), luma_max(rng));
      res.c2 = clamp(chroma_from_full(cr, rng), range_min(rng), chroma_max(rng));
      res.c3 = clamp(chroma_from_full(cb, rng), range_min(rng), chroma_max(rng));
    end
  end

  csc_vid_pipe #(.STAGES(STAGES)) u_pipe (.clk, .rst_n, .d(res), .q(vout));
endmodule
