// csc_gamma_lut: one channel of the gamma encoder or decoder, 16-bit in and out.
//
// The 2^16 input codes are cut into 1024 segments of 64 codes.  The 10 most
// significant input bits address two tables, the offset b (curve value at the
// start of the segment) and the gain m (rise of the curve over the segment),
// and the output is b + m * (6 low bits) / 64, rounded.  The gain is taken
// from the unclamped curve at the next segment's start, so the last segment is
// as exact as the others.  Where this straight-line approximation is more than
// 1 LSB off, a third table of exact outputs takes precedence; it covers the
// EXC_CODES input codes from EXC_LO on: the lowest codes for the encoder, where
// its curves are steepest, and for the decoder the one segment that straddles
// the break point of the BT curve.  All three tables hold the three transfer
// functions (BT.601/709/2020, sRGB, opRGB) and are computed from the curve
// formulas while elaborating; `mode` selects one, G_BYPASS passes x through.
//
// ENC = 1 gives the encoding (linear to non-linear) curves, ENC = 0 the
// decoding curves.  The result is limited to [0, 2^16-1].  Purely combinational.
module csc_gamma_lut
  import csc_pkg::*;
#(
  parameter bit ENC       = 1'b1,
  parameter int SEG_BITS  = 6,
  parameter int EXC_CODES = 1408,
  parameter int EXC_LO    = 0
) (
  input  gamma_e      mode,
  input  logic [15:0] x,
  output logic [15:0] y
);
  localparam int NSEG = 1 << (16 - SEG_BITS);
  localparam int NEXC = (EXC_CODES > 0) ? EXC_CODES : 1;

  typedef logic [15:0] node_t [NSEG];
  typedef logic [15:0] exc_t  [NEXC];

  // The transfer functions on normalised values in [0, 1].
  function automatic real curve(input gamma_e g, input real v);
    if (ENC) begin
      case (g)
        G_BT:    return (v < 0.018) ? 4.5 * v : 1.099 * (v ** 0.45) - 0.099;
        G_SRGB:  return (v <= 0.0031308) ? 12.92 * v : 1.055 * (v ** (1.0 / 2.4)) - 0.055;
        G_OPRGB: return v ** (256.0 / 563.0);
        default: return v;
      endcase
    end else begin
      case (g)
        G_BT:    return (v < 0.081) ? v / 4.5 : ((v + 0.099) / 1.099) ** (1.0 / 0.45);
        G_SRGB:  return (v <= 0.04045) ? v / 12.92 : ((v + 0.055) / 1.055) ** 2.4;
        G_OPRGB: return v ** (563.0 / 256.0);
        default: return v;
      endcase
    end
  endfunction

  function automatic logic [15:0] code_of(input gamma_e g, input int c);
    real r;
    r = curve(g, real'(c) / 65535.0) * 65535.0 + 0.5;
    if (r < 0.0) return 16'd0;
    if (r >= 65535.0) return 16'hFFFF;
    return 16'($rtoi(r));
  endfunction

  // Unclamped value (may exceed 65535 at the top), used for the gains.
  function automatic int raw_of(input gamma_e g, input int c);
    real r;
    r = curve(g, real'(c) / 65535.0) * 65535.0 + 0.5;
    if (r < 0.0) return 0;
    return $rtoi(r);
  endfunction

  function automatic node_t offset_lut(input gamma_e g);
    node_t t;
    for (int s = 0; s < NSEG; s++) t[s] = code_of(g, s << SEG_BITS);
    return t;
  endfunction

  function automatic node_t gain_lut(input gamma_e g);
    node_t t;
    for (int s = 0; s < NSEG; s++)
      t[s] = 16'(raw_of(g, (s + 1) << SEG_BITS) - raw_of(g, s << SEG_BITS));
    return t;
  endfunction

  function automatic exc_t exc_lut(input gamma_e g);
    exc_t t;
    for (int c = 0; c < NEXC; c++) t[c] = code_of(g, EXC_LO + c);
    return t;
  endfunction

  localparam node_t B_BT = offset_lut(G_BT);
  localparam node_t B_SR = offset_lut(G_SRGB);
  localparam node_t B_OP = offset_lut(G_OPRGB);
  localparam node_t M_BT = gain_lut(G_BT);
  localparam node_t M_SR = gain_lut(G_SRGB);
  localparam node_t M_OP = gain_lut(G_OPRGB);
  localparam exc_t  E_BT = exc_lut(G_BT);
  localparam exc_t  E_SR = exc_lut(G_SRGB);
  localparam exc_t  E_OP = exc_lut(G_OPRGB);

  logic [15-SEG_BITS:0] seg;
  logic [SEG_BITS-1:0]  off;
  logic [15:0]          b, m, e;
  logic [23:0]          interp;
  logic                 in_exc;
  int                   xi;

  assign seg = x[15:SEG_BITS];
  assign off = x[SEG_BITS-1:0];

  always_comb begin
    case (mode)
      G_SRGB:  begin b = B_SR[seg]; m = M_SR[seg]; end
      G_OPRGB: begin b = B_OP[seg]; m = M_OP[seg]; end
      default: begin b = B_BT[seg]; m = M_BT[seg]; end
    endcase
    e = '0;
    xi = int'(x) - EXC_LO;
    in_exc = EXC_CODES > 0 && xi >= 0 && xi < EXC_CODES;
    if (in_exc) begin
      case (mode)
        G_SRGB:  e = E_SR[xi % NEXC];
        G_OPRGB: e = E_OP[xi % NEXC];
        default: e = E_BT[xi % NEXC];
      endcase
    end
    interp = 24'(b) + ((24'(m) * 24'(off) + 24'(1 << (SEG_BITS - 1))) >> SEG_BITS);
    if (mode == G_BYPASS)                          y = x;
    else if (in_exc)                               y = e;
    else if (interp > 24'hFFFF)                    y = 16'hFFFF;
    else                                           y = interp[15:0];
  end
endmodule
