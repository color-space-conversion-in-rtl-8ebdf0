// csc_pkg: types, codes and coefficient arithmetic shared by the colour space
// converter.
//
// The internal datapath carries three 24-bit channels per pixel together with
// the data enable and the two sync signals (vid_t).  RGB and Y' use 1.0 = 2^24
// (saturated at 2^24-1); chroma in full range is offset by 2^23.  Limited range
// follows the 8-bit levels 16/235/240/128 scaled by 2^16.
//
// Matrix coefficients are signed 26-bit integers with 24 fractional bits.  They
// are not typed in: the functions below derive them while elaborating, from the
// chromaticities of the primaries and the D65 white point (RGB to RGB) and from
// the luma weights Kr/Kb (R'G'B' to Y'CrCb'), so that a reader can check the
// formula rather than a table of numbers.  The chroma half-band filter taps are
// an equiripple design quantized to 2^24 (only the non-zero odd taps are listed;
// the centre tap is 0.5 and the other even taps are zero).
package csc_pkg;

  localparam int DW   = 24;              // internal channel width
  localparam int CW   = 26;              // coefficient width (signed)
  localparam int FRAC = 24;              // coefficient fractional bits
  localparam int LSTEP = 1 << (DW - 8);  // one 8-bit code step at 24 bits

  typedef logic [DW-1:0]        chan_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t [8:0]          cmat_t;  // row-major 3x3, element 0 = row 0 col 0

  // One pixel of the video stream with its timing signals.
  typedef struct packed {
    logic  de;
    logic  hs;
    logic  vs;
    chan_t c1;   // R or Y'
    chan_t c2;   // G or Cr'
    chan_t c3;   // B or Cb'
  } vid_t;

  // ---------------------------------------------------------------- codes
  typedef enum logic [3:0] {
    CS_BT601_525 = 4'd0,
    CS_BT601_625 = 4'd1,
    CS_BT709     = 4'd2,
    CS_BT2020    = 4'd3,   // non-constant luminance
    CS_BT2020_CL = 4'd4,   // constant luminance
    CS_SRGB      = 4'd5,   // sRGB / sYCC
    CS_OPRGB     = 4'd6,   // opRGB / opYCC
    CS_BGSRGB    = 4'd7,   // bg-sRGB / bg-sYCC
    CS_XVYCC601  = 4'd8,
    CS_XVYCC709  = 4'd9
  } cspace_e;

  typedef enum logic [1:0] {
    RNG_FULL     = 2'd0,
    RNG_LIMITED  = 2'd1,
    RNG_EXTENDED = 2'd2    // limited scaling, clamped to codes 1..254
  } range_e;

  typedef enum logic [1:0] {
    FMT_RGB444 = 2'd0,
    FMT_YCC444 = 2'd1,
    FMT_YCC422 = 2'd2
  } chroma_e;

  typedef enum logic [2:0] {
    P_601_525 = 3'd0,
    P_601_625 = 3'd1,
    P_709     = 3'd2,
    P_2020    = 3'd3,
    P_OPRGB   = 3'd4
  } prim_e;
  localparam int NPRIM = 5;

  typedef enum logic [1:0] {
    G_BYPASS = 2'd0,
    G_BT     = 2'd1,    // BT.601 / BT.709 / BT.2020
    G_SRGB   = 2'd2,
    G_OPRGB  = 2'd3
  } gamma_e;

  typedef enum logic [2:0] {
    Y_BYPASS = 3'd0,
    Y_RANGE  = 3'd1,    // RGB range scaling only (identity matrix)
    Y_601    = 3'd2,
    Y_709    = 3'd3,
    Y_2020   = 3'd4
  } ycc_mode_e;

  // Register bank contents.
  typedef struct packed {
    range_e      range_in;
    range_e      range_out;
    cspace_e     cspace_in;
    cspace_e     cspace_out;
    chroma_e     chroma_in;
    chroma_e     chroma_out;
    logic [2:0]  width_in;     // 0..4 = 8,10,12,14,16 bits
    logic [2:0]  width_out;
    logic [3:0]  px_rep;       // repetitions of each pixel, 0..9
    logic [12:0] half_hactive; // pixels per L/R field
    logic [3:0]  s3d_structure;
    logic        s3d_enable;
  } cfg_t;

  // Datapath stage modes produced by the control unit.
  typedef struct packed {
    logic        up_en;
    ycc_mode_e   y2r_mode;
    range_e      y2r_rng;
    logic        y2r_cl_en;
    gamma_e      gdec;
    logic        y2g_en;
    logic        r2r_en;
    prim_e       r2r_src;
    prim_e       r2r_dst;
    logic        r2y_cl_en;
    gamma_e      genc;
    logic        r2c_cl_en;
    ycc_mode_e   r2y_mode;
    range_e      r2y_rng;
    logic        dn_en;
    logic [3:0]  px_rep;
    logic        sbs;
    logic [12:0] half_hactive;
    chan_t       cmin;
    chan_t       cmax;
    logic [4:0]  win;          // input width in bits
    logic [4:0]  wout;         // output width in bits
  } ctl_t;

  // ------------------------------------------------------------- ranges
  // Lower and upper clamp of a channel in a given range.
  function automatic chan_t range_min(range_e r);
    case (r)
      RNG_LIMITED:  return chan_t'(16 * LSTEP);
      RNG_EXTENDED: return chan_t'(1 * LSTEP);
      default:      return '0;
    endcase
  endfunction

  function automatic chan_t luma_max(range_e r);
    case (r)
      RNG_LIMITED:  return chan_t'(235 * LSTEP);
      RNG_EXTENDED: return chan_t'(254 * LSTEP + LSTEP - 1);
      default:      return '1;
    endcase
  endfunction

  function automatic chan_t chroma_max(range_e r);
    case (r)
      RNG_LIMITED:  return chan_t'(240 * LSTEP);
      RNG_EXTENDED: return chan_t'(254 * LSTEP + LSTEP - 1);
      default:      return '1;
    endcase
  endfunction

  // Saturate a signed value into [lo, hi].
  function automatic chan_t clamp(input logic signed [63:0] v, input chan_t lo, input chan_t hi);
    if (v < $signed({40'd0, lo})) return lo;
    if (v > $signed({40'd0, hi})) return hi;
    return chan_t'(v);
  endfunction

  // Round-half-up right shift by FRAC of a signed product sum.
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] v);
    return (v + 64'sd8388608) >>> FRAC;
  endfunction


  // ------------------------------------------------------ range scaling
  // Limited range (BT.601 levels): Y' = 219*y + 16 and
  // C' = 224*c + 128 in 8-bit steps; at 24 bits these are exact multiples of
  // 2^16.  Full range: Y' = y * 2^24 and C' = c * 2^24 + 2^23.
  localparam coef_t K_Y_EXPAND = coef_t'(19611723);  // round(2^24 * 256/219)
  localparam coef_t K_C_EXPAND = coef_t'(19173961);  // round(2^24 * 256/224)
  localparam coef_t K_Y_SHRINK = coef_t'(219 * 65536);
  localparam coef_t K_C_SHRINK = coef_t'(224 * 65536);
  localparam logic signed [63:0] CHROMA_MID = 64'sd8388608;

  function automatic logic signed [63:0] luma_to_full(input chan_t v, input range_e r);
    if (r == RNG_FULL) return $signed({40'd0, v});
    return rshift_round(($signed({40'd0, v}) - 64'(16 * LSTEP)) * 64'(K_Y_EXPAND));
  endfunction

  function automatic logic signed [63:0] chroma_to_full(input chan_t v, input range_e r);
    if (r == RNG_FULL) return $signed({40'd0, v}) - CHROMA_MID;
    return rshift_round(($signed({40'd0, v}) - 64'(128 * LSTEP)) * 64'(K_C_EXPAND));
  endfunction

  function automatic logic signed [63:0] luma_from_full(input logic signed [63:0] y, input range_e r);
    if (r == RNG_FULL) return y;
    return rshift_round(y * 64'(K_Y_SHRINK)) + 64'(16 * LSTEP);
  endfunction

  function automatic logic signed [63:0] chroma_from_full(input logic signed [63:0] c, input range_e r);
    if (r == RNG_FULL) return c + CHROMA_MID;
    return rshift_round(c * 64'(K_C_SHRINK)) + 64'(128 * LSTEP);
  endfunction

  // --------------------------------------------------- coefficient maths
  function automatic coef_t to_coef(input real r);
    return coef_t'($rtoi(r * 16777216.0 + (r >= 0.0 ? 0.5 : -0.5)));
  endfunction

  typedef real rmat_t [9];

  // Chromaticity x,y of the R, G and B primaries.
  function automatic rmat_t prim_xy(prim_e p);
    rmat_t m;   // xr yr xg yg xb yb in m[0..5]
    m = '{default: 0.0};
    case (p)
      P_601_525: begin m[0]=0.630; m[1]=0.340; m[2]=0.310; m[3]=0.595; m[4]=0.155; m[5]=0.070; end
      P_601_625: begin m[0]=0.640; m[1]=0.330; m[2]=0.290; m[3]=0.600; m[4]=0.150; m[5]=0.060; end
      P_2020:    begin m[0]=0.708; m[1]=0.292; m[2]=0.170; m[3]=0.797; m[4]=0.131; m[5]=0.046; end
      P_OPRGB:   begin m[0]=0.640; m[1]=0.330; m[2]=0.210; m[3]=0.710; m[4]=0.150; m[5]=0.060; end
      default:   begin m[0]=0.640; m[1]=0.330; m[2]=0.300; m[3]=0.600; m[4]=0.150; m[5]=0.060; end
    endcase
    return m;
  endfunction

  function automatic rmat_t inv3(rmat_t a);
    rmat_t r;
    real det;
    det = a[0]*(a[4]*a[8]-a[5]*a[7]) - a[1]*(a[3]*a[8]-a[5]*a[6]) + a[2]*(a[3]*a[7]-a[4]*a[6]);
    r[0] =  (a[4]*a[8]-a[5]*a[7]) / det;
    r[1] = -(a[1]*a[8]-a[2]*a[7]) / det;
    r[2] =  (a[1]*a[5]-a[2]*a[4]) / det;
    r[3] = -(a[3]*a[8]-a[5]*a[6]) / det;
    r[4] =  (a[0]*a[8]-a[2]*a[6]) / det;
    r[5] = -(a[0]*a[5]-a[2]*a[3]) / det;
    r[6] =  (a[3]*a[7]-a[4]*a[6]) / det;
    r[7] = -(a[0]*a[7]-a[1]*a[6]) / det;
    r[8] =  (a[0]*a[4]-a[1]*a[3]) / det;
    return r;
  endfunction

  function automatic rmat_t mul3(rmat_t a, rmat_t b);
    rmat_t r;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        r[3*i+j] = a[3*i]*b[j] + a[3*i+1]*b[3+j] + a[3*i+2]*b[6+j];
    return r;
  endfunction

  // RGB -> XYZ matrix: chromaticities C scaled by J = C^-1 * W / wy (D65).
  function automatic rmat_t rgb_to_xyz(prim_e p);
    rmat_t xy, c, ci, r;
    real wx, wy, jr, jg, jb;
    xy = prim_xy(p);
    wx = 0.3127; wy = 0.3290;
    c[0] = xy[0];             c[1] = xy[2];             c[2] = xy[4];
    c[3] = xy[1];             c[4] = xy[3];             c[5] = xy[5];
    c[6] = 1.0-xy[0]-xy[1];   c[7] = 1.0-xy[2]-xy[3];   c[8] = 1.0-xy[4]-xy[5];
    ci = inv3(c);
    jr = (ci[0]*wx + ci[1]*wy + ci[2]*(1.0-wx-wy)) / wy;
    jg = (ci[3]*wx + ci[4]*wy + ci[5]*(1.0-wx-wy)) / wy;
    jb = (ci[6]*wx + ci[7]*wy + ci[8]*(1.0-wx-wy)) / wy;
    for (int i = 0; i < 3; i++) begin
      r[3*i]   = c[3*i]   * jr;
      r[3*i+1] = c[3*i+1] * jg;
      r[3*i+2] = c[3*i+2] * jb;
    end
    return r;
  endfunction

  // Linear RGB(src) -> linear RGB(dst), quantized.
  function automatic cmat_t rgb2rgb_coef(prim_e src, prim_e dst);
    rmat_t m;
    cmat_t q;
    m = mul3(inv3(rgb_to_xyz(dst)), rgb_to_xyz(src));
    for (int i = 0; i < 9; i++) q[i] = to_coef(m[i]);
    return q;
  endfunction

  // Luma weights of a Y'CrCb' matrix.
  function automatic real kr_of(ycc_mode_e m);
    case (m)
      Y_709:   return 0.2126;
      Y_2020:  return 0.2627;
      default: return 0.299;
    endcase
  endfunction
  function automatic real kb_of(ycc_mode_e m);
    case (m)
      Y_709:   return 0.0722;
      Y_2020:  return 0.0593;
      default: return 0.114;
    endcase
  endfunction

  // R'G'B' -> (Y', Cr', Cb'), Cr'/Cb' in [-0.5, 0.5].  Identity for Y_RANGE.
  function automatic cmat_t rgb2ycc_coef(ycc_mode_e md);
    real kr, kb, kg;
    cmat_t q;
    kr = kr_of(md); kb = kb_of(md); kg = 1.0 - kr - kb;
    if (md == Y_RANGE || md == Y_BYPASS) begin
      q = '{default: '0};
      q[0] = to_coef(1.0); q[4] = to_coef(1.0); q[8] = to_coef(1.0);
      return q;
    end
    q[0] = to_coef(kr);                   q[1] = to_coef(kg);                   q[2] = to_coef(kb);
    q[3] = to_coef(0.5);                  q[4] = to_coef(-0.5*kg/(1.0-kr));     q[5] = to_coef(-0.5*kb/(1.0-kr));
    q[6] = to_coef(-0.5*kr/(1.0-kb));     q[7] = to_coef(-0.5*kg/(1.0-kb));     q[8] = to_coef(0.5);
    return q;
  endfunction

  // (Y', Cr', Cb') -> R'G'B'.  Identity for Y_RANGE.
  function automatic cmat_t ycc2rgb_coef(ycc_mode_e md);
    real kr, kb, kg;
    cmat_t q;
    kr = kr_of(md); kb = kb_of(md); kg = 1.0 - kr - kb;
    if (md == Y_RANGE || md == Y_BYPASS) begin
      q = '{default: '0};
      q[0] = to_coef(1.0); q[4] = to_coef(1.0); q[8] = to_coef(1.0);
      return q;
    end
    q[0] = to_coef(1.0); q[1] = to_coef(2.0*(1.0-kr));            q[2] = to_coef(0.0);
    q[3] = to_coef(1.0); q[4] = to_coef(-2.0*kr*(1.0-kr)/kg);     q[5] = to_coef(-2.0*kb*(1.0-kb)/kg);
    q[6] = to_coef(1.0); q[7] = to_coef(0.0);                     q[8] = to_coef(2.0*(1.0-kb));
    return q;
  endfunction

  // BT.2020 constant luminance constants.
  localparam real CL_KR = 0.2627;
  localparam real CL_KB = 0.0593;
  localparam real CL_KG = 0.6780;
  localparam real CL_NB = 1.9404;   // Cb' divisor when B'-Y' <= 0
  localparam real CL_PB = 1.5816;   // Cb' divisor when B'-Y' > 0
  localparam real CL_NR = 1.7184;   // Cr' divisor when R'-Y' <= 0
  localparam real CL_PR = 0.9936;   // Cr' divisor when R'-Y' > 0

  // ------------------------------------------------------- chroma filters
  // Non-zero odd taps h[1], h[3], ... of the half-band low-pass, x 2^24.
  // Centre tap h[0] = 2^23; the taps at +-k are equal; sum of all = 2^24.
  localparam int HB_MAX_ODD = 8;
  typedef int hb_t [HB_MAX_ODD];
  function automatic hb_t hb_taps(int order);
    hb_t t;
    t = '{default: 0};
    if (order == 18) begin
      t[0] = 5213823; t[1] = -1460987; t[2] = 607786; t[3] = -235975; t[4] = 69657;
    end else begin
      t[0] = 5310421; t[1] = -1655583; t[2] = 866712; t[3] = -500940;
      t[4] = 289425;  t[5] = -158498;  t[6] = 78166;  t[7] = -35399;
    end
    return t;
  endfunction

  function automatic int width_bits(logic [2:0] code);
    case (code)
      3'd1:    return 10;
      3'd2:    return 12;
      3'd3:    return 14;
      3'd4:    return 16;
      default: return 8;
    endcase
  endfunction

endpackage
