// csc_control: decodes the register bank fields into the mode of every stage
// of the datapath.
//
// For each colour space code it knows the primaries (for the RGB to RGB
// matrix), the transfer function (for the gamma stages) and the luma weights
// (for the Y'CrCb' matrices).  The rules are:
//  * Input 4:2:2 enables the upsampler, output 4:2:2 the downsampler.
//  * Y'CrCb' input goes through the Y'CrCb'->R'G'B' matrix of its space, or,
//    for BT.2020 constant luminance, through the Cr'Cb'->R'B' and Y->G
//    stages; RGB input that is not full range only has its range stretched.
//  * The signal is linearised (gamma decode, RGB to RGB, gamma encode) only if
//    the primaries or transfer functions differ, or constant luminance is used
//    on either side; the RGB to RGB matrix only runs if the primaries differ.
//  * The output side mirrors the input side (RGB->Y and R'B'->Cr'Cb' for
//    constant luminance, otherwise the R'G'B'->Y'CrCb' matrix or the RGB range).
//  * Identical input and output space, format family and range, or icscen low,
//    bypass every pixel stage.
//  * The downsampler clamps chroma to the limits of the output range.
// The division of labour follows the thesis; these decoding rules and the
// colour space codes are this design's.  The outputs are registered (one clock
// after a register change) and are meant to be changed between frames.
module csc_control
  import csc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  cfg_t cfg,
  output ctl_t ctl
);
  function automatic prim_e prim_of(input cspace_e c);
    case (c)
      CS_BT601_525:            return P_601_525;
      CS_BT601_625:            return P_601_625;
      CS_BT2020, CS_BT2020_CL: return P_2020;
      CS_OPRGB:                return P_OPRGB;
      default:                 return P_709;
    endcase
  endfunction

  function automatic gamma_e gamma_of(input cspace_e c);
    case (c)
      CS_SRGB, CS_BGSRGB: return G_SRGB;
      CS_OPRGB:           return G_OPRGB;
      default:            return G_BT;
    endcase
  endfunction

  function automatic ycc_mode_e ymat_of(input cspace_e c);
    case (c)
      CS_BT709, CS_XVYCC709:   return Y_709;
      CS_BT2020, CS_BT2020_CL: return Y_2020;
      default:                 return Y_601;
    endcase
  endfunction

  ctl_t nxt;
  always_comb begin
    logic in_ycc, out_ycc, cl_in, cl_out, linear, same;
    in_ycc  = cfg.chroma_in  != FMT_RGB444;
    out_ycc = cfg.chroma_out != FMT_RGB444;
    cl_in   = in_ycc  && cfg.cspace_in  == CS_BT2020_CL;
    cl_out  = out_ycc && cfg.cspace_out == CS_BT2020_CL;
    same    = !en || (cfg.cspace_in == cfg.cspace_out && in_ycc == out_ycc
                      && cfg.range_in == cfg.range_out);
    linear  = !same && (cl_in || cl_out
                        || prim_of(cfg.cspace_in) != prim_of(cfg.cspace_out)
                        || gamma_of(cfg.cspace_in) != gamma_of(cfg.cspace_out));

    nxt = '0;
    nxt.up_en      = en && cfg.chroma_in  == FMT_YCC422;
    nxt.dn_en      = en && cfg.chroma_out == FMT_YCC422;

    nxt.y2r_rng    = cfg.range_in;
    nxt.y2r_mode   = Y_BYPASS;
    if (!same) begin
      if (in_ycc && !cl_in)          nxt.y2r_mode = ymat_of(cfg.cspace_in);
      else if (!in_ycc && cfg.range_in != RNG_FULL) nxt.y2r_mode = Y_RANGE;
    end
    nxt.y2r_cl_en  = !same && cl_in;
    nxt.gdec       = linear ? gamma_of(cfg.cspace_in) : G_BYPASS;
    nxt.y2g_en     = linear && cl_in;
    nxt.r2r_src    = prim_of(cfg.cspace_in);
    nxt.r2r_dst    = prim_of(cfg.cspace_out);
    nxt.r2r_en     = linear && nxt.r2r_src != nxt.r2r_dst;
    nxt.r2y_cl_en  = linear && cl_out;
    nxt.genc       = linear ? gamma_of(cfg.cspace_out) : G_BYPASS;
    nxt.r2c_cl_en  = !same && cl_out;
    nxt.r2y_rng    = cfg.range_out;
    nxt.r2y_mode   = Y_BYPASS;
    if (!same) begin
      if (out_ycc && !cl_out)        nxt.r2y_mode = ymat_of(cfg.cspace_out);
      else if (!out_ycc && cfg.range_out != RNG_FULL) nxt.r2y_mode = Y_RANGE;
    end

    nxt.px_rep       = (cfg.px_rep > 4'd9) ? 4'd9 : cfg.px_rep;
    nxt.sbs          = cfg.s3d_enable && (cfg.s3d_structure == 4'd8 || cfg.s3d_structure == 4'd3);
    nxt.half_hactive = cfg.half_hactive;
    nxt.cmin         = range_min(cfg.range_out);
    nxt.cmax         = chroma_max(cfg.range_out);
    nxt.win          = 5'(width_bits(cfg.width_in));
    nxt.wout         = 5'(width_bits(cfg.width_out));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl <= '0;
      ctl.win        <= 5'd8;
      ctl.wout       <= 5'd8;
    end else begin
      ctl <= nxt;
    end
  end
endmodule
