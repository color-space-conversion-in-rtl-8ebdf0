// csc_top: real-time colour space converter for a parallel video stream.
//
// A pixel of three 16-bit channels arrives every clock together with data
// enable and the two syncs.  The converter takes it to 24 bits and runs it
// through the whole conversion chain, each step of which is switched to
// bypass when the configured conversion does not need it:
//
//   upsampler 4:2:2->4:4:4 -> Y'CrCb'->R'G'B' (with input range)
//   -> BT.2020-CL Cr'Cb'->R'B' -> gamma decoder -> BT.2020-CL Y->G
//   -> RGB->RGB (primaries) -> BT.2020-CL RGB->Y -> gamma encoder
//   -> BT.2020-CL R'B'->Cr'Cb' -> R'G'B'->Y'CrCb' (with output range)
//   -> downsampler 4:4:4->4:2:2
//
// and finally rounds it to the output width.  The register bank (8-bit
// address and data, select/write-enable port) holds the configuration and the
// control unit turns it into the mode of every stage.
//
// Ports: idata/odata carry ch1 (R or Y') in [47:32], ch2 (G or Cr') in [31:16]
// and ch3 (B or Cb') in [15:0]; a sample of width_in bits sits in the low bits
// of its channel and is shifted to the top of the 24-bit datapath; the output
// is rounded, saturated and shifted back to width_out bits.  icscen low turns
// every stage to bypass.  icscrst_n is an asynchronous active-low reset.  The
// scan ports only mark where a synthesis scan chain connects: oscanout is
// iscanin registered while iscanen is high.
// Timing: one pixel per clock; the latency is the sum of the stage latencies
// (1 input register, 7+2+2+5+5+2+2+4+9 for the pixel stages, the two filters,
// 1 output register) and does not depend on the conversion selected, except
// through the filters (bypass 1 cycle, else (ORDER/2)*(px_rep+1)+2 each).
// Configuration changes are meant to be made between frames.
// The stage list, order, bus layout and register fields follow the thesis;
// how the width shift, enable and scan ports behave is this design's choice.
module csc_top
  import csc_pkg::*;
#(
  parameter int FILTER_ORDER = 30
) (
  input  logic        ipixclk,
  input  logic        icscrst_n,
  input  logic        icscen,
  input  logic [47:0] idata,
  input  logic        idataen,
  input  logic        ihsync,
  input  logic        ivsync,
  input  logic [7:0]  iaddr,
  input  logic        iwrite_en,
  input  logic [7:0]  iwdata,
  input  logic        isel,
  output logic [7:0]  ordata,
  input  logic        iscanen,
  input  logic        iscanin,
  output logic        oscanout,
  output logic [47:0] odata,
  output logic        odataen,
  output logic        ohsync,
  output logic        ovsync
);
  logic clk, rst_n;
  assign clk   = ipixclk;
  assign rst_n = icscrst_n;

  cfg_t cfg;
  ctl_t ctl;

  csc_regbank u_regbank (
    .clk, .rst_n, .sel(isel), .write_en(iwrite_en), .addr(iaddr), .wdata(iwdata),
    .rdata(ordata), .cfg);

  csc_control u_control (.clk, .rst_n, .en(icscen), .cfg, .ctl);

  // ------------------------------------------------------------ input side
  function automatic chan_t widen(input logic [15:0] v, input logic [4:0] w);
    logic [15:0] m;
    m = v & 16'((32'd1 << w) - 32'd1);
    return chan_t'({8'd0, m} << (5'd24 - w));
  endfunction

  vid_t s_in;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_in <= '0;
    else begin
      s_in.de <= idataen;
      s_in.hs <= ihsync;
      s_in.vs <= ivsync;
      s_in.c1 <= widen(idata[47:32], ctl.win);
      s_in.c2 <= widen(idata[31:16], ctl.win);
      s_in.c3 <= widen(idata[15:0],  ctl.win);
    end
  end

  // -------------------------------------------------------------- datapath
  vid_t s_up, s_y2r, s_y2r_cl, s_gdec, s_y2g, s_r2r, s_r2y_cl, s_genc, s_r2c_cl, s_r2y, s_dn;

  csc_chroma_upsampler #(.ORDER(FILTER_ORDER)) u_up (
    .clk, .rst_n, .en(ctl.up_en), .px_rep(ctl.px_rep), .sbs(ctl.sbs),
    .half_hactive(ctl.half_hactive), .vin(s_in), .vout(s_up));

  csc_ycc2rgb_range u_y2r (
    .clk, .rst_n, .mode(ctl.y2r_mode), .rng(ctl.y2r_rng), .vin(s_up), .vout(s_y2r));

  csc_ycc2rgb_range_cl_crcb u_y2r_cl (
    .clk, .rst_n, .en(ctl.y2r_cl_en), .rng(ctl.y2r_rng), .vin(s_y2r), .vout(s_y2r_cl));

  csc_gamma_dec u_gdec (.clk, .rst_n, .mode(ctl.gdec), .vin(s_y2r_cl), .vout(s_gdec));

  csc_ycc2rgb_range_cl_y u_y2g (.clk, .rst_n, .en(ctl.y2g_en), .vin(s_gdec), .vout(s_y2g));

  csc_rgb2rgb u_r2r (
    .clk, .rst_n, .en(ctl.r2r_en), .src(ctl.r2r_src), .dst(ctl.r2r_dst), .vin(s_y2g), .vout(s_r2r));

  csc_rgb2ycc_range_cl_y u_r2y_cl (.clk, .rst_n, .en(ctl.r2y_cl_en), .vin(s_r2r), .vout(s_r2y_cl));

  csc_gamma_enc u_genc (.clk, .rst_n, .mode(ctl.genc), .vin(s_r2y_cl), .vout(s_genc));

  csc_rgb2ycc_range_cl_crcb u_r2c_cl (
    .clk, .rst_n, .en(ctl.r2c_cl_en), .rng(ctl.r2y_rng), .vin(s_genc), .vout(s_r2c_cl));

  csc_rgb2ycc_range u_r2y (
    .clk, .rst_n, .mode(ctl.r2y_mode), .rng(ctl.r2y_rng), .vin(s_r2c_cl), .vout(s_r2y));

  csc_chroma_downsampler #(.ORDER(FILTER_ORDER)) u_dn (
    .clk, .rst_n, .en(ctl.dn_en), .px_rep(ctl.px_rep), .sbs(ctl.sbs),
    .half_hactive(ctl.half_hactive), .cmin(ctl.cmin), .cmax(ctl.cmax), .vin(s_r2y), .vout(s_dn));

  // ----------------------------------------------------------- output side
  function automatic logic [15:0] narrow(input chan_t v, input logic [4:0] w);
    logic [24:0] r;
    logic [24:0] mx;
    r  = ({1'b0, v} + (25'd1 << (5'd23 - w))) >> (5'd24 - w);
    mx = (25'd1 << w) - 25'd1;
    return (r > mx) ? mx[15:0] : r[15:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odata   <= '0;
      odataen <= 1'b0;
      ohsync  <= 1'b0;
      ovsync  <= 1'b0;
    end else begin
      odata   <= {narrow(s_dn.c1, ctl.wout), narrow(s_dn.c2, ctl.wout), narrow(s_dn.c3, ctl.wout)};
      odataen <= s_dn.de;
      ohsync  <= s_dn.hs;
      ovsync  <= s_dn.vs;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) oscanout <= 1'b0;
    else        oscanout <= iscanen & iscanin;
  end
endmodule
