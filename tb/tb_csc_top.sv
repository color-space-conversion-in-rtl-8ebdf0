// tb_csc_top: end-to-end self-checking testbench of the colour space converter
// at its full size (default parameters: 30th-order chroma filters).
//
// Each scenario programs the register bank through the slave port (every
// write is read back, with the one-clock read latency checked), waits for
// the pipeline to drain, and sends lines of video.  The expected output of
// every pixel is computed here in real arithmetic from the standards: range
// decoding, the Y'CrCb' matrices from Kr/Kb, BT.2020 constant luminance with
// its sign-dependent divisors, the transfer functions, the published
// BT.709 <-> BT.2020 primaries matrices (other primary pairs are exercised
// with grey pixels, which every matrix maps to themselves), range encoding and
// the output width.  The tolerance is a fraction of full scale, looser on the
// paths that go through the 16-bit gamma tables.
// Pixels are random where the chroma filters cannot smear them: with 4:2:2
// input the chroma is constant per field and the luma random; with 4:2:2
// output the colour is constant per field.  In 3D side-by-side mode the two
// fields get different colours, which only stay exact if each field is
// filtered on its own.  Data enable and the syncs must come out exactly
//   1 + up + 38 + down + 1 cycles after they went in, where each filter adds
//   15*(px_rep+1)+2 cycles when active and 1 cycle when bypassed.
// The testbench counts how often each mechanism was exercised (upsampling,
// downsampling, pixel repetition, 3D side-by-side, full bypass, icscen low,
// constant luminance decode and encode, linearisation, RGB to RGB matrix,
// range change, width change, register reads, scan) and fails if any count
// is zero.
module tb_csc_top;
  import csc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        icscen, idataen, ihsync, ivsync, iwrite_en, isel, iscanen, iscanin;
  logic [47:0] idata;
  logic [7:0]  iaddr, iwdata, ordata;
  logic        oscanout, odataen, ohsync, ovsync;
  logic [47:0] odata;

  csc_top dut (
    .ipixclk(clk), .icscrst_n(rst_n), .icscen, .idata, .idataen, .ihsync, .ivsync,
    .iaddr, .iwrite_en, .iwdata, .isel, .ordata, .iscanen, .iscanin, .oscanout,
    .odata, .odataen, .ohsync, .ovsync);

  localparam int MAXT = 120000;

  initial begin
    repeat (MAXT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scenario
  typedef struct {
    int  cs_in, fmt_in, rng_in, cs_out, fmt_out, rng_out;
    int  win, wout, rep, sbs, en, grey;
  } scen_t;
  scen_t sc;

  // mechanism counters
  typedef enum int {
    M_UP, M_DN, M_REP, M_SBS, M_BYPASS, M_OFF, M_CLDEC, M_CLENC,
    M_GAMMA, M_R2R, M_RANGE, M_WIDTH, M_READ, M_SCAN, M_N
  } mech_e;
  int mcount [M_N];
  string mname [M_N] = '{"4:2:2 up", "4:2:2 down", "pixel repetition", "3D side-by-side",
                         "full bypass", "icscen low", "CL decode", "CL encode", "linearisation",
                         "RGB to RGB", "range change", "width change", "register read", "scan"};

  // per-cycle stimulus record
  logic        h_de [MAXT], h_hs [MAXT], h_vs [MAXT];
  real         h_exp [MAXT][3];
  real         h_tol [MAXT];
  logic [15:0] h_mech [MAXT];
  int          cyc = 0, lat = 42, skip_until = 0;

  // ---------------------------------------------------------- reference
  function automatic int gam(input int cs);   // 0 BT, 1 sRGB, 2 opRGB
    return (cs == 5 || cs == 7) ? 1 : (cs == 6) ? 2 : 0;
  endfunction
  function automatic int ymat(input int cs);  // 0 601, 1 709, 2 2020
    return (cs == 2 || cs == 9) ? 1 : (cs == 3 || cs == 4) ? 2 : 0;
  endfunction
  function automatic int prim(input int cs);
    return (cs == 0) ? 0 : (cs == 1) ? 1 : (cs == 3 || cs == 4) ? 3 : (cs == 6) ? 4 : 2;
  endfunction
  function automatic int lat_of(input scen_t s);
    int f;
    f = 15 * (s.rep + 1) + 2;
    return 1 + ((s.en && s.fmt_in == 2) ? f : 1) + 38 + ((s.en && s.fmt_out == 2) ? f : 1) + 1;
  endfunction

  // Output values (normalised to [0,1]) for one input pixel given as
  // normalised codes.
  task automatic model(input scen_t s, input real u [3], output real o [3], output logic [15:0] m);
    real r, g, b, y, cr, cb, lr, lg, lb, ly, t;
    bit  in_ycc, out_ycc, cl_in, cl_out, same, linear;
    in_ycc  = s.fmt_in != 0;
    out_ycc = s.fmt_out != 0;
    cl_in   = in_ycc && s.cs_in == 4;
    cl_out  = out_ycc && s.cs_out == 4;
    same    = !s.en || (s.cs_in == s.cs_out && in_ycc == out_ycc && s.rng_in == s.rng_out);
    linear  = !same && (cl_in || cl_out || prim(s.cs_in) != prim(s.cs_out) || gam(s.cs_in) != gam(s.cs_out));
    m = '0;
    if (s.en && s.fmt_in == 2) m[M_UP] = 1'b1;
    if (s.en && s.fmt_out == 2) m[M_DN] = 1'b1;
    if (s.rep != 0) m[M_REP] = 1'b1;
    if (s.sbs != 0 && (m[M_UP] || m[M_DN])) m[M_SBS] = 1'b1;
    if (s.win != s.wout) m[M_WIDTH] = 1'b1;
    if (same) begin
      if (s.en) m[M_BYPASS] = 1'b1; else m[M_OFF] = 1'b1;
      o = u;
      return;
    end
    if (s.rng_in != s.rng_out) m[M_RANGE] = 1'b1;
    // input decoding
    if (in_ycc) begin
      y  = (s.rng_in == 0) ? u[0] : (u[0] * 256.0 - 16.0) / 219.0;
      cr = (s.rng_in == 0) ? u[1] - 0.5 : (u[1] * 256.0 - 128.0) / 224.0;
      cb = (s.rng_in == 0) ? u[2] - 0.5 : (u[2] * 256.0 - 128.0) / 224.0;
      if (cl_in) begin
        m[M_CLDEC] = 1'b1;
        r = clip01(y + cr * ((cr <= 0.0) ? 1.7184 : 0.9936));
        b = clip01(y + cb * ((cb <= 0.0) ? 1.9404 : 1.5816));
        ly = eotf(0, clip01(y)); lr = eotf(0, r); lb = eotf(0, b);
        lg = clip01((ly - 0.2627 * lr - 0.0593 * lb) / 0.6780);
      end else begin
        t = kr(ymat(s.cs_in)); r = kb(ymat(s.cs_in));
        lr = y + 2.0 * (1.0 - t) * cr;
        lb = y + 2.0 * (1.0 - r) * cb;
        lg = (y - t * lr - r * lb) / (1.0 - t - r);
        r = clip01(lr); g = clip01(lg); b = clip01(lb);
      end
    end else begin
      r = (s.rng_in == 0) ? u[0] : clip01((u[0] * 256.0 - 16.0) / 219.0);
      g = (s.rng_in == 0) ? u[1] : clip01((u[1] * 256.0 - 16.0) / 219.0);
      b = (s.rng_in == 0) ? u[2] : clip01((u[2] * 256.0 - 16.0) / 219.0);
    end
    // linear section
    if (linear) begin
      m[M_GAMMA] = 1'b1;
      if (!cl_in) begin lr = eotf(gam(s.cs_in), r); lg = eotf(gam(s.cs_in), g); lb = eotf(gam(s.cs_in), b); end
      if (prim(s.cs_in) != prim(s.cs_out)) begin
        real a0, a1, a2;
        m[M_R2R] = 1'b1;
        a0 = lr; a1 = lg; a2 = lb;
        if (prim(s.cs_in) == 3 && prim(s.cs_out) == 2) begin
          lr = 1.6605 * a0 - 0.5876 * a1 - 0.0728 * a2;
          lg = -0.1246 * a0 + 1.1329 * a1 - 0.0083 * a2;
          lb = -0.0182 * a0 - 0.1006 * a1 + 1.1187 * a2;
        end else if (prim(s.cs_in) == 2 && prim(s.cs_out) == 3) begin
          lr = 0.6274 * a0 + 0.3293 * a1 + 0.0433 * a2;
          lg = 0.0691 * a0 + 0.9195 * a1 + 0.0114 * a2;
          lb = 0.0164 * a0 + 0.0880 * a1 + 0.8956 * a2;
        end
        // other pairs are only driven with greys, which map to themselves
        lr = clip01(lr); lg = clip01(lg); lb = clip01(lb);
      end
      if (cl_out) begin
        m[M_CLENC] = 1'b1;
        ly = 0.2627 * lr + 0.6780 * lg + 0.0593 * lb;
        y = oetf(0, clip01(ly)); r = oetf(0, lr); b = oetf(0, lb);
        cr = r - y; cr = cr / ((cr <= 0.0) ? 1.7184 : 0.9936);
        cb = b - y; cb = cb / ((cb <= 0.0) ? 1.9404 : 1.5816);
      end else begin
        r = oetf(gam(s.cs_out), lr); g = oetf(gam(s.cs_out), lg); b = oetf(gam(s.cs_out), lb);
      end
    end
    // output encoding
    if (out_ycc) begin
      if (!cl_out) begin
        t = kr(ymat(s.cs_out)); lb = kb(ymat(s.cs_out));
        y  = t * r + (1.0 - t - lb) * g + lb * b;
        cr = (r - y) / (2.0 * (1.0 - t));
        cb = (b - y) / (2.0 * (1.0 - lb));
      end
      if (s.rng_out == 0) begin
        o[0] = clip01(y); o[1] = clip01(cr + 0.5); o[2] = clip01(cb + 0.5);
      end else begin
        o[0] = (16.0 + 219.0 * clip01(y)) / 256.0;
        o[1] = (128.0 + 224.0 * cr) / 256.0;
        o[2] = (128.0 + 224.0 * cb) / 256.0;
        for (int k = 1; k < 3; k++) begin
          if (o[k] < 16.0 / 256.0) o[k] = 16.0 / 256.0;
          if (o[k] > 240.0 / 256.0) o[k] = 240.0 / 256.0;
        end
      end
    end else begin
      o[0] = r; o[1] = g; o[2] = b;
      if (s.rng_out != 0) for (int k = 0; k < 3; k++) o[k] = (16.0 + 219.0 * clip01(o[k])) / 256.0;
    end
  endtask

  // Input codes (normalised) of a colour given as non-linear R'G'B' in the
  // input space.  Only used to make plausible in-gamut stimulus.
  function automatic void encode_in(input scen_t s, input real rgb [3], output real u [3]);
    real y, cr, cb, t, q;
    if (s.fmt_in == 0) begin
      for (int k = 0; k < 3; k++) u[k] = (s.rng_in == 0) ? rgb[k] : (16.0 + 219.0 * rgb[k]) / 256.0;
      return;
    end
    if (s.cs_in == 4) begin
      y = oetf(0, 0.2627 * eotf(0, rgb[0]) + 0.6780 * eotf(0, rgb[1]) + 0.0593 * eotf(0, rgb[2]));
      cr = rgb[0] - y; cr = cr / ((cr <= 0.0) ? 1.7184 : 0.9936);
      cb = rgb[2] - y; cb = cb / ((cb <= 0.0) ? 1.9404 : 1.5816);
    end else begin
      t = kr(ymat(s.cs_in)); q = kb(ymat(s.cs_in));
      y = t * rgb[0] + (1.0 - t - q) * rgb[1] + q * rgb[2];
      cr = (rgb[0] - y) / (2.0 * (1.0 - t));
      cb = (rgb[2] - y) / (2.0 * (1.0 - q));
    end
    if (s.rng_in == 0) begin u[0] = y; u[1] = cr + 0.5; u[2] = cb + 0.5; end
    else begin
      u[0] = (16.0 + 219.0 * y) / 256.0;
      u[1] = (128.0 + 224.0 * cr) / 256.0;
      u[2] = (128.0 + 224.0 * cb) / 256.0;
    end
  endfunction

  function automatic logic [15:0] quant(input real v, input int w);
    real c;
    c = $floor(v * real'(1 << w) + 0.5);
    if (c < 0.0) c = 0.0;
    if (c > real'((1 << w) - 1)) c = real'((1 << w) - 1);
    return 16'($rtoi(c));
  endfunction

  // ------------------------------------------------------------ checking
  task automatic check(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d: got %0.1f expected %0.2f (tol %0.2f)", what, cyc, got, exp, tol);
    end
  endtask

  function automatic real sat(input real v);
    real mx;
    mx = real'((1 << sc.wout) - 1);
    return (v < 0.0) ? 0.0 : (v > mx) ? mx : v;
  endfunction

  task automatic check_outputs();
    int i;
    i = cyc - lat;
    if (i < 0 || cyc < skip_until) return;
    check("odataen", odataen, h_de[i], 0.0);
    check("ohsync", ohsync, h_hs[i], 0.0);
    check("ovsync", ovsync, h_vs[i], 0.0);
    if (h_de[i] && odataen) begin
      real sc_w;
      sc_w = real'(1 << sc.wout);
      check("ch1", real'(odata[47:32]), sat(h_exp[i][0] * sc_w), h_tol[i]);
      check("ch2", real'(odata[31:16]), sat(h_exp[i][1] * sc_w), h_tol[i]);
      check("ch3", real'(odata[15:0]),  sat(h_exp[i][2] * sc_w), h_tol[i]);
      for (int k = 0; k < M_N; k++) if (h_mech[i][k]) mcount[k]++;
    end
  endtask

  // One clock of stimulus: check the outputs, then drive the inputs.
  task automatic tick(input logic de, input logic hs, input logic vs, input logic [15:0] c [3],
                      input real e [3], input real tol, input logic [15:0] m);
    @(negedge clk);
    check_outputs();
    idataen = de; ihsync = hs; ivsync = vs;
    idata = {c[0], c[1], c[2]};
    h_de[cyc] = de; h_hs[cyc] = hs; h_vs[cyc] = vs;
    h_exp[cyc] = e; h_tol[cyc] = tol; h_mech[cyc] = m;
    cyc++;
  endtask

  task automatic blank(input int n, input logic vs);
    logic [15:0] c [3];
    real e [3];
    for (int b = 0; b < n; b++) begin
      c[0] = 16'($urandom); c[1] = 16'($urandom); c[2] = 16'($urandom);
      e = '{0.0, 0.0, 0.0};
      tick(1'b0, b >= 2 && b < 6, vs, c, e, 0.0, '0);
    end
  endtask

  // --------------------------------------------------------- register port
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] q;
    isel = 1'b1; iwrite_en = 1'b1; iaddr = a; iwdata = d;
    blank(1, 1'b0);
    iwrite_en = 1'b0;
    blank(1, 1'b0);               // read request sampled at the next edge
    isel = 1'b0;
    blank(1, 1'b0);
    q = ordata;
    checks++;
    if (q !== d) begin failures++; $display("FAIL readback of %0h: %0h vs %0h", a, q, d); end
    mcount[M_READ]++;
  endtask

  task automatic configure(input scen_t s);
    int h;
    sc = s;
    h = 24;
    icscen = 1'(s.en);
    wr(8'h00, 8'(s.rng_in));  wr(8'h01, 8'(s.rng_out));
    wr(8'h02, 8'(s.cs_in));   wr(8'h03, 8'(s.cs_out));
    wr(8'h04, 8'(s.fmt_in));  wr(8'h05, 8'(s.fmt_out));
    wr(8'h06, 8'((s.win - 8) / 2)); wr(8'h07, 8'((s.wout - 8) / 2));
    wr(8'h08, 8'(s.rep));
    wr(8'h09, 8'(h)); wr(8'h0A, 8'd0);
    wr(8'h0B, s.sbs ? 8'd8 : 8'd0); wr(8'h0C, 8'(s.sbs));
    lat = lat_of(s);
    skip_until = cyc + 4;
    blank(400, 1'b0);
  endtask

  // A line of n pixels (two fields of n/2 in side-by-side mode).
  task automatic video_line(input int n, input logic vs);
    real         rgb [3], fld [2][3], u [3], e [3], ue [3];
    logic [15:0] c [3];
    logic [15:0] m;
    real         tol;
    bit          flat_c, flat_all;
    flat_all = sc.en && sc.fmt_out == 2;
    flat_c   = sc.en && sc.fmt_in == 2;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < 3; k++) fld[f][k] = real'($urandom_range(1000)) / 1000.0;
    if (sc.grey) for (int f = 0; f < 2; f++) begin fld[f][1] = fld[f][0]; fld[f][2] = fld[f][0]; end
    for (int i = 0; i < n; i++) begin
      int f;
      f = (sc.sbs && i >= n / 2) ? 1 : 0;
      rgb = fld[f];
      if (!flat_all && !flat_c) begin
        rgb[0] = real'($urandom_range(1000)) / 1000.0;
        rgb[1] = sc.grey ? rgb[0] : real'($urandom_range(1000)) / 1000.0;
        rgb[2] = sc.grey ? rgb[0] : real'($urandom_range(1000)) / 1000.0;
      end
      encode_in(sc, rgb, u);
      if (flat_c && !flat_all && !sc.grey) begin
        // random luma under the field's constant chroma
        real uf [3];
        encode_in(sc, fld[f], uf);
        u[1] = uf[1]; u[2] = uf[2];
        u[0] = (sc.rng_in == 0) ? real'($urandom_range(1000)) / 1000.0
                                : (16.0 + 219.0 * real'($urandom_range(1000)) / 1000.0) / 256.0;
      end
      for (int k = 0; k < 3; k++) begin
        c[k] = quant(u[k], sc.win);
        ue[k] = real'(c[k]) / real'(1 << sc.win);
      end
      model(sc, ue, e, m);
      if (m[M_BYPASS] || m[M_OFF])
        tol = (sc.win == sc.wout) ? 0.0 : 0.5;
      else if (m[M_GAMMA])
        tol = 0.5 + 2.5e-3 * real'(1 << sc.wout);
      else
        tol = 0.6 + 4.0e-4 * real'(1 << sc.wout);
      for (int r = 0; r <= sc.rep; r++) tick(1'b1, 1'b0, vs, c, e, tol, m);
    end
    blank(15 * (sc.rep + 1) + 2 + 20, vs);
  endtask

  task automatic scenario(input scen_t s, input int lines);
    configure(s);
    for (int l = 0; l < lines; l++) video_line(48, l == 0);
    blank(400, 1'b0);
  endtask

  function automatic scen_t S(input int ci, fi, ri, co, fo, ro, wi, wo, rep, sbs, en, grey);
    scen_t s;
    s.cs_in = ci; s.fmt_in = fi; s.rng_in = ri; s.cs_out = co; s.fmt_out = fo; s.rng_out = ro;
    s.win = wi; s.wout = wo; s.rep = rep; s.sbs = sbs; s.en = en; s.grey = grey;
    return s;
  endfunction

  initial begin
    icscen = 1'b1; idata = '0; idataen = 1'b0; ihsync = 1'b0; ivsync = 1'b0;
    iaddr = '0; iwrite_en = 1'b0; iwdata = '0; isel = 1'b0; iscanen = 1'b0; iscanin = 1'b0;
    sc = S(0, 0, 0, 0, 0, 0, 8, 8, 0, 0, 1, 0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // scan port: oscanout follows iscanin only while iscanen is high
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) begin iscanen = 1'(i % 2); iscanin = 1'(i / 2 % 2); end
      @(negedge clk);
      checks++;
      if (oscanout !== (iscanen & iscanin)) begin failures++; $display("FAIL scan"); end
      mcount[M_SCAN]++;
    end
    iscanen = 1'b0;

    //        cs_in fmt rng cs_out fmt rng win wout rep sbs en grey
    scenario(S(2, 1, 1,   2, 1, 1,   10, 10, 0, 0, 1, 0), 4);  // identical spaces: bypass
    scenario(S(2, 2, 1,   2, 0, 0,   10,  8, 0, 0, 1, 0), 4);  // 709 4:2:2 limited -> RGB full
    scenario(S(5, 0, 0,   2, 2, 1,    8, 10, 0, 0, 1, 0), 4);  // sRGB -> 709 4:2:2 (gamma change)
    scenario(S(3, 1, 1,   2, 0, 0,   12, 12, 0, 0, 1, 0), 4);  // BT.2020 -> BT.709 RGB
    scenario(S(2, 0, 0,   4, 1, 1,   10, 10, 0, 0, 1, 0), 4);  // BT.709 RGB -> BT.2020 CL
    scenario(S(4, 2, 1,   3, 1, 1,   10, 10, 0, 0, 1, 0), 4);  // BT.2020 CL 4:2:2 -> NCL
    scenario(S(2, 2, 1,   2, 2, 0,    8,  8, 1, 1, 1, 0), 4);  // 3D, repeated, 4:2:2 both sides
    scenario(S(6, 0, 0,   5, 0, 1,   16, 16, 0, 0, 1, 1), 4);  // opRGB -> sRGB limited (greys)
    scenario(S(2, 2, 1,   2, 0, 0,   12, 12, 0, 0, 0, 0), 4);  // icscen low
    scenario(S(1, 1, 0,   0, 0, 0,    8,  8, 3, 0, 1, 1), 3);  // 625 -> 525 primaries, px_rep 3
    scenario(S(4, 1, 1,   4, 1, 0,   10, 10, 0, 0, 1, 0), 4);  // CL limited -> CL full
    scenario(S(2, 1, 0,   2, 2, 1,   14, 12, 9, 1, 1, 0), 2);  // 3D 4:2:2 out, px_rep 9

    for (int k = 0; k < M_N; k++) begin
      $display("mechanism %-18s : %0d", mname[k], mcount[k]);
      checks++;
      if (mcount[k] == 0) begin failures++; $display("FAIL mechanism %s never exercised", mname[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
