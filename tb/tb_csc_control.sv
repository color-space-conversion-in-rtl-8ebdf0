// tb_csc_control: self-checking testbench for the control unit.
// Directed cases give the expected stage modes for typical conversions
// (BT.709 4:2:2 limited to BT.2020 constant luminance, sRGB to opRGB,
// range-only changes, identical spaces, converter disabled).  Random register
// contents are then checked against properties that must always hold: the
// filters follow the 4:2:2 flags, the RGB to RGB matrix only runs between
// different primaries and always inside the gamma decode/encode pair, the
// constant luminance stages come in matched pairs, side-by-side 3D is
// recognised from structures 8 and 3, and the widths, clamp limits and
// repetition count are passed on.  The outputs must follow a register change
// exactly one clock later.
module tb_csc_control;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  cfg_t cfg;
  ctl_t ctl;
  csc_control dut (.clk, .rst_n, .en, .cfg, .ctl);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply a configuration and check the one-clock update.
  task automatic apply(input cfg_t cf, input logic e);
    ctl_t prev;
    @(negedge clk);
    prev = ctl;
    cfg = cf; en = e;
    #1 check("no combinational path", ctl, prev);
    @(negedge clk);
  endtask

  function automatic cfg_t mk(input cspace_e ci, input chroma_e fi, input range_e ri,
                              input cspace_e co, input chroma_e fo, input range_e ro);
    cfg_t cf;
    cf = '0;
    cf.cspace_in = ci; cf.chroma_in = fi; cf.range_in = ri;
    cf.cspace_out = co; cf.chroma_out = fo; cf.range_out = ro;
    return cf;
  endfunction

  initial begin
    cfg_t cf;
    en = 1'b1; cfg = '0;
    repeat (3) @(negedge clk);
    check("reset win", ctl.win, 8);
    rst_n = 1'b1;

    // BT.709 limited 4:2:2 in, BT.2020 CL full 4:4:4 out
    cf = mk(CS_BT709, FMT_YCC422, RNG_LIMITED, CS_BT2020_CL, FMT_YCC444, RNG_FULL);
    apply(cf, 1'b1);
    check("cl up_en", ctl.up_en, 1);
    check("cl dn_en", ctl.dn_en, 0);
    check("cl y2r_mode", ctl.y2r_mode, Y_709);
    check("cl y2r_rng", ctl.y2r_rng, RNG_LIMITED);
    check("cl y2r_cl_en", ctl.y2r_cl_en, 0);
    check("cl gdec", ctl.gdec, G_BT);
    check("cl y2g_en", ctl.y2g_en, 0);
    check("cl r2r_en", ctl.r2r_en, 1);
    check("cl r2r_src", ctl.r2r_src, P_709);
    check("cl r2r_dst", ctl.r2r_dst, P_2020);
    check("cl r2y_cl_en", ctl.r2y_cl_en, 1);
    check("cl genc", ctl.genc, G_BT);
    check("cl r2c_cl_en", ctl.r2c_cl_en, 1);
    check("cl r2y_mode", ctl.r2y_mode, Y_BYPASS);
    check("cl cmax", ctl.cmax, 24'hFFFFFF);

    // BT.2020 CL 4:2:2 in, BT.2020 NCL out, limited: CL decode side only
    cf = mk(CS_BT2020_CL, FMT_YCC422, RNG_LIMITED, CS_BT2020, FMT_YCC422, RNG_LIMITED);
    apply(cf, 1'b1);
    check("cl2ncl up/dn", {ctl.up_en, ctl.dn_en}, 2'b11);
    check("cl2ncl y2r_cl_en", ctl.y2r_cl_en, 1);
    check("cl2ncl y2r_mode", ctl.y2r_mode, Y_BYPASS);
    check("cl2ncl y2g_en", ctl.y2g_en, 1);
    check("cl2ncl r2r_en", ctl.r2r_en, 0);
    check("cl2ncl gdec/genc", {ctl.gdec, ctl.genc}, {G_BT, G_BT});
    check("cl2ncl r2y_mode", ctl.r2y_mode, Y_2020);
    check("cl2ncl cmin", ctl.cmin, 16 * 65536);
    check("cl2ncl cmax", ctl.cmax, 240 * 65536);

    // sRGB full RGB to opRGB full RGB: linear path with RGB to RGB matrix
    cf = mk(CS_SRGB, FMT_RGB444, RNG_FULL, CS_OPRGB, FMT_RGB444, RNG_FULL);
    apply(cf, 1'b1);
    check("op y2r", ctl.y2r_mode, Y_BYPASS);
    check("op gdec", ctl.gdec, G_SRGB);
    check("op r2r", {ctl.r2r_en, ctl.r2r_src, ctl.r2r_dst}, {1'b1, P_709, P_OPRGB});
    check("op genc", ctl.genc, G_OPRGB);
    check("op r2y", ctl.r2y_mode, Y_BYPASS);

    // BT.709 RGB limited to BT.709 YCC 4:4:4 full: no linearisation
    cf = mk(CS_BT709, FMT_RGB444, RNG_LIMITED, CS_BT709, FMT_YCC444, RNG_FULL);
    apply(cf, 1'b1);
    check("rng y2r", ctl.y2r_mode, Y_RANGE);
    check("rng gdec", ctl.gdec, G_BYPASS);
    check("rng r2r", ctl.r2r_en, 0);
    check("rng r2y", ctl.r2y_mode, Y_709);

    // BT.601 YCC to BT.709 YCC: same primaries family differs (525 vs 709)
    cf = mk(CS_XVYCC601, FMT_YCC444, RNG_LIMITED, CS_XVYCC709, FMT_YCC444, RNG_LIMITED);
    apply(cf, 1'b1);
    check("xv y2r", ctl.y2r_mode, Y_601);
    check("xv r2y", ctl.r2y_mode, Y_709);
    check("xv gdec", ctl.gdec, G_BYPASS);

    // identical spaces: everything bypassed, filters still follow the format
    cf = mk(CS_BT709, FMT_YCC422, RNG_LIMITED, CS_BT709, FMT_YCC444, RNG_LIMITED);
    apply(cf, 1'b1);
    check("same y2r", ctl.y2r_mode, Y_BYPASS);
    check("same r2y", ctl.r2y_mode, Y_BYPASS);
    check("same gamma", {ctl.gdec, ctl.genc}, 0);
    check("same up", ctl.up_en, 1);

    // disabled converter: every stage off
    cf = mk(CS_BT709, FMT_YCC422, RNG_LIMITED, CS_OPRGB, FMT_YCC422, RNG_FULL);
    apply(cf, 1'b0);
    check("off", {ctl.up_en, ctl.dn_en, ctl.y2r_mode, ctl.y2r_cl_en, ctl.gdec, ctl.y2g_en,
                  ctl.r2r_en, ctl.r2y_cl_en, ctl.genc, ctl.r2c_cl_en, ctl.r2y_mode}, 0);

    // random configurations against invariants
    for (int n = 0; n < 3000; n++) begin
      logic e, same, in_ycc, out_ycc;
      cf = '0;
      cf.range_in = range_e'($urandom_range(2));   cf.range_out = range_e'($urandom_range(2));
      cf.cspace_in = cspace_e'($urandom_range(9)); cf.cspace_out = cspace_e'($urandom_range(9));
      cf.chroma_in = chroma_e'($urandom_range(2)); cf.chroma_out = chroma_e'($urandom_range(2));
      cf.width_in = 3'($urandom_range(4));         cf.width_out = 3'($urandom_range(4));
      cf.px_rep = 4'($urandom);
      cf.half_hactive = 13'($urandom);
      cf.s3d_structure = ($urandom_range(1)) ? (($urandom_range(1)) ? 4'd8 : 4'd3) : 4'($urandom);
      cf.s3d_enable = 1'($urandom);
      e = ($urandom_range(9) != 0);
      apply(cf, e);
      in_ycc = cf.chroma_in != FMT_RGB444;
      out_ycc = cf.chroma_out != FMT_RGB444;
      same = !e || (cf.cspace_in == cf.cspace_out && in_ycc == out_ycc && cf.range_in == cf.range_out);
      check("up_en", ctl.up_en, e && cf.chroma_in == FMT_YCC422);
      check("dn_en", ctl.dn_en, e && cf.chroma_out == FMT_YCC422);
      check("sbs", ctl.sbs, cf.s3d_enable && (cf.s3d_structure == 8 || cf.s3d_structure == 3));
      check("px_rep", ctl.px_rep, (cf.px_rep > 9) ? 9 : cf.px_rep);
      check("half_hactive", ctl.half_hactive, cf.half_hactive);
      check("win", ctl.win, 8 + 2 * cf.width_in);
      check("wout", ctl.wout, 8 + 2 * cf.width_out);
      check("cmin", ctl.cmin, (cf.range_out == RNG_FULL) ? 0 : (cf.range_out == RNG_LIMITED) ? 16 * 65536 : 65536);
      if (same) begin
        check("same bypass", {ctl.y2r_mode, ctl.y2r_cl_en, ctl.gdec, ctl.y2g_en, ctl.r2r_en,
                              ctl.r2y_cl_en, ctl.genc, ctl.r2c_cl_en, ctl.r2y_mode}, 0);
      end else begin
        // RGB to RGB only between different primaries, inside the linear pair
        checks++;
        if (ctl.r2r_en && (ctl.gdec == G_BYPASS || ctl.genc == G_BYPASS || ctl.r2r_src == ctl.r2r_dst)) begin
          failures++; $display("FAIL r2r outside linear section");
        end
        check("gamma pair", ctl.gdec == G_BYPASS, ctl.genc == G_BYPASS);
        // constant luminance stages come in pairs and exclude the matrices
        check("cl in pair", ctl.y2r_cl_en, ctl.y2g_en);
        check("cl out pair", ctl.r2c_cl_en, ctl.r2y_cl_en);
        check("cl in", ctl.y2r_cl_en, in_ycc && cf.cspace_in == CS_BT2020_CL);
        check("cl out", ctl.r2c_cl_en, out_ycc && cf.cspace_out == CS_BT2020_CL);
        if (ctl.y2r_cl_en) check("cl in matrix off", ctl.y2r_mode, Y_BYPASS);
        if (ctl.r2c_cl_en) check("cl out matrix off", ctl.r2y_mode, Y_BYPASS);
        if (ctl.y2g_en || ctl.r2y_cl_en) check("cl linear", ctl.gdec != G_BYPASS, 1);
        if (in_ycc && !ctl.y2r_cl_en) check("ycc in matrix", ctl.y2r_mode >= Y_601, 1);
        if (out_ycc && !ctl.r2c_cl_en) check("ycc out matrix", ctl.r2y_mode >= Y_601, 1);
        if (!in_ycc) check("rgb in", ctl.y2r_mode, (cf.range_in == RNG_FULL) ? Y_BYPASS : Y_RANGE);
        if (!out_ycc) check("rgb out", ctl.r2y_mode, (cf.range_out == RNG_FULL) ? Y_BYPASS : Y_RANGE);
        check("y2r_rng", ctl.y2r_rng, cf.range_in);
        check("r2y_rng", ctl.r2y_rng, cf.range_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
