// tb_csc_rgb2ycc_range: checks R'G'B' to Y'CrCb' conversion with output range
// scaling for the BT.601, BT.709 and BT.2020 matrices and the full, limited
// and extended ranges (random colours, reference from the luma weights and the
// colour-difference definitions), clamping of out-of-range values, the RGB
// range-only mode, bypass, and the 9-cycle latency with the syncs.
module tb_csc_rgb2ycc_range;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ycc_mode_e mode;
  range_e    rng;
  vid_t      vin, vout;
  csc_rgb2ycc_range dut (.clk, .rst_n, .mode, .rng, .vin, .vout);

  localparam int LAT = 9;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input vid_t p, output vid_t o);
    @(negedge clk) vin = p;
    @(negedge clk) vin = '0;
    repeat (LAT - 1) @(negedge clk);
    o = vout;
  endtask

  task automatic check(input string what, input longint got, input longint exp, input longint tol);
    checks++;
    if (iabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint lim(input real v, input longint lo, input longint hi);
    longint c;
    c = longint'($floor(v + 0.5));
    if (c < lo) return lo;
    if (c > hi) return hi;
    return c;
  endfunction

  initial begin
    vid_t p, o;
    real r, g, b, y, cr, cb, s;
    longint lo, hy, hc;
    vin = '0; mode = Y_BYPASS; rng = RNG_FULL;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // latency and sync propagation
    mode = Y_601;
    @(negedge clk) vin = '{de: 1'b1, hs: 1'b0, vs: 1'b1, c1: 24'h100000, c2: 24'h200000, c3: 24'h300000};
    @(negedge clk) vin = '0;
    for (int i = 1; i <= LAT + 1; i++) begin
      checks++;
      if ((vout.de == 1'b1) != (i == LAT) || (vout.vs == 1'b1) != (i == LAT)) begin
        failures++; $display("FAIL latency at %0d", i);
      end
      @(negedge clk);
    end

    for (int m = 0; m < 3; m++)
      for (int rg = 0; rg < 3; rg++) begin
        mode = ycc_mode_e'(Y_601 + m); rng = range_e'(rg);
        s  = (rg == 0) ? ONE : 65536.0;
        lo = (rg == 0) ? 0 : (rg == 1) ? 16 * 65536 : 65536;
        hy = (rg == 0) ? 16777215 : (rg == 1) ? 235 * 65536 : 255 * 65536 - 1;
        hc = (rg == 0) ? 16777215 : (rg == 1) ? 240 * 65536 : 255 * 65536 - 1;
        for (int n = 0; n < 100; n++) begin
          p = '0;
          p.c1 = 24'($urandom); p.c2 = 24'($urandom); p.c3 = 24'($urandom);
          if (n == 0) begin p.c1 = '1; p.c2 = '1; p.c3 = '1; end
          if (n == 1) begin p.c1 = '0; p.c2 = '0; p.c3 = '0; end
          if (n == 2) begin p.c1 = '1; p.c2 = '0; p.c3 = '0; end
          r = real'(p.c1) / ONE; g = real'(p.c2) / ONE; b = real'(p.c3) / ONE;
          y  = kr(m) * r + (1.0 - kr(m) - kb(m)) * g + kb(m) * b;
          cr = (r - y) / (2.0 * (1.0 - kr(m)));
          cb = (b - y) / (2.0 * (1.0 - kb(m)));
          run(p, o);
          if (rg == 0) begin
            check("Y full",  o.c1, lim(y * ONE, 0, hy), 4);
            check("Cr full", o.c2, lim(cr * ONE + 8388608.0, 0, hc), 4);
            check("Cb full", o.c3, lim(cb * ONE + 8388608.0, 0, hc), 4);
          end else begin
            check("Y lim",  o.c1, lim((219.0 * y + 16.0) * s, lo, hy), 4);
            check("Cr lim", o.c2, lim((224.0 * cr + 128.0) * s, lo, hc), 4);
            check("Cb lim", o.c3, lim((224.0 * cb + 128.0) * s, lo, hc), 4);
          end
        end
      end

    // limited-range clamp: an input above 1.0 cannot be built, but white must
    // land exactly on 235 and black on 16
    mode = Y_709; rng = RNG_LIMITED;
    p = '0; p.c1 = '0; p.c2 = '0; p.c3 = '0;
    run(p, o);
    check("black Y", o.c1, 16 * 65536, 1);
    check("black Cr", o.c2, 128 * 65536, 1);

    // RGB range-only mode
    mode = Y_RANGE; rng = RNG_LIMITED;
    p = '0; p.c1 = 24'h800000; p.c2 = 24'hFFFFFF; p.c3 = 24'h000000;
    run(p, o);
    check("rgb lim R", o.c1, lim((219.0 * 0.5 + 16.0) * 65536.0, 0, 16777215), 2);
    check("rgb lim G", o.c2, 235 * 65536, 2);
    check("rgb lim B", o.c3, 16 * 65536, 0);

    // bypass
    mode = Y_BYPASS;
    p = '0; p.c1 = 24'h123456; p.c2 = 24'h789ABC; p.c3 = 24'hDEF012;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h123456, 24'h789ABC, 24'hDEF012}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
