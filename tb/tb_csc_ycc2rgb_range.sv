// tb_csc_ycc2rgb_range: checks Y'CrCb' to R'G'B' conversion with input range
// scaling.  Random in-gamut R'G'B' colours are turned into Y'CrCb' codes with
// the floating-point standard formulas (full, limited and extended ranges;
// BT.601, BT.709, BT.2020) and the block must return the original colour.
// Also: out-of-gamut Y'CrCb' clamps to [0, 2^24-1], the RGB range-only mode,
// bypass and the 7-cycle latency with the syncs.
module tb_csc_ycc2rgb_range;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ycc_mode_e mode;
  range_e    rng;
  vid_t      vin, vout;
  csc_ycc2rgb_range dut (.clk, .rst_n, .mode, .rng, .vin, .vout);

  localparam int LAT = 7;

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

  initial begin
    vid_t p, o;
    real r, g, b, y, cr, cb;
    vin = '0; mode = Y_BYPASS; rng = RNG_FULL;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    mode = Y_709;
    @(negedge clk) vin = '{de: 1'b1, hs: 1'b1, vs: 1'b0, c1: 24'h800000, c2: 24'h800000, c3: 24'h800000};
    @(negedge clk) vin = '0;
    for (int i = 1; i <= LAT + 1; i++) begin
      checks++;
      if ((vout.de == 1'b1) != (i == LAT) || (vout.hs == 1'b1) != (i == LAT)) begin
        failures++; $display("FAIL latency at %0d", i);
      end
      @(negedge clk);
    end

    for (int m = 0; m < 3; m++)
      for (int rg = 0; rg < 3; rg++) begin
        mode = ycc_mode_e'(Y_601 + m); rng = range_e'(rg);
        for (int n = 0; n < 100; n++) begin
          r = real'($urandom_range(1000)) / 1000.0;
          g = real'($urandom_range(1000)) / 1000.0;
          b = real'($urandom_range(1000)) / 1000.0;
          y  = kr(m) * r + (1.0 - kr(m) - kb(m)) * g + kb(m) * b;
          cr = (r - y) / (2.0 * (1.0 - kr(m)));
          cb = (b - y) / (2.0 * (1.0 - kb(m)));
          p = '0;
          if (rg == 0) begin
            p.c1 = 24'(to24(y)); p.c2 = 24'(to24(cr + 0.5)); p.c3 = 24'(to24(cb + 0.5));
          end else begin
            p.c1 = 24'(longint'((219.0 * y + 16.0) * 65536.0 + 0.5));
            p.c2 = 24'(longint'((224.0 * cr + 128.0) * 65536.0 + 0.5));
            p.c3 = 24'(longint'((224.0 * cb + 128.0) * 65536.0 + 0.5));
          end
          run(p, o);
          check("R", o.c1, to24(r), 24);
          check("G", o.c2, to24(g), 24);
          check("B", o.c3, to24(b), 24);
        end
      end

    // black with maximum Cr: red positive, green negative -> clamped to 0
    mode = Y_601; rng = RNG_LIMITED;
    p = '0; p.c1 = 24'(16 * 65536); p.c2 = 24'(240 * 65536); p.c3 = 24'(128 * 65536);
    run(p, o);
    check("oog R", o.c1, to24(1.402 * 0.5), 64);
    check("oog G", o.c2, 0, 0);
    // white with maximum Cb: blue above 1.0 -> clamped to 2^24-1
    p = '0; p.c1 = 24'(235 * 65536); p.c2 = 24'(128 * 65536); p.c3 = 24'(240 * 65536);
    run(p, o);
    check("oog B", o.c3, 16777215, 0);

    mode = Y_RANGE; rng = RNG_LIMITED;
    p = '0; p.c1 = 24'(16 * 65536); p.c2 = 24'(235 * 65536); p.c3 = 24'(125 * 65536);
    run(p, o);
    check("range R", o.c1, 0, 0);
    check("range G", o.c2, to24(1.0), 2);
    check("range B", o.c3, to24(109.0 / 219.0), 2);

    mode = Y_BYPASS;
    p = '0; p.c1 = 24'h123456; p.c2 = 24'h789ABC; p.c3 = 24'hDEF012;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h123456, 24'h789ABC, 24'hDEF012}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
