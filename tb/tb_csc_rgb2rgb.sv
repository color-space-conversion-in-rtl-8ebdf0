// tb_csc_rgb2rgb: checks the RGB to RGB gamut conversion.
//  * BT.2020 -> BT.709 against the matrix published in ITU-R BT.2087
//    (4 decimals), for random colours;
//  * neutral greys stay neutral for every one of the 25 ordered primary pairs (all
//    spaces share the D65 white);
//  * out-of-gamut results clamp to 0 / 2^24-1; bypass passes data unchanged;
//  * latency of 5 cycles, with de/hsync/vsync travelling with the data.
module tb_csc_rgb2rgb;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  en;
  prim_e src, dst;
  vid_t  vin, vout;
  csc_rgb2rgb dut (.clk, .rst_n, .en, .src, .dst, .vin, .vout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one pixel, wait for it at the output (5 cycles) and return it.
  task automatic run(input vid_t p, output vid_t o);
    @(negedge clk) vin = p;
    @(negedge clk) vin = '0;
    repeat (4) @(negedge clk);
    o = vout;
  endtask

  task automatic check(input string what, input longint got, input longint exp, input longint tol);
    checks++;
    if (iabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  real m709 [9] = '{1.6605, -0.5876, -0.0728, -0.1246, 1.1329, -0.0083, -0.0182, -0.1006, 1.1187};

  initial begin
    vid_t p, o;
    real  x [3];
    vin = '0; en = 1'b0; src = P_2020; dst = P_709;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // latency and syncs
    en = 1'b1;
    @(negedge clk) vin = '{de: 1'b1, hs: 1'b1, vs: 1'b0, c1: 24'h400000, c2: 24'h400000, c3: 24'h400000};
    @(negedge clk) vin = '0;
    for (int i = 1; i <= 6; i++) begin
      checks++;
      if ((vout.de == 1'b1) != (i == 5)) begin failures++; $display("FAIL latency at %0d", i); end
      if (i == 5 && (vout.hs != 1'b1 || vout.vs != 1'b0)) begin failures++; $display("FAIL sync"); end
      @(negedge clk);
    end

    // BT.2020 -> BT.709 with random colours
    for (int n = 0; n < 200; n++) begin
      // colours near grey, whose image stays inside the BT.709 gamut
      for (int c = 0; c < 3; c++) x[c] = 0.4 + 0.2 * real'($urandom_range(1000)) / 1000.0;
      p = '0; p.de = 1'b1;
      p.c1 = 24'(to24(x[0])); p.c2 = 24'(to24(x[1])); p.c3 = 24'(to24(x[2]));
      run(p, o);
      check("2020->709 R", o.c1, to24(clip01(m709[0]*x[0] + m709[1]*x[1] + m709[2]*x[2])), 4000);
      check("2020->709 G", o.c2, to24(clip01(m709[3]*x[0] + m709[4]*x[1] + m709[5]*x[2])), 4000);
      check("2020->709 B", o.c3, to24(clip01(m709[6]*x[0] + m709[7]*x[1] + m709[8]*x[2])), 4000);
    end

    // greys are preserved for every pair of primaries
    for (int s = 0; s < NPRIM; s++)
      for (int d = 0; d < NPRIM; d++) begin
        longint g;
        g = 64'($urandom_range(16000000, 100000));
        src = prim_e'(s); dst = prim_e'(d);
        @(negedge clk);
        p = '0; p.c1 = 24'(g); p.c2 = 24'(g); p.c3 = 24'(g);
        run(p, o);
        check("grey R", o.c1, g, 64);
        check("grey G", o.c2, g, 64);
        check("grey B", o.c3, g, 64);
      end

    // saturated BT.2020 green is outside BT.709: R and B clamp to 0
    src = P_2020; dst = P_709;
    @(negedge clk);
    p = '0; p.c2 = 24'hFFFFFF;
    run(p, o);
    check("clamp R", o.c1, 0, 0);
    check("clamp G", o.c2, 24'hFFFFFF, 0);
    check("clamp B", o.c3, 0, 0);

    // bypass
    en = 1'b0;
    @(negedge clk);
    p = '0; p.c1 = 24'h123456; p.c2 = 24'hABCDEF; p.c3 = 24'h0F0F0F;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h123456, 24'hABCDEF, 24'h0F0F0F}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
