// tb_csc_rgb2ycc_range_cl_crcb: self-checking testbench for the BT.2020
// constant-luminance R'B' to Cr'Cb' stage.
// Random Y', R', B' in both output ranges (full, limited) are compared with
// the standard's formulas: Cr' = (R'-Y')/1.7184 for negative differences and
// /0.9936 for positive ones, Cb' likewise with 1.9404 and 1.5816, offset and
// scaled to the output range and clamped to its legal codes (within 3 LSB).
// The testbench counts both signs to be sure each divisor was used, and
// checks the 4-cycle latency and the bypass.
module tb_csc_rgb2ycc_range_cl_crcb;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 4;
  logic   en;
  range_e rng;
  vid_t   vin, vout;
  csc_rgb2ycc_range_cl_crcb dut (.clk, .rst_n, .en, .rng, .vin, .vout);
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

  task automatic check_latency();
    @(negedge clk) vin = '{de: 1'b1, hs: 1'b1, vs: 1'b1, c1: 24'h400000, c2: 24'h300000, c3: 24'h200000};
    @(negedge clk) vin = '0;
    for (int i = 1; i <= LAT + 1; i++) begin
      checks++;
      if ((vout.de == 1'b1) != (i == LAT) || (vout.hs == 1'b1) != (i == LAT) || (vout.vs == 1'b1) != (i == LAT)) begin
        failures++; $display("FAIL latency at %0d", i);
      end
      @(negedge clk);
    end
  endtask

  function automatic longint code(input real v, input bit chroma, input int rg);
    real c;
    if (rg == 0) c = chroma ? (v + 0.5) * ONE : v * ONE;
    else         c = chroma ? (224.0 * v + 128.0) * 65536.0 : (219.0 * v + 16.0) * 65536.0;
    c = $floor(c + 0.5);
    if (rg == 0 && c > 16777215.0) c = 16777215.0;
    if (rg == 0 && c < 0.0) c = 0.0;
    if (rg == 1 && c > (chroma ? 240.0 : 235.0) * 65536.0) c = (chroma ? 240.0 : 235.0) * 65536.0;
    if (rg == 1 && c < 16.0 * 65536.0) c = 16.0 * 65536.0;
    return longint'(c);
  endfunction

  initial begin
    vid_t p, o;
    real y, r, b, dr, db;
    int  npos, nneg;
    vin = '0; en = 1'b1; rng = RNG_FULL;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_latency();
    npos = 0; nneg = 0;
    for (int rg = 0; rg < 2; rg++) begin
      rng = range_e'(rg);
      for (int n = 0; n < 200; n++) begin
        y = real'($urandom_range(10000)) / 10000.0;
        r = real'($urandom_range(10000)) / 10000.0;
        b = real'($urandom_range(10000)) / 10000.0;
        dr = r - y; db = b - y;
        if (dr > 0.0) npos++; else nneg++;
        p = '0; p.c1 = 24'(to24(y)); p.c2 = 24'(to24(r)); p.c3 = 24'(to24(b));
        run(p, o);
        check("Y",  o.c1, code(y, 1'b0, rg), 2);
        check("Cr", o.c2, code((dr <= 0.0) ? dr / 1.7184 : dr / 0.9936, 1'b1, rg), 3);
        check("Cb", o.c3, code((db <= 0.0) ? db / 1.9404 : db / 1.5816, 1'b1, rg), 3);
      end
    end
    checks++;
    if (npos == 0 || nneg == 0) begin failures++; $display("FAIL sign coverage"); end
    en = 1'b0;
    p = '0; p.c1 = 24'h111111; p.c2 = 24'h222222; p.c3 = 24'h333333;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h111111, 24'h222222, 24'h333333}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
