// tb_csc_ycc2rgb_range_cl_crcb: self-checking testbench for the BT.2020
// constant-luminance Cr'Cb' to R'B' stage.
// Random Y', R', B' whose colour differences lie within +-0.5 are encoded
// here with the standard's sign-dependent divisors, in full and in limited
// range, and sent through the block, which must return Y', R' and B' within
// a few LSB at 24 bits.  Also checked: the 2-cycle latency of data, de and
// syncs, and the bypass.
module tb_csc_ycc2rgb_range_cl_crcb;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 2;
  logic   en;
  range_e rng;
  vid_t   vin, vout;
  csc_ycc2rgb_range_cl_crcb dut (.clk, .rst_n, .en, .rng, .vin, .vout);
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

  initial begin
    vid_t p, o;
    real y, r, b, cr, cb;
    vin = '0; en = 1'b1; rng = RNG_FULL;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_latency();
    for (int rg = 0; rg < 2; rg++) begin
      rng = range_e'(rg);
      for (int n = 0; n < 200; n++) begin
        // draw until the colour difference signals are inside +-0.5
        do begin
          y = real'($urandom_range(10000)) / 10000.0;
          r = real'($urandom_range(10000)) / 10000.0;
          b = real'($urandom_range(10000)) / 10000.0;
          cr = (r - y <= 0.0) ? (r - y) / 1.7184 : (r - y) / 0.9936;
          cb = (b - y <= 0.0) ? (b - y) / 1.9404 : (b - y) / 1.5816;
        end while (cr > 0.5 || cr < -0.5 || cb > 0.5 || cb < -0.5);
        p = '0;
        if (rg == 0) begin
          p.c1 = 24'(to24(y)); p.c2 = 24'(to24(cr + 0.5)); p.c3 = 24'(to24(cb + 0.5));
        end else begin
          p.c1 = 24'(longint'((219.0 * y + 16.0) * 65536.0 + 0.5));
          p.c2 = 24'(longint'((224.0 * cr + 128.0) * 65536.0 + 0.5));
          p.c3 = 24'(longint'((224.0 * cb + 128.0) * 65536.0 + 0.5));
        end
        run(p, o);
        check("Y", o.c1, to24(y), 2);
        check("R", o.c2, to24(r), 4);
        check("B", o.c3, to24(b), 4);
      end
    end
    en = 1'b0;
    p = '0; p.c1 = 24'h111111; p.c2 = 24'h222222; p.c3 = 24'h333333;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h111111, 24'h222222, 24'h333333}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
