// tb_csc_ycc2rgb_range_cl_y: self-checking testbench for the BT.2020
// constant-luminance Y to G stage.
// Random linear R, G, B are turned into (Y, R, B) here in real arithmetic and
// fed to the block, which must return R and B unchanged and G within 8 LSB
// (the quantisation of Y is amplified by 1/0.678).  A luminance too low for
// the given R and B must clamp G to zero.  Also checked: the 5-cycle latency
// of data, de and syncs, and the bypass.
module tb_csc_ycc2rgb_range_cl_y;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 5;
  logic en;
  vid_t vin, vout;
  csc_ycc2rgb_range_cl_y dut (.clk, .rst_n, .en, .vin, .vout);
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
    real r, g, b, y;
    vin = '0; en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_latency();
    for (int n = 0; n < 300; n++) begin
      r = real'($urandom_range(10000)) / 10000.0;
      g = real'($urandom_range(10000)) / 10000.0;
      b = real'($urandom_range(10000)) / 10000.0;
      y = 0.2627 * r + 0.6780 * g + 0.0593 * b;
      p = '0; p.c1 = 24'(to24(y)); p.c2 = 24'(to24(r)); p.c3 = 24'(to24(b));
      run(p, o);
      check("R", o.c1, p.c2, 0);
      check("G", o.c2, to24(g), 8);
      check("B", o.c3, p.c3, 0);
    end
    // luminance too low for the given R and B: G clamps to 0
    p = '0; p.c1 = 24'(to24(0.05)); p.c2 = 24'(to24(1.0)); p.c3 = 24'(to24(1.0));
    run(p, o);
    check("G clamp", o.c2, 0, 0);
    en = 1'b0;
    p = '0; p.c1 = 24'h111111; p.c2 = 24'h222222; p.c3 = 24'h333333;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h111111, 24'h222222, 24'h333333}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
