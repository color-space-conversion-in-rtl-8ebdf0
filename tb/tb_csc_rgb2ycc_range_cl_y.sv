// tb_csc_rgb2ycc_range_cl_y: self-checking testbench for the BT.2020
// constant-luminance RGB to Y stage.
// Random linear R, G, B (and full white) are applied one at a time; the
// output must carry Y = 0.2627 R + 0.6780 G + 0.0593 B (within 2 LSB of the
// real-valued result) on channel 1 and pass R and B unchanged on channels 2
// and 3.  Also checked: the 2-cycle latency of data, de and syncs, and that
// en low passes the pixel through untouched.
module tb_csc_rgb2ycc_range_cl_y;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 2;
  logic en;
  vid_t vin, vout;
  csc_rgb2ycc_range_cl_y dut (.clk, .rst_n, .en, .vin, .vout);
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
    real r, g, b;
    vin = '0; en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_latency();
    for (int n = 0; n < 300; n++) begin
      p = '0; p.c1 = 24'($urandom); p.c2 = 24'($urandom); p.c3 = 24'($urandom);
      if (n == 0) begin p.c1 = '1; p.c2 = '1; p.c3 = '1; end
      r = real'(p.c1) / ONE; g = real'(p.c2) / ONE; b = real'(p.c3) / ONE;
      run(p, o);
      check("Y", o.c1, to24(0.2627 * r + 0.6780 * g + 0.0593 * b), 2);
      check("R", o.c2, p.c1, 0);
      check("B", o.c3, p.c3, 0);
    end
    en = 1'b0;
    p = '0; p.c1 = 24'h111111; p.c2 = 24'h222222; p.c3 = 24'h333333;
    run(p, o);
    check("bypass", {o.c1, o.c2, o.c3}, {24'h111111, 24'h222222, 24'h333333}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
