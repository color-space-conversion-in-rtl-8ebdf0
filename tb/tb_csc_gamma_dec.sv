// tb_csc_gamma_dec: self-checking testbench for the gamma decoder (EOTF: non-linear to linear).
// Every one of the 65536 16-bit input codes is streamed through the block,
// one per clock, for each of the three transfer curves (BT.709/601/2020,
// sRGB, opRGB), with random values in the 8 discarded low bits. Each output
// is compared with the exact curve evaluated in real arithmetic and rounded
// to 16 bits; the allowed error is 1 LSB, the bound of the piecewise-linear
// table with its exact-value patch. The testbench also checks the 2-cycle
// latency of data and syncs, the bypass mode and that the output low 8 bits
// are zero.
module tb_csc_gamma_dec;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 2;
  localparam int TOL = 1;

  gamma_e mode;
  vid_t   vin, vout;
  csc_gamma_dec dut (.clk, .rst_n, .mode, .vin, .vout);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected 16-bit code for a 16-bit input code.
  function automatic longint ref16(input int g, input int c);
    real r;
    r = eotf(g, real'(c) / 65535.0) * 65535.0 + 0.5;
    if (r < 0.0) r = 0.0;
    if (r > 65535.0) r = 65535.0;
    return longint'($floor(r));
  endfunction

  // Input history so that outputs can be checked LAT cycles later.
  vid_t hist[$];
  int   worst;

  initial begin
    vid_t p, o;
    vin = '0; mode = G_BYPASS;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // latency of the sync signals and data
    mode = G_BT;
    @(negedge clk) vin = '{de: 1'b1, hs: 1'b1, vs: 1'b1, c1: 24'h800000, c2: 24'h800000, c3: 24'h800000};
    @(negedge clk) vin = '0;
    for (int i = 1; i <= LAT + 1; i++) begin
      checks++;
      if ((vout.de == 1'b1) != (i == LAT) || (vout.hs == 1'b1) != (i == LAT)
          || (vout.vs == 1'b1) != (i == LAT)) begin
        failures++; $display("FAIL latency at %0d", i);
      end
      @(negedge clk);
    end

    for (int g = 0; g < 3; g++) begin
      mode = gamma_e'(g + 1);
      worst = 0;
      hist.delete();
      for (int c = 0; c < 65536 + LAT; c++) begin
        p = '0;
        if (c < 65536) begin
          p.de = 1'b1;
          p.c1 = {16'(c), 8'($urandom)};
          p.c2 = {16'(65535 - c), 8'($urandom)};
          p.c3 = {16'($urandom), 8'($urandom)};
        end
        vin = p;
        hist.push_back(p);
        @(negedge clk);
        if (hist.size() >= LAT) begin
          p = hist.pop_front();
          o = vout;
          checks++;
          if (o.de !== p.de) begin failures++; $display("FAIL de mismatch"); end
          for (int k = 0; k < 3; k++) begin
            longint e, got;
            int x;
            x   = (k == 0) ? int'(p.c1[23:8]) : (k == 1) ? int'(p.c2[23:8]) : int'(p.c3[23:8]);
            got = (k == 0) ? longint'(o.c1) : (k == 1) ? longint'(o.c2) : longint'(o.c3);
            e   = ref16(g, x);
            checks++;
            if ((got & 255) != 0 || iabs((got >> 8) - e) > TOL) begin
              failures++;
              if (failures < 20) $display("FAIL curve %0d code %0d: got %0d expected %0d", g, x, got >> 8, e);
            end
            if (iabs((got >> 8) - e) > worst) worst = int'(iabs((got >> 8) - e));
          end
        end
      end
      $display("curve %0d: worst error %0d LSB", g, worst);
    end

    // bypass passes the full 24 bits untouched
    mode = G_BYPASS;
    @(negedge clk) vin = '{de: 1'b1, hs: 1'b0, vs: 1'b0, c1: 24'h123456, c2: 24'h789ABC, c3: 24'hDEF012};
    @(negedge clk) vin = '0;
    repeat (LAT - 1) @(negedge clk);
    checks++;
    if ({vout.c1, vout.c2, vout.c3} !== {24'h123456, 24'h789ABC, 24'hDEF012}) begin
      failures++; $display("FAIL bypass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
