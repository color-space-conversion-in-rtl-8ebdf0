// tb_csc_roundtrip: image round trip through two converters, RGB 4:4:4 ->
// Y'CrCb 4:2:2 -> RGB 4:4:4, for both chroma filter orders.
//
// This is the picture-quality experiment of the converter: a first csc_top
// turns full-range 16-bit BT.601-525 RGB into limited-range 16-bit Y'CrCb
// 4:2:2 (matrix, range compression, half-band downsampler) and a second one
// turns it back (half-band upsampler, range expansion, inverse matrix).  Two
// such chains run side by side, one built with 30th-order filters and one
// with 18th-order filters, on the same input.  Three test images are sent,
// generated here: a flat colour, a smooth image of low-frequency sinusoids
// and a random texture, each a few lines of 256 pixels.
//
// Checks:
//   * data enable comes out exactly 2*(42 + ORDER/2 + 1) cycles after it went
//     in: 116 with 30th-order and 104 with 18th-order filters (each converter
//     has 42 cycles of pixel stages, and its one active filter adds
//     ORDER/2 + 1 at px_rep 0);
//   * a flat colour comes back within 4 LSB everywhere, borders included,
//     since the filters pass DC exactly and replicate the borders;
//   * the smooth image comes back with a PSNR of at least 40 dB;
//   * the texture, whose chroma detail above a quarter of the pixel rate is
//     removed by design, still comes back above 12 dB.
// The PSNR of each image and filter order is printed.  Register writes use
// one select line per converter; both chains get the same configuration.
module tb_csc_roundtrip;
  import csc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W   = 256;   // active pixels per line
  localparam int HB  = 64;    // blanking clocks per line
  localparam int LAT = 2 * (42 + 16);       // the longer chain, order 30
  function automatic int lat_of(input int k);
    return 2 * (42 + ((k == 0) ? 30 : 18) / 2 + 1);
  endfunction
  localparam int MAXT = 20000;

  logic        idataen, ihsync, ivsync, iwrite_en, sel_enc, sel_dec;
  logic [47:0] idata;
  logic [7:0]  iaddr, iwdata;

  // index 0: 30th-order filters, index 1: 18th-order filters
  logic [47:0] mid_d [2], out_d [2];
  logic        mid_de [2], mid_hs [2], mid_vs [2], out_de [2], out_hs [2], out_vs [2];
  logic [7:0]  rd_e [2], rd_d [2];
  logic        so_e [2], so_d [2];

  for (genvar k = 0; k < 2; k++) begin : g_chain
    localparam int ORD = (k == 0) ? 30 : 18;
    csc_top #(.FILTER_ORDER(ORD)) u_enc (
      .ipixclk(clk), .icscrst_n(rst_n), .icscen(1'b1),
      .idata, .idataen, .ihsync, .ivsync,
      .iaddr, .iwrite_en, .iwdata, .isel(sel_enc), .ordata(rd_e[k]),
      .iscanen(1'b0), .iscanin(1'b0), .oscanout(so_e[k]),
      .odata(mid_d[k]), .odataen(mid_de[k]), .ohsync(mid_hs[k]), .ovsync(mid_vs[k]));
    csc_top #(.FILTER_ORDER(ORD)) u_dec (
      .ipixclk(clk), .icscrst_n(rst_n), .icscen(1'b1),
      .idata(mid_d[k]), .idataen(mid_de[k]), .ihsync(mid_hs[k]), .ivsync(mid_vs[k]),
      .iaddr, .iwrite_en, .iwdata, .isel(sel_dec), .ordata(rd_d[k]),
      .iscanen(1'b0), .iscanin(1'b0), .oscanout(so_d[k]),
      .odata(out_d[k]), .odataen(out_de[k]), .ohsync(out_hs[k]), .ovsync(out_vs[k]));
  end

  initial begin
    repeat (MAXT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input history, indexed by cycle, and per-image error statistics.
  logic        h_de  [MAXT];
  logic [47:0] h_pix [MAXT];
  int          h_img [MAXT];
  int          cyc = 0;
  real         sq  [3][2];
  int          n   [3][2];
  int          worst_flat [2];

  // Compare what leaves each chain with what entered lat_of(k) cycles earlier.
  task automatic check_out();
    for (int k = 0; k < 2; k++) begin
      logic de_exp;
      int   t;
      t = cyc - lat_of(k);
      de_exp = (t >= 0) ? h_de[t] : 1'b0;
      checks++;
      if (out_de[k] !== de_exp) begin
        failures++;
        if (failures < 20) $display("FAIL order %0d cycle %0d: data enable %b, expected %b",
                                    k ? 18 : 30, cyc, out_de[k], de_exp);
      end
      if (de_exp && out_de[k]) begin
        for (int c = 0; c < 3; c++) begin
          int a, b, d;
          a = int'(h_pix[t][47-16*c -: 16]);
          b = int'(out_d[k][47-16*c -: 16]);
          d = a - b;
          sq[h_img[t]][k] += real'(d) * real'(d);
          n[h_img[t]][k]++;
          if (h_img[t] == 0) begin
            if (d < 0) d = -d;
            if (d > worst_flat[k]) worst_flat[k] = d;
            checks++;
            if (d > 4) begin
              failures++;
              if (failures < 20) $display("FAIL order %0d flat colour channel %0d: %0d vs %0d",
                                          k ? 18 : 30, c, b, a);
            end
          end
        end
      end
    end
  endtask

  task automatic tick(input logic de, input logic hs, input logic [47:0] pix, input int img);
    @(negedge clk);
    check_out();
    idataen = de; ihsync = hs; ivsync = 1'b0; idata = pix;
    h_de[cyc] = de; h_pix[cyc] = pix; h_img[cyc] = img;
    cyc++;
  endtask

  task automatic blank(input int nclk);
    for (int b = 0; b < nclk; b++) tick(1'b0, b >= 4 && b < 12, 48'($urandom), 0);
  endtask

  task automatic wr(input logic enc, input logic [7:0] a, input logic [7:0] d);
    sel_enc = enc; sel_dec = !enc; iwrite_en = 1'b1; iaddr = a; iwdata = d;
    blank(1);
    sel_enc = 1'b0; sel_dec = 1'b0; iwrite_en = 1'b0;
  endtask

  function automatic logic [15:0] c16(input real v);
    if (v < 0.0) return 16'd0;
    if (v > 65535.0) return 16'hFFFF;
    return 16'($rtoi(v + 0.5));
  endfunction

  // Pixel x of line y of image img.
  function automatic logic [47:0] pixel(input int img, input int x, input int y);
    real pi, r, g, b;
    pi = 3.14159265358979;
    case (img)
      0: return {16'd45000, 16'd20000, 16'd52000};
      1: begin
        r = 32768.0 + 22000.0 * $sin(2.0 * pi * x / 48.0 + 0.7 * y);
        g = 32768.0 + 18000.0 * $sin(2.0 * pi * x / 64.0 + 1.3) + 6000.0 * $cos(2.0 * pi * x / 32.0);
        b = 32768.0 + 24000.0 * $cos(2.0 * pi * x / 40.0 - 0.4 * y);
        return {c16(r), c16(g), c16(b)};
      end
      default: return 48'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    real psnr;
    idataen = 1'b0; ihsync = 1'b0; ivsync = 1'b0; idata = '0;
    iwrite_en = 1'b0; sel_enc = 1'b0; sel_dec = 1'b0; iaddr = '0; iwdata = '0;
    for (int i = 0; i < 3; i++) for (int k = 0; k < 2; k++) begin sq[i][k] = 0.0; n[i][k] = 0; end
    worst_flat = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // encoder: RGB 4:4:4 full range -> Y'CrCb 4:2:2 limited range, BT.601-525, 16 bits
    wr(1'b1, 8'h00, 8'd0); wr(1'b1, 8'h01, 8'd1);
    wr(1'b1, 8'h04, 8'd0); wr(1'b1, 8'h05, 8'd2);
    // decoder: the reverse
    wr(1'b0, 8'h00, 8'd1); wr(1'b0, 8'h01, 8'd0);
    wr(1'b0, 8'h04, 8'd2); wr(1'b0, 8'h05, 8'd0);
    for (int e = 0; e < 2; e++) begin
      wr(e[0], 8'h02, 8'd0); wr(e[0], 8'h03, 8'd0);
      wr(e[0], 8'h06, 8'd4); wr(e[0], 8'h07, 8'd4);
      wr(e[0], 8'h09, 8'(W)); wr(e[0], 8'h0A, 8'(W >> 8));
    end
    blank(LAT + 20);

    for (int img = 0; img < 3; img++)
      for (int y = 0; y < 4; y++) begin
        for (int x = 0; x < W; x++) tick(1'b1, 1'b0, pixel(img, x, y), img);
        blank(HB);
      end
    blank(LAT + 10);

    for (int img = 0; img < 3; img++)
      for (int k = 0; k < 2; k++) begin
        psnr = 10.0 * $log10(65535.0 * 65535.0 * n[img][k] / ((sq[img][k] > 0.0) ? sq[img][k] : 1.0));
        $display("image %0s, order %0d filters: %0d samples, PSNR %0.2f dB",
                 img == 0 ? "flat" : img == 1 ? "smooth" : "texture", k ? 18 : 30, n[img][k], psnr);
        checks++;
        if (n[img][k] != 3 * 4 * W) begin
          failures++; $display("FAIL image %0d order %0d: %0d samples came back", img, k, n[img][k]);
        end
        checks++;
        if ((img == 1 && psnr < 40.0) || (img == 2 && psnr < 12.0)) begin
          failures++; $display("FAIL image %0d order %0d: PSNR too low", img, k);
        end
      end
    $display("flat colour: worst error %0d / %0d LSB (orders 30 / 18)", worst_flat[0], worst_flat[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
