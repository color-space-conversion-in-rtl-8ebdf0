// tb_csc_chroma_upsampler: self-checking testbench for the 4:2:2 to 4:4:4 chroma upsampler.
// Two instances are tested side by side, the default 30th-order filter and
// the 18th-order variant, on the same stimulus.  Lines of random chroma (with
// random junk on the odd pixels, which must be ignored), an impulse line and
// a flat line are sent with every pixel repeated px_rep+1 times, in 2D and in
// 3D side-by-side mode (two fields of half_hactive pixels, even and odd
// field widths), with the shortest allowed blanking and with long blanking.
// The reference model is written here from the filter definition: even
// output pixels are the received samples, odd ones the symmetric sum of the
// received neighbours weighted by twice the half-band odd taps (tap values
// written out below), with replication of the first and last received sample
// of each field.  Every output cycle is compared exactly: channel 1 and the
// syncs must equal the input delayed by HALF*(px_rep+1)+2 cycles, the chroma
// must equal the model for the pixel that left at that cycle, and during
// blanking the chroma must hold.  The bypass (en low) must be a one-cycle
// delay.
module tb_csc_chroma_upsampler;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int MAXT = 400000;
  localparam int HALFS [2] = '{15, 9};
  localparam int TAPS [2][8] = '{
    '{5310421, -1655583, 866712, -500940, 289425, -158498, 78166, -35399},
    '{5213823, -1460987, 607786, -235975, 69657, 0, 0, 0}};

  logic        en, sbs;
  logic [3:0]  px_rep;
  logic [12:0] half_hactive;
  vid_t        vin, vout [2];

  csc_chroma_upsampler #(.ORDER(30)) dut30 (.clk, .rst_n, .en, .px_rep, .sbs, .half_hactive,
                             .vin, .vout(vout[0]));
  csc_chroma_upsampler #(.ORDER(18)) dut18 (.clk, .rst_n, .en, .px_rep, .sbs, .half_hactive,
                             .vin, .vout(vout[1]));

  initial begin
    repeat (MAXT - 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus history and expected chroma, indexed by input cycle
  vid_t   hist [MAXT];
  longint e2 [2][MAXT];
  longint e3 [2][MAXT];
  chan_t  last2 [2], last3 [2];
  int     cyc = 0;
  int     nlines = 0, nodd = 0, nsbs = 0, nrep = 0;

  function automatic longint rnd24(input longint v);
    return (v + 8388608) >>> 24;
  endfunction

  function automatic int pick(input int j, input int L);
    return (j < 0) ? 0 : (j >= L) ? L - 1 : j;
  endfunction

  // Expected chroma of field pixel p (field samples xs[0..L-1]).
  function automatic longint ref_px(input int g, input longint xs [], input int L, input int p,
                                    input longint lo, input longint hi);
    longint s [];
    longint acc, v;
    s = new[L];
    // odd pixels carry no chroma: they take the preceding even sample
    for (int j = 0; j < L; j++) s[j] = (j % 2 == 1) ? xs[j - 1] : xs[j];
    if (p % 2 == 0) return s[p];
    acc = 0;
    for (int k = 0; k < (HALFS[g] + 1) / 2; k++)
      acc += 2 * longint'(TAPS[g][k]) * (s[pick(p - 2 * k - 1, L)] + s[pick(p + 2 * k + 1, L)]);
    v = rnd24(acc);
    return (v < 0) ? 0 : (v > 16777215) ? 16777215 : v;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  // Compare both outputs with the delayed stimulus and the model.
  task automatic check_outputs();
    for (int g = 0; g < 2; g++) begin
      int lat, i;
      lat = en ? HALFS[g] * (int'(px_rep) + 1) + 2 : 1;
      i = cyc - lat;
      if (i >= 0) begin
        check("de/hs/vs", {vout[g].de, vout[g].hs, vout[g].vs}, {hist[i].de, hist[i].hs, hist[i].vs});
        check("c1", vout[g].c1, hist[i].c1);
        if (!en) begin
          check("bypass c2", vout[g].c2, hist[i].c2);
          check("bypass c3", vout[g].c3, hist[i].c3);
        end else if (hist[i].de) begin
          check("c2", vout[g].c2, e2[g][i]);
          check("c3", vout[g].c3, e3[g][i]);
        end else begin
          check("c2 hold", vout[g].c2, last2[g]);
          check("c3 hold", vout[g].c3, last3[g]);
        end
      end
      last2[g] = vout[g].c2;
      last3[g] = vout[g].c3;
    end
  endtask

  task automatic drive(input vid_t p, input longint a2, input longint a3, input longint b2, input longint b3);
    @(negedge clk);
    check_outputs();
    vin = p;
    hist[cyc] = p;
    e2[0][cyc] = a2; e3[0][cyc] = a3;
    e2[1][cyc] = b2; e3[1][cyc] = b3;
    cyc++;
  endtask

  // One line of n pixels; h > 0 selects side-by-side with fields of h pixels.
  // pattern 0 random, 1 impulse, 2 flat.
  task automatic line(input int n, input int h, input int blank, input int pattern);
    longint x2 [], x3 [], f2 [], f3 [];
    longint r2 [2][], r3 [2][];
    chan_t  c1 [];
    logic   vsv;
    longint lo, hi;
    x2 = new[n]; x3 = new[n]; c1 = new[n];
    for (int g = 0; g < 2; g++) begin r2[g] = new[n]; r3[g] = new[n]; end
    for (int i = 0; i < n; i++) begin
      c1[i] = chan_t'($urandom);
      case (pattern)
        1: begin x2[i] = (i == n / 2) ? 64'd8388608 : 64'd0; x3[i] = (i == n / 2 + 1) ? 64'd12582912 : 64'd4194304; end
        2: begin x2[i] = 64'd9000000; x3[i] = 64'd123457; end
        default: begin x2[i] = longint'(chan_t'($urandom)); x3[i] = longint'(chan_t'($urandom)); end
      endcase
    end
    lo = 0; hi = 16777215;
    for (int f = 0; f < ((h > 0) ? 2 : 1); f++) begin
      int s0, L;
      s0 = (f == 0) ? 0 : h;
      L = (h > 0) ? ((f == 0) ? h : n - h) : n;
      f2 = new[L]; f3 = new[L];
      for (int j = 0; j < L; j++) begin f2[j] = x2[s0 + j]; f3[j] = x3[s0 + j]; end
      for (int g = 0; g < 2; g++)
        for (int j = 0; j < L; j++) begin
          r2[g][s0 + j] = ref_px(g, f2, L, j, lo, hi);
          r3[g][s0 + j] = ref_px(g, f3, L, j, lo, hi);
        end
    end
    vsv = 1'($urandom);
    for (int i = 0; i < n; i++)
      for (int r = 0; r <= int'(px_rep); r++)
        drive('{de: 1'b1, hs: 1'b0, vs: vsv, c1: c1[i], c2: chan_t'(x2[i]), c3: chan_t'(x3[i])},
              r2[0][i], r3[0][i], r2[1][i], r3[1][i]);
    for (int b = 0; b < blank; b++)
      drive('{de: 1'b0, hs: (b < 4), vs: vsv, c1: chan_t'($urandom), c2: chan_t'($urandom), c3: chan_t'($urandom)},
            0, 0, 0, 0);
    nlines++;
    if (px_rep != 0) nrep++;
    if (h > 0) nsbs++;
    if (h % 2 == 1 || n % 2 == 1) nodd++;
  endtask

  task automatic idle(input int n);
    for (int b = 0; b < n; b++) drive('0, 0, 0, 0, 0);
  endtask

  initial begin
    int n, h, minblank;
    vin = '0; en = 1'b1; sbs = 1'b0; px_rep = 4'd0; half_hactive = 13'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // impulse and flat lines, 2D, no repetition
    line(64, 0, 40, 1);
    line(64, 0, 40, 2);
    line(63, 0, 40, 0);

    for (int it = 0; it < 36; it++) begin
      idle(170);                       // let the filters drain before a change
      px_rep = ((it % 6) == 5) ? 4'd9 : 4'($urandom_range(3));
      sbs = (it % 3) != 0;
      half_hactive = 13'($urandom);
      minblank = 15 * (int'(px_rep) + 1) + 2;
      for (int l = 0; l < 3; l++) begin
        if (sbs) begin
          h = $urandom_range(34, 17);
          half_hactive = 13'(h);
          n = 2 * h;
        end else begin
          h = 0;
          n = $urandom_range(80, 33);
        end
        line(n, h, (l == 1) ? minblank : minblank + $urandom_range(30), (it == 7) ? 1 : (it == 8) ? 2 : 0);
      end
    end

    // bypass
    idle(170);
    en = 1'b0; px_rep = 4'd2; sbs = 1'b0;
    idle(2);
    line(40, 0, 10, 0);
    idle(5);

    checks++;
    if (nrep == 0 || nsbs == 0 || nodd == 0) begin
      failures++; $display("FAIL coverage: rep %0d sbs %0d odd %0d", nrep, nsbs, nodd);
    end
    $display("lines %0d (repeated %0d, side-by-side %0d, odd widths %0d), cycles %0d", nlines, nrep, nsbs, nodd, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
