// tb_csc_regbank: self-checking testbench for the configuration registers.
// Random legal values are written to every field through the slave port and
// read back; the testbench checks that the read data appears exactly one
// clock after the read request, that the cfg outputs follow the writes, that
// unused bits and unmapped addresses read as zero, that the status register
// reports the valid flag (cleared by an illegal code) and the written flag
// (set by any write, cleared by reading the status), that cycles without sel
// change nothing, and that reset clears the bank.
module tb_csc_regbank;
  import csc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       sel, write_en;
  logic [7:0] addr, wdata, rdata;
  cfg_t       cfg;
  csc_regbank dut (.clk, .rst_n, .sel, .write_en, .addr, .wdata, .rdata, .cfg);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sel = 1'b1; write_en = 1'b1; addr = a; wdata = d; end
    @(negedge clk) begin sel = 1'b0; write_en = 1'b0; wdata = $urandom; end
  endtask

  // Read: the data is taken just after the clock edge that samples the
  // request and must stay unchanged while sel is low.
  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk) begin sel = 1'b1; write_en = 1'b0; addr = a; end
    @(posedge clk);
    #1 d = rdata;
    @(negedge clk) begin sel = 1'b0; addr = $urandom; end
    checks++;
    if (rdata !== d) begin failures++; $display("FAIL rdata not held"); end
  endtask

  function automatic logic [7:0] field(input int a);
    case (a)
      0: return {6'd0, cfg.range_in};
      1: return {6'd0, cfg.range_out};
      2: return {4'd0, cfg.cspace_in};
      3: return {4'd0, cfg.cspace_out};
      4: return {6'd0, cfg.chroma_in};
      5: return {6'd0, cfg.chroma_out};
      6: return {5'd0, cfg.width_in};
      7: return {5'd0, cfg.width_out};
      8: return {4'd0, cfg.px_rep};
      9: return cfg.half_hactive[7:0];
      10: return {3'd0, cfg.half_hactive[12:8]};
      11: return {4'd0, cfg.s3d_structure};
      12: return {7'd0, cfg.s3d_enable};
      default: return 8'd0;
    endcase
  endfunction

  function automatic logic [7:0] legal(input int a);
    case (a)
      0, 1, 4, 5: return 8'($urandom_range(2)) | 8'($urandom_range(3) << 2);  // junk in unused bits
      2, 3: return 8'($urandom_range(9));
      6, 7: return 8'($urandom_range(4));
      8: return 8'($urandom_range(9));
      default: return 8'($urandom);
    endcase
  endfunction

  function automatic logic [7:0] mask(input int a);
    case (a)
      0, 1, 4, 5: return 8'h03;
      2, 3, 8, 11: return 8'h0F;
      6, 7: return 8'h07;
      9: return 8'hFF;
      10: return 8'h1F;
      12: return 8'h01;
      default: return 8'h00;
    endcase
  endfunction

  initial begin
    logic [7:0] d, model[13];
    sel = 0; write_en = 0; addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 13; a++) check("reset cfg", field(a), 0);
    rd(8'h0F, d);
    check("status after reset", d, 8'h01);

    // exact one-cycle read latency with a value that differs from the last
    wr(8'h09, 8'hA5);
    rd(8'h00, d);
    @(negedge clk) begin sel = 1'b1; write_en = 1'b0; addr = 8'h09; end
    checks++;
    if (rdata === 8'hA5) begin failures++; $display("FAIL read data early"); end
    @(posedge clk); #1;
    checks++;
    if (rdata !== 8'hA5) begin failures++; $display("FAIL read data late"); end
    @(negedge clk) sel = 1'b0;

    for (int it = 0; it < 40; it++) begin
      for (int a = 0; a < 13; a++) begin
        model[a] = legal(a);
        wr(8'(a), model[a]);
        check("cfg field", field(a), model[a] & mask(a));
      end
      // idle cycles and unselected writes change nothing
      @(negedge clk) begin sel = 1'b0; write_en = 1'b1; addr = 8'(it % 13); wdata = ~model[it % 13]; end
      @(negedge clk) write_en = 1'b0;
      for (int k = 0; k < 13; k++) begin
        int a;
        a = $urandom_range(12);
        rd(8'(a), d);
        check("readback", d, model[a] & mask(a));
      end
      rd(8'h0F, d);
      check("status valid+written", d, 8'h03);
      rd(8'h0F, d);
      check("status written cleared", d, 8'h01);
      rd(8'($urandom_range(255, 16)), d);
      check("unmapped", d, 0);
      rd(8'h0D, d);
      check("unmapped 0D", d, 0);
    end

    // illegal codes clear the valid flag
    wr(8'h02, 8'd12);
    rd(8'h0F, d);
    check("status invalid cspace", d, 8'h02);
    wr(8'h02, 8'd2);
    wr(8'h08, 8'd10);
    rd(8'h0F, d);
    check("status invalid px_rep", d, 8'h02);
    wr(8'h08, 8'd9);
    wr(8'h06, 8'd5);
    rd(8'h0F, d);
    check("status invalid width", d, 8'h02);
    wr(8'h06, 8'd4);
    wr(8'h00, 8'd3);
    rd(8'h0F, d);
    check("status invalid range", d, 8'h02);
    wr(8'h00, 8'd1);
    rd(8'h0F, d);
    check("status valid again", d, 8'h03);

    // asynchronous reset
    #3 rst_n = 1'b0;
    #1 check("async reset", field(9), 0);
    @(negedge clk) rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
