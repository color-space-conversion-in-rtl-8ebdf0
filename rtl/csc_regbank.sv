// csc_regbank: configuration registers of the colour space converter.
//
// Each configuration field is held in flip-flops wired straight to the control
// unit (output cfg).  Access is a simple synchronous slave port: with sel and
// write_en high, wdata is stored at addr on the clock edge; with sel high and
// write_en low, the addressed register is returned on rdata one cycle later.
// Register map (8-bit registers, unused bits read as zero):
//   0x00 range_in [1:0]     0x01 range_out [1:0]   (0 full, 1 limited, 2 extended)
//   0x02 cspace_in [3:0]    0x03 cspace_out [3:0]  (codes of csc_pkg::cspace_e)
//   0x04 chroma_in [1:0]    0x05 chroma_out [1:0]  (0 RGB 4:4:4, 1 YCC 4:4:4, 2 YCC 4:2:2)
//   0x06 width_in [2:0]     0x07 width_out [2:0]   (0..4 = 8, 10, 12, 14, 16 bits)
//   0x08 px_rep [3:0]       (0..9 repetitions of every pixel)
//   0x09 half_hactive[7:0]  0x0A half_hactive[12:8] (pixels per 3D field)
//   0x0B 3D_structure [3:0] (8 = side-by-side half, 3 = side-by-side full)
//   0x0C 3D_enable [0]
//   0x0F status, read only: bit 0 valid (every field holds a legal code),
//        bit 1 written (set by any write, cleared by reading the status)
// The list of fields follows the thesis; the addresses, codes, flags and the
// port timing are this design's choice.  Reset (asynchronous, active low)
// clears every register, which selects a full-range BT.601 RGB pass-through.
module csc_regbank
  import csc_pkg::*;
#(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  input  logic          write_en,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output cfg_t          cfg
);
  localparam logic [ADDR_W-1:0] A_STATUS = ADDR_W'(8'h0F);

  cfg_t r;
  logic written;
  logic valid;

  assign valid = (r.range_in <= RNG_EXTENDED) && (r.range_out <= RNG_EXTENDED)
              && (r.cspace_in <= CS_XVYCC709) && (r.cspace_out <= CS_XVYCC709)
              && (r.chroma_in <= FMT_YCC422) && (r.chroma_out <= FMT_YCC422)
              && (r.width_in <= 3'd4) && (r.width_out <= 3'd4) && (r.px_rep <= 4'd9);

  function automatic logic [7:0] read_reg(input logic [ADDR_W-1:0] a);
    case (a)
      ADDR_W'(8'h00): return {6'd0, r.range_in};
      ADDR_W'(8'h01): return {6'd0, r.range_out};
      ADDR_W'(8'h02): return {4'd0, r.cspace_in};
      ADDR_W'(8'h03): return {4'd0, r.cspace_out};
      ADDR_W'(8'h04): return {6'd0, r.chroma_in};
      ADDR_W'(8'h05): return {6'd0, r.chroma_out};
      ADDR_W'(8'h06): return {5'd0, r.width_in};
      ADDR_W'(8'h07): return {5'd0, r.width_out};
      ADDR_W'(8'h08): return {4'd0, r.px_rep};
      ADDR_W'(8'h09): return r.half_hactive[7:0];
      ADDR_W'(8'h0A): return {3'd0, r.half_hactive[12:8]};
      ADDR_W'(8'h0B): return {4'd0, r.s3d_structure};
      ADDR_W'(8'h0C): return {7'd0, r.s3d_enable};
      A_STATUS:   return {6'd0, written, valid};
      default:    return 8'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r       <= '0;
      written <= 1'b0;
      rdata   <= '0;
    end else if (sel && write_en) begin
      written <= 1'b1;
      case (addr)
        ADDR_W'(8'h00): r.range_in      <= range_e'(wdata[1:0]);
        ADDR_W'(8'h01): r.range_out     <= range_e'(wdata[1:0]);
        ADDR_W'(8'h02): r.cspace_in     <= cspace_e'(wdata[3:0]);
        ADDR_W'(8'h03): r.cspace_out    <= cspace_e'(wdata[3:0]);
        ADDR_W'(8'h04): r.chroma_in     <= chroma_e'(wdata[1:0]);
        ADDR_W'(8'h05): r.chroma_out    <= chroma_e'(wdata[1:0]);
        ADDR_W'(8'h06): r.width_in      <= wdata[2:0];
        ADDR_W'(8'h07): r.width_out     <= wdata[2:0];
        ADDR_W'(8'h08): r.px_rep        <= wdata[3:0];
        ADDR_W'(8'h09): r.half_hactive[7:0]  <= wdata[7:0];
        ADDR_W'(8'h0A): r.half_hactive[12:8] <= wdata[4:0];
        ADDR_W'(8'h0B): r.s3d_structure <= wdata[3:0];
        ADDR_W'(8'h0C): r.s3d_enable    <= wdata[0];
        default: ;
      endcase
    end else if (sel) begin
      rdata <= DATA_W'(read_reg(addr));
      if (addr == A_STATUS) written <= 1'b0;
    end
  end

  assign cfg = r;
endmodule
