// el_side_info_buf: per-layer neighbour side-information buffer for the CABAC
// entropy decoder in layer-interleaved (quality scalable) decoding.
//
// CABAC picks many contexts from the side information of the left and the
// upper macroblock (mb_type, skip flag, coded_block_pattern, chroma intra mode,
// and so on). A single-layer decoder keeps the left MB's information in a
// register and the row above in a line buffer. When the decoder alternates
// layers every MB, each layer needs its own copy. So this buffer holds, for
// each of NUM_LAYERS layers, one "left" register and one line of MB_W
// "top" entries. The lines share one dual-port SRAM, at address
// layer*MB_W + mb_x.
//
// Interface and timing:
//   rd_req with rd_layer/rd_mbx: one cycle later rd_valid pulses with
//     left_info = the last word written for that layer, and
//     top_info  = the word written for (layer, mb_x), i.e. the MB above when
//     MBs of a layer are written in raster order.
//   wr_req with wr_layer/wr_mbx/wdata: stores the current MB's side
//     information as the next MB's left neighbour and as the next row's top
//     neighbour, both for that layer.
//   A read and a write in the same cycle to the same place return the old word.
//   Availability (first column, first row, slice boundaries) is decided by the
//   entropy decoder, which knows the slice map.
// The side-information word is opaque here (SI_W bits).
// The need for per-layer side-information buffers is from the source design.
// What they hold, their size (MB_W = 120 MBs for a 1920-wide picture, SI_W)
// and this interface are this design's choice.
module el_side_info_buf #(
  parameter int NUM_LAYERS = 4,      // base layer + three quality enhancement layers
  parameter int MB_W       = 120,    // widest picture in MBs (1920 / 16)
  parameter int SI_W       = 16,     // bits of side information per MB
  parameter int LW         = $clog2(NUM_LAYERS),
  parameter int XW         = $clog2(MB_W),
  parameter int DEPTH      = NUM_LAYERS * MB_W,
  parameter int AW         = $clog2(DEPTH)
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rd_req,
  input  logic [LW-1:0]   rd_layer,
  input  logic [XW-1:0]   rd_mbx,
  output logic            rd_valid,
  output logic [SI_W-1:0] left_info,
  output logic [SI_W-1:0] top_info,
  input  logic            wr_req,
  input  logic [LW-1:0]   wr_layer,
  input  logic [XW-1:0]   wr_mbx,
  input  logic [SI_W-1:0] wdata
);

  logic [SI_W-1:0] left_q [NUM_LAYERS];
  logic [AW-1:0]   raddr, waddr;

  assign raddr = AW'(int'(rd_layer) * MB_W + int'(rd_mbx));
  assign waddr = AW'(int'(wr_layer) * MB_W + int'(wr_mbx));

  dp_sram #(.DW(SI_W), .DEPTH(DEPTH)) u_top_line (
    .clk, .we(wr_req), .waddr, .wdata,
    .re(rd_req), .raddr, .rdata(top_info)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid  <= 1'b0;
      left_info <= '0;
      for (int l = 0; l < NUM_LAYERS; l++) left_q[l] <= '0;
    end else begin
      rd_valid <= rd_req;
      if (rd_req) left_info <= left_q[rd_layer];
      if (wr_req) left_q[wr_layer] <= wdata;
    end
  end

endmodule
