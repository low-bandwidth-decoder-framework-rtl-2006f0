// padding_engine: MB-level on-the-fly padding engine. It runs in the third
// MB-pipeline stage of base-layer decoding, next to the deblocking filter. To avoid
// waiting for macroblocks not yet decoded, it does not pad the current macroblock's
// own 8x8 blocks but the four 8x8 blocks around its top-left corner (bottom-right of
// TL, bottom-left of T, top-right of L, top-left of C), whose neighbours are all
// decoded by then.
//
// Operation: a start pulse loads the twelve boundary lines (pad_boundary_buf) from
// the deblocking/pipelined data and the V0 line read from external memory; the
// loaded V4 line is offered on v4_* for storage as the V0 of the macroblock below.
// Then the padding filter produces one 8-pixel row per cycle, blocks B0..B3 in
// order, 32 cycles in all; rows of blocks that need padding are presented on out_*
// for writing to external memory, where the upsampling engine later reads them.
// done pulses together with the last row; the engine takes 33 cycles per
// macroblock (one load cycle, 32 row cycles). With left_edge set, the two left
// blocks lie outside the picture and are not written. The split into boundary buffer and filter, the line assignment and
// the up-left data flow are the document's; the timing is this design's.
module padding_engine
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       left_edge,   // C is in the first MB column: B0 and B2 lie outside the picture
  input  logic       tl_intra, t_intra, l_intra, c_intra,
  input  line4_t     a, b, c, d, e, f, g, h, i, j, k, l, m, n, o, p, q,
  input  line4_t     v0_ext,
  output logic       v4_we,
  output line4_t     v4_data,
  output logic       busy,
  output logic       done,
  output logic       out_we,
  output logic [1:0] out_blk,     // 0: TL quadrant, 1: T, 2: L, 3: C
  output logic [2:0] out_row,
  output pix_t       out_pix [8]
);

  line4_t vl [6], hl [6];
  logic   mode_tl, mode_t, mode_l, mode_c, edge_q;
  logic   run;
  logic [4:0] cnt;               // {block, row}

  pad_boundary_buf u_buf (
    .clk, .rst_n, .load(start && !run),
    .tl_intra, .t_intra, .l_intra, .c_intra,
    .a, .b, .c, .d, .e, .f, .g, .h, .i, .j, .k, .l, .m, .n, .o, .p, .q,
    .v0_ext, .vl, .hl
  );

  logic need;
  pix_t fpix [8];

  pad_filter u_filter (
    .blk(cnt[4:3]), .row(cnt[2:0]),
    .tl_intra(mode_tl), .t_intra(mode_t), .l_intra(mode_l), .c_intra(mode_c),
    .vl(vl[0:3]), .hl(hl[0:3]), .need, .pix(fpix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      cnt     <= '0;
      mode_tl <= 1'b0;
      mode_t  <= 1'b0;
      mode_l  <= 1'b0;
      mode_c  <= 1'b0;
      edge_q  <= 1'b0;
      v4_we   <= 1'b0;
      done    <= 1'b0;
      out_we  <= 1'b0;
      out_blk <= '0;
      out_row <= '0;
      for (int x = 0; x < 8; x++) out_pix[x] <= '0;
    end else begin
      v4_we  <= start && !run;
      done   <= 1'b0;
      out_we <= 1'b0;
      if (start && !run) begin
        run     <= 1'b1;
        cnt     <= '0;
        mode_tl <= tl_intra;
        mode_t  <= t_intra;
        mode_l  <= l_intra;
        mode_c  <= c_intra;
        edge_q  <= left_edge;
      end else if (run) begin
        out_we  <= need && !(edge_q && !cnt[3]);
        out_blk <= cnt[4:3];
        out_row <= cnt[2:0];
        out_pix <= fpix;
        cnt     <= cnt + 5'd1;
        if (cnt == 5'd31) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign v4_data = vl[4];
  assign busy    = run;

endmodule
