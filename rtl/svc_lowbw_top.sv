// svc_lowbw_top: the low-bandwidth inter-layer prediction framework of a
// three-stage MB-pipeline SVC decoder.
//
// The expensive part of scalable decoding is moving inter-layer prediction (ILP)
// data through external memory. This top holds the blocks that remove that traffic:
//   * spatial scalability: the padding engine pads base-layer intra texture on the
//     fly in stage 3 while the base layer is decoded, and the upsampling engine
//     upsamples the base-layer texture or residual on line in stage 1 while the
//     enhancement layer is decoded, writing into the UP Data SRAM. Only padded
//     texture and base-layer residual cross the memory bus; the upsampled frame and
//     separate padding/upsampling passes disappear.
//   * quality scalability: the schedule controller interleaves the layers of each
//     macroblock, the Residual, UP Data and REC Data SRAMs are reconfigured so that
//     the lower layer's data of the same macroblock stays on chip, and the CABAC
//     context models of every layer live in the N-layer context SRAM behind a
//     context-model cache, and the neighbour side information of every layer
//     lives in the per-layer side-information buffer. The bitstream of every
//     layer is buffered separately so that the entropy decoder can resume each
//     layer's slice every macroblock.
// The standard H.264 decoder blocks around them (CABAD/CAVLD entropy decoder, IQ/IT
// texture decoder, MC/intra prediction engine, reconstruction, deblocking filter,
// system bus / memory controller) are outside this RTL; their
// connections are the ports below, grouped by block.
//
// Pipeline control: the schedule controller steps all stages together when every
// stage is ready. Stage 1 is ready when the entropy/texture decoder says so and the
// upsampling engine is idle; stage 3 when the deblocking filter is ready and the
// padding engine is idle. One cycle after a step, the upsampling engine starts if
// the new stage-1 job is an enhancement layer of a spatial frame and up_need is
// set, and the padding engine starts if the new stage-3 job is a base-layer
// macroblock of a spatial frame and pad_en is set. The step is also the bank swap
// of the three reconfigurable buffers.
module svc_lowbw_top
  import svc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // ---- frame control (system controller) ----
  input  logic        frame_start,
  input  logic        interleave,        // 1: quality scalability, layer-interleaved
  input  logic [2:0]  num_layers,
  input  logic [1:0]  layer,             // layer of a sequential (spatial/H.264) frame
  input  logic [15:0] num_mbs,
  output logic        frame_busy,
  output logic        frame_done,
  output mb_job_t     s1_job,
  output mb_job_t     s2_job,
  output mb_job_t     s3_job,
  output logic        s1_ilp,
  output logic        s3_top,
  output logic        step,
  output logic        res_bank,          // bank each buffer's producer writes
  output logic        upd_bank,
  output logic        rec_bank,
  // ---- stage readiness of the external decoder blocks ----
  input  logic        ed_td_ready,       // entropy + texture decoder done with s1_job
  input  logic        rec_ready,         // prediction engine + REC done with s2_job
  input  logic        db_ready,          // deblocking done with s3_job
  // ---- upsampling engine: job and base-layer data from the memory controller ----
  input  logic        up_need,           // the stage-1 EL macroblock uses ILP
  input  logic        up_ilrp,           // residual (1) or intra texture (0)
  input  logic        up_t8x8,
  input  logic        bl_ld_we,
  input  logic [4:0]  bl_ld_addr,
  input  sample_t     bl_ld_data [12],
  output logic        up_busy,
  output logic        up_done,
  // ---- padding engine: boundary data from the deblocking filter ----
  input  logic        pad_en,
  input  logic        pad_left_edge,
  input  logic        tl_intra, t_intra, l_intra, c_intra,
  input  line4_t      pad_lines [17],    // A..Q
  input  line4_t      pad_v0_ext,
  output logic        pad_v4_we,
  output line4_t      pad_v4_data,
  output logic        pad_we,
  output logic [1:0]  pad_blk,
  output logic [2:0]  pad_row,
  output pix_t        pad_pix [8],
  output logic        pad_busy,
  output logic        pad_done,
  // ---- Residual SRAM: texture decoder -> reconstruction ----
  input  logic        res_we,
  input  logic [6:0]  res_addr,
  input  logic [35:0] res_wdata,
  input  logic        res_ilp_re,
  input  logic [6:0]  res_ilp_addr,
  output logic [35:0] res_ilp_rdata,
  input  logic        res_c_re,
  input  logic [6:0]  res_c_addr,
  output logic [35:0] res_c_rdata,
  // ---- UP Data SRAM: upsampling engine or texture decoder -> reconstruction ----
  input  logic        upd_we,            // texture-decoder write (interleaved frames)
  input  logic [6:0]  upd_addr,
  input  logic [35:0] upd_wdata,
  input  logic        upd_ilp_re,
  input  logic [6:0]  upd_ilp_addr,
  output logic [35:0] upd_ilp_rdata,
  input  logic        upd_c_re,
  input  logic [6:0]  upd_c_addr,
  output logic [35:0] upd_c_rdata,
  // ---- REC Data SRAM: reconstruction -> deblocking ----
  input  logic        rec_we,
  input  logic [6:0]  rec_addr,
  input  logic [35:0] rec_wdata,
  input  logic        rec_ilp_re,
  input  logic [6:0]  rec_ilp_addr,
  output logic [35:0] rec_ilp_rdata,
  input  logic        rec_c_re,
  input  logic [6:0]  rec_c_addr,
  output logic [35:0] rec_c_rdata,
  // ---- CABAC context models (CABAD); the layer is that of the stage-1 job ----
  input  logic        ctx_req,
  input  logic        ctx_we,
  input  logic [8:0]  ctx_idx,
  input  logic [6:0]  ctx_wdata,
  output logic        ctx_ready,
  output logic        ctx_ack,
  output logic [6:0]  ctx_rdata,
  output logic        ctx_hit,
  // ---- neighbour side information per layer (CABAD); layer of the stage-1 job ----
  input  logic        si_rd,
  input  logic [6:0]  si_rd_mbx,
  output logic        si_valid,
  output logic [15:0] si_left,
  output logic [15:0] si_top,
  input  logic        si_wr,
  input  logic [6:0]  si_wr_mbx,
  input  logic [15:0] si_wdata,
  // ---- per-layer bitstream buffers: filled by the memory controller, read by
  //      the entropy decoder for the layer of the stage-1 job ----
  input  logic        bs_wr_en,
  input  logic [1:0]  bs_wr_layer,
  input  logic [31:0] bs_wr_data,
  input  logic        bs_rd_en,
  output logic        bs_rd_valid,
  output logic [31:0] bs_rd_data,
  output logic [3:0]  bs_empty,
  output logic [3:0]  bs_full,
  output logic [3:0]  bs_refill
);

  // ---------------- MB-pipeline schedule ----------------
  logic [2:0] stage_ready;
  logic       step_q;

  // no step in the cycle right after a step: the engines start in that cycle
  assign stage_ready = {3{!step_q}} & {db_ready && !pad_busy, rec_ready, ed_td_ready && !up_busy};

  layer_interleave_ctrl u_sched (
    .clk, .rst_n, .start(frame_start), .interleave, .num_layers, .layer, .num_mbs,
    .stage_ready, .s1_job, .s2_job, .s3_job, .s1_ilp, .s3_top, .step,
    .busy(frame_busy), .frame_done
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) step_q <= 1'b0;
    else        step_q <= step;

  // ---------------- upsampling engine (stage 1, spatial EL) ----------------
  logic       up_start, up_we;
  logic [6:0] up_addr;
  sample_t    up_data [4];

  assign up_start = step_q && s1_job.valid && !interleave && (s1_job.layer != 2'd0) && up_need;

  upsample_engine u_up (
    .clk, .rst_n,
    .ld_we(bl_ld_we), .ld_addr(bl_ld_addr), .ld_data(bl_ld_data),
    .start(up_start), .ilrp(up_ilrp), .t8x8(up_t8x8),
    .busy(up_busy), .done(up_done),
    .up_we, .up_addr, .up_data
  );

  // ---------------- padding engine (stage 3, spatial BL) ----------------
  logic pad_start;
  assign pad_start = step_q && s3_job.valid && !interleave && (s3_job.layer == 2'd0) && pad_en;

  padding_engine u_pad (
    .clk, .rst_n, .start(pad_start), .left_edge(pad_left_edge),
    .tl_intra, .t_intra, .l_intra, .c_intra,
    .a(pad_lines[0]),  .b(pad_lines[1]),  .c(pad_lines[2]),  .d(pad_lines[3]),
    .e(pad_lines[4]),  .f(pad_lines[5]),  .g(pad_lines[6]),  .h(pad_lines[7]),
    .i(pad_lines[8]),  .j(pad_lines[9]),  .k(pad_lines[10]), .l(pad_lines[11]),
    .m(pad_lines[12]), .n(pad_lines[13]), .o(pad_lines[14]), .p(pad_lines[15]),
    .q(pad_lines[16]), .v0_ext(pad_v0_ext),
    .v4_we(pad_v4_we), .v4_data(pad_v4_data),
    .busy(pad_busy), .done(pad_done),
    .out_we(pad_we), .out_blk(pad_blk), .out_row(pad_row), .out_pix(pad_pix)
  );

  // ---------------- reconfigurable pipeline buffers ----------------
  logic        upb_we;
  logic [6:0]  upb_addr;
  logic [35:0] upb_wdata, up_word;

  always_comb
    for (int x = 0; x < 4; x++) up_word[x*9 +: 9] = up_data[x];

  // the upsampling engine owns the UP Data SRAM write port on sequential frames
  assign upb_we    = interleave ? upd_we    : up_we;
  assign upb_addr  = interleave ? upd_addr  : up_addr;
  assign upb_wdata = interleave ? upd_wdata : up_word;

  recfg_buffer #(.DW(36), .WORDS(96), .AW(7)) u_res_sram (
    .clk, .rst_n, .ilp_mode(interleave), .swap(step),
    .p_we(res_we), .p_addr(res_addr), .p_wdata(res_wdata),
    .ilp_re(res_ilp_re), .ilp_addr(res_ilp_addr), .ilp_rdata(res_ilp_rdata),
    .c_re(res_c_re), .c_addr(res_c_addr), .c_rdata(res_c_rdata), .wsel(res_bank)
  );

  recfg_buffer #(.DW(36), .WORDS(96), .AW(7)) u_up_sram (
    .clk, .rst_n, .ilp_mode(interleave), .swap(step),
    .p_we(upb_we), .p_addr(upb_addr), .p_wdata(upb_wdata),
    .ilp_re(upd_ilp_re), .ilp_addr(upd_ilp_addr), .ilp_rdata(upd_ilp_rdata),
    .c_re(upd_c_re), .c_addr(upd_c_addr), .c_rdata(upd_c_rdata), .wsel(upd_bank)
  );

  recfg_buffer #(.DW(36), .WORDS(96), .AW(7)) u_rec_sram (
    .clk, .rst_n, .ilp_mode(interleave), .swap(step),
    .p_we(rec_we), .p_addr(rec_addr), .p_wdata(rec_wdata),
    .ilp_re(rec_ilp_re), .ilp_addr(rec_ilp_addr), .ilp_rdata(rec_ilp_rdata),
    .c_re(rec_c_re), .c_addr(rec_c_addr), .c_rdata(rec_c_rdata), .wsel(rec_bank)
  );

  // ---------------- N-layer context SRAM + CM cache ----------------
  ctx_model_store #(.NUM_LAYERS(4), .NUM_CTX(460), .CTX_W(7), .SETS(16)) u_ctx (
    .clk, .rst_n, .req(ctx_req), .we(ctx_we), .layer(s1_job.layer), .ctx(ctx_idx),
    .wdata(ctx_wdata), .ready(ctx_ready), .ack(ctx_ack), .rdata(ctx_rdata), .hit(ctx_hit)
  );

  el_side_info_buf #(.NUM_LAYERS(4), .MB_W(120), .SI_W(16)) u_si (
    .clk, .rst_n,
    .rd_req(si_rd), .rd_layer(s1_job.layer), .rd_mbx(si_rd_mbx),
    .rd_valid(si_valid), .left_info(si_left), .top_info(si_top),
    .wr_req(si_wr), .wr_layer(s1_job.layer), .wr_mbx(si_wr_mbx), .wdata(si_wdata)
  );

  layer_bitstream_buf #(.NUM_LAYERS(4), .LDEPTH(32), .DW(32)) u_bs (
    .clk, .rst_n,
    .wr_en(bs_wr_en), .wr_layer(bs_wr_layer), .wr_data(bs_wr_data),
    .rd_en(bs_rd_en), .rd_layer(s1_job.layer),
    .rd_valid(bs_rd_valid), .rd_data(bs_rd_data),
    .empty(bs_empty), .full(bs_full), .refill(bs_refill)
  );

endmodule
