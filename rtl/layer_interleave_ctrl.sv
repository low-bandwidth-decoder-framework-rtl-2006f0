// layer_interleave_ctrl: MB-pipeline schedule controller of the decoder.
//
// It steps the three-stage MB pipeline (stage 1: entropy/texture decoding and
// upsampling, stage 2: motion compensation / intra prediction / reconstruction,
// stage 3: deblocking and padding) and decides which (macroblock, layer) job each
// stage works on.
//   * Layer-interleaved mode (quality scalability, interleave = 1): the layers of
//     one macroblock are issued back to back, base layer first, then enhancement
//     layers 1..num_layers-1, before the next macroblock: BL MB1, EL1 MB1, ...,
//     BL MB2, ... Each stage therefore alternates between layers, and the data of
//     layer n-1 of a macroblock is still on chip when layer n is decoded.
//   * Layer-sequential mode (H.264 and spatial scalability, interleave = 0): all
//     macroblocks of one layer (layer input) are issued in raster order.
// A step happens when every stage reports ready (stage_ready[s] = 1, or the
// stage holds no job); then stage 3 takes stage 2's job, stage 2 takes stage 1's,
// and stage 1 takes the next job. step pulses for one cycle and is the bank swap
// of the pipeline buffers. s1_ilp is set while stage 1 decodes an enhancement
// layer in interleaved mode (it may then read the lower layer's data from the
// buffers); s3_top marks the highest layer, the one whose output is displayed.
// frame_done pulses when the last job has left stage 3.
// The interleaved order is the document's; the ready/step handshake is this design's.
module layer_interleave_ctrl
  import svc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,          // begin a frame (when idle)
  input  logic        interleave,
  input  logic [2:0]  num_layers,     // 1..4, used in interleaved mode
  input  logic [1:0]  layer,          // layer to decode in sequential mode
  input  logic [15:0] num_mbs,        // macroblocks per frame, at least 1
  input  logic [2:0]  stage_ready,
  output mb_job_t     s1_job,
  output mb_job_t     s2_job,
  output mb_job_t     s3_job,
  output logic        s1_ilp,
  output logic        s3_top,
  output logic        step,
  output logic        busy,
  output logic        frame_done
);

  logic        issuing;             // more jobs to issue
  logic [15:0] nxt_mb, mbs;
  logic [1:0]  nxt_layer, seq_layer, top_layer;
  logic        ilv;
  logic        all_ready;

  assign all_ready = (stage_ready[0] || !s1_job.valid) &&
                     (stage_ready[1] || !s2_job.valid) &&
                     (stage_ready[2] || !s3_job.valid);
  assign busy = issuing || s1_job.valid || s2_job.valid || s3_job.valid;
  assign step = busy && all_ready;
  assign s1_ilp = ilv && s1_job.valid && (s1_job.layer != 2'd0);
  assign s3_top = s3_job.valid && (s3_job.layer == top_layer);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing    <= 1'b0;
      nxt_mb     <= '0;
      nxt_layer  <= '0;
      seq_layer  <= '0;
      top_layer  <= '0;
      mbs        <= '0;
      ilv        <= 1'b0;
      s1_job     <= '0;
      s2_job     <= '0;
      s3_job     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (start && !busy) begin
        issuing   <= 1'b1;
        nxt_mb    <= '0;
        ilv       <= interleave;
        seq_layer <= layer;
        nxt_layer <= interleave ? 2'd0 : layer;
        top_layer <= interleave ? 2'(num_layers - 3'd1) : layer;
        mbs       <= num_mbs;
      end else if (step) begin
        s3_job <= s2_job;
        s2_job <= s1_job;
        if (issuing) begin
          s1_job <= '{valid: 1'b1, mb: nxt_mb, layer: nxt_layer};
          if (ilv && nxt_layer != top_layer) begin
            nxt_layer <= nxt_layer + 2'd1;
          end else begin
            nxt_layer <= ilv ? 2'd0 : seq_layer;
            nxt_mb    <= nxt_mb + 16'd1;
            if (nxt_mb == mbs - 16'd1) issuing <= 1'b0;
          end
        end else begin
          s1_job <= '0;
        end
        if (!issuing && !s1_job.valid && !s2_job.valid && s3_job.valid)
          frame_done <= 1'b1;
      end
    end
  end

endmodule
