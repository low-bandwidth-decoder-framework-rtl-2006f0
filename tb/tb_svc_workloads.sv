// tb_svc_workloads: runs one macroblock row of each evaluated configuration
// through the top at its default configuration and checks the cycle cost of the
// framework against the frame-rate budget. The external decoder blocks are
// modelled as always ready, so every cycle measured is spent in this RTL.
//   * spatial enhancement layer: one 16CIF row (1408/16 = 88 MBs), every MB
//     upsampled from the 4CIF base layer. Budget at 98 MHz, 30 fps, with
//     CIF+4CIF+16CIF = 396+1584+6336 MBs per access unit: 392 cycles per MB.
//   * spatial base layer: one 4CIF row (44 MBs) with padding on every MB,
//     against the same budget.
//   * quality scalability: one 1080p row (120 MBs) with 4 layers interleaved.
//     Budget at 120 MHz, 30 fps, 8160 MBs x 4 layers: 122 cycles per MB-layer.
// Picture sizes are the standard formats; frame rates and clock rates are those
// the design is meant for. Each run checks the number of jobs (upsampled MBs,
// padded MBs, pipeline steps), the layer order of the interleaved row and the
// cycle budget.
module tb_svc_workloads;
  import svc_pkg::*;

  localparam int SP_EL_MBS   = 88;
  localparam int SP_BL_MBS   = 44;
  localparam int Q_MBS       = 120;
  localparam int Q_LAYERS    = 4;
  localparam int SP_BUDGET   = 98_000_000 / ((396 + 1584 + 6336) * 30);   // 392
  localparam int Q_BUDGET    = 120_000_000 / (8160 * 4 * 30);             // 122

  logic clk, rst_n = 0;
  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end


  // ---------------- DUT signals ----------------
  logic        frame_start, interleave, frame_busy, frame_done, s1_ilp, s3_top, step;
  logic [2:0]  num_layers;
  logic [1:0]  layer;
  logic [15:0] num_mbs;
  mb_job_t     s1_job, s2_job, s3_job;
  logic        ed_td_ready, rec_ready, db_ready;
  logic        res_bank, upd_bank, rec_bank;
  logic        up_need, up_ilrp, up_t8x8, bl_ld_we, up_busy, up_done;
  logic [4:0]  bl_ld_addr;
  sample_t     bl_ld_data [12];
  logic        pad_en, pad_left_edge, tl_intra, t_intra, l_intra, c_intra;
  line4_t      pad_lines [17], pad_v0_ext, pad_v4_data;
  logic        pad_v4_we, pad_we, pad_busy, pad_done;
  logic [1:0]  pad_blk;
  logic [2:0]  pad_row;
  pix_t        pad_pix [8];
  logic        res_we, res_ilp_re, res_c_re, upd_we, upd_ilp_re, upd_c_re;
  logic        rec_we, rec_ilp_re, rec_c_re;
  logic [6:0]  res_addr, res_ilp_addr, res_c_addr, upd_addr, upd_ilp_addr, upd_c_addr;
  logic [6:0]  rec_addr, rec_ilp_addr, rec_c_addr;
  logic [35:0] res_wdata, res_ilp_rdata, res_c_rdata, upd_wdata, upd_ilp_rdata, upd_c_rdata;
  logic [35:0] rec_wdata, rec_ilp_rdata, rec_c_rdata;
  logic        ctx_req, ctx_we, ctx_ready, ctx_ack, ctx_hit;
  logic [8:0]  ctx_idx;
  logic [6:0]  ctx_wdata, ctx_rdata;
  logic        si_rd, si_valid, si_wr;
  logic [6:0]  si_rd_mbx, si_wr_mbx;
  logic [15:0] si_left, si_top, si_wdata;
  logic        bs_wr_en, bs_rd_en, bs_rd_valid;
  logic [1:0]  bs_wr_layer;
  logic [31:0] bs_wr_data, bs_rd_data;
  logic [3:0]  bs_empty, bs_full, bs_refill;

  svc_lowbw_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_up_done = 0, n_pad_mbs = 0, n_steps = 0, n_order_err = 0;
  int exp_mb = 0, exp_layer = 0;
  bit track_order = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (up_done) n_up_done++;
      if (pad_v4_we) n_pad_mbs++;
      if (step) n_steps++;
    end
  end

  // in the interleaved row, stage 1 must see MB0 L0..L3, MB1 L0..L3, ...
  always @(posedge clk) begin
    #1;
    if (track_order && step) begin
      // the job issued at this edge is visible in s1_job now
      if (s1_job.valid && exp_mb < Q_MBS) begin
        if (int'(s1_job.mb) != exp_mb || int'(s1_job.layer) != exp_layer) n_order_err++;
        if (exp_layer == Q_LAYERS - 1) begin exp_layer = 0; exp_mb++; end
        else exp_layer++;
      end
    end
  end

  task automatic run_frame(bit ilv, int nl, int ly, int nmb, output int cycles);
    int t0;
    @(negedge clk);
    frame_start = 1; interleave = ilv; num_layers = 3'(nl); layer = 2'(ly); num_mbs = 16'(nmb);
    @(negedge clk);
    frame_start = 0;
    t0 = 0;
    while (!frame_done) begin
      @(negedge clk);
      t0++;
    end
    cycles = t0 + 1;
  endtask

  task automatic check_budget(string what, int cycles, int units, int budget);
    checks++;
    $display("%s: %0d cycles for %0d units, %0d per unit (budget %0d)",
             what, cycles, units, cycles / units, budget);
    if (cycles > units * budget) begin
      failures++;
      $display("%s exceeds the budget", what);
    end
  endtask

  task automatic check_count(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    frame_start = 0; interleave = 0; num_layers = 1; layer = 0; num_mbs = 1;
    {ed_td_ready, rec_ready, db_ready} = '1;
    up_need = 0; up_ilrp = 0; up_t8x8 = 0; bl_ld_we = 0; bl_ld_addr = 0;
    foreach (bl_ld_data[z]) bl_ld_data[z] = '0;
    pad_en = 0; pad_left_edge = 0; {tl_intra, t_intra, l_intra, c_intra} = '0;
    foreach (pad_lines[z]) pad_lines[z] = '0;
    pad_v0_ext = '0;
    {res_we, res_ilp_re, res_c_re, upd_we, upd_ilp_re, upd_c_re, rec_we, rec_ilp_re, rec_c_re} = '0;
    {res_addr, res_ilp_addr, res_c_addr, upd_addr, upd_ilp_addr, upd_c_addr} = '0;
    {rec_addr, rec_ilp_addr, rec_c_addr} = '0;
    {res_wdata, upd_wdata, rec_wdata} = '0;
    ctx_req = 0; ctx_we = 0; ctx_idx = 0; ctx_wdata = 0;
    si_rd = 0; si_wr = 0; si_rd_mbx = 0; si_wr_mbx = 0; si_wdata = 0;
    bs_wr_en = 0; bs_rd_en = 0; bs_wr_layer = 0; bs_wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // spatial enhancement layer: every MB upsampled (intra texture)
    up_need = 1;
    n_steps = 0;
    run_frame(0, 1, 1, SP_EL_MBS, cyc);
    up_need = 0;
    check_count("upsampled MBs", n_up_done, SP_EL_MBS);
    check_count("steps of the EL row", n_steps, SP_EL_MBS + 3);
    check_budget("16CIF EL row, upsampling", cyc, SP_EL_MBS, SP_BUDGET);

    // spatial base layer: every MB padded (L intra, C inter)
    pad_en = 1; l_intra = 1;
    n_steps = 0;
    run_frame(0, 1, 0, SP_BL_MBS, cyc);
    repeat (40) @(negedge clk);
    pad_en = 0; l_intra = 0;
    check_count("padded MBs", n_pad_mbs, SP_BL_MBS);
    check_count("steps of the BL row", n_steps, SP_BL_MBS + 3);
    check_budget("4CIF BL row, padding", cyc, SP_BL_MBS, SP_BUDGET);

    // quality scalability: 4 layers interleaved
    n_steps = 0; track_order = 1;
    run_frame(1, Q_LAYERS, 0, Q_MBS, cyc);
    track_order = 0;
    check_count("steps of the interleaved row", n_steps, Q_MBS * Q_LAYERS + 3);
    check_count("MB-layer jobs issued in order", exp_mb, Q_MBS);
    check_count("layer-order errors", n_order_err, 0);
    check_budget("1080p row, 4 layers interleaved", cyc, Q_MBS * Q_LAYERS, Q_BUDGET);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
