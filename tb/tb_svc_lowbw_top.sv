// tb_svc_lowbw_top: end-to-end test of the low-bandwidth ILP framework, with the
// top at its default configuration. The testbench plays the external decoder
// blocks (entropy/texture decoder, reconstruction, deblocking, memory controller)
// and checks what the framework produces, frame by frame:
//   1. spatial base layer (sequential, layer 0): for every MB in stage 3 the
//      deblocking side supplies boundary lines cut from a random picture; the
//      padded rows written by the padding engine are compared with a geometric
//      reference (extension from the intra neighbour across the MB edges).
//   2. spatial enhancement layer (sequential, layer 1): the memory controller
//      loads each MB's base-layer window into the idle bank while the previous MB
//      is upsampled; when the MB reaches stage 2 the reconstruction side reads the
//      whole UP Data SRAM bank and compares it with a direct dyadic-upsampling
//      model. Intra and residual (4x4 and 8x8 transform) MBs alternate.
//   3. quality scalability (interleaved, 4 layers): stage 1 writes per-(MB,layer)
//      data into the Residual and UP Data SRAMs and reads the lower layer of the
//      same MB through the ILP ports; stage 2 reads what stage 1 wrote one step
//      earlier; the entropy side updates per-layer CABAC contexts, which must not
//      leak between layers, and reads/writes per-layer neighbour side information
//      (left and upper MB of a 3-MB-wide picture), and takes each layer's slice
//      data from that layer's bitstream FIFO, filled beforehand.
// Each mechanism (padding, intra and residual upsampling, stalls caused by each
// engine, bank swaps, ILP reads, context hits, misses and layer switches, side-information and bitstream reads, frame
// completion) is counted, and one that never happened counts as a failure.
module tb_svc_lowbw_top;
  import svc_pkg::*;

  localparam int W = 4;           // MBs per row
  localparam int QMB = 5;         // MBs in the quality frame

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_pad_rows = 0, n_up_intra = 0, n_up_res = 0, n_up_stall = 0, n_pad_stall = 0;
  int n_swaps = 0, n_ilp_reads = 0, n_ctx_hit = 0, n_ctx_miss = 0, n_layer_sw = 0;
  int n_frames = 0, n_v4 = 0;

  always @(posedge clk) if (rst_n) begin
    if (step) n_swaps++;
    if (frame_done) n_frames++;
    if (ed_td_ready && up_busy && frame_busy) n_up_stall++;
    if (db_ready && pad_busy && frame_busy) n_pad_stall++;
    if (pad_v4_we) n_v4++;
    if (ctx_ack) begin if (ctx_hit) n_ctx_hit++; else n_ctx_miss++; end
  end

  // wait until a pipeline step has happened; returns just after its clock edge
  task automatic wait_step();
    #1;
    while (!step) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    {ed_td_ready, rec_ready, db_ready} = '0;
  endtask

  task automatic start_frame(bit ilv, int nl, int ly, int nmb);
    @(negedge clk);
    frame_start = 1; interleave = ilv; num_layers = 3'(nl); layer = 2'(ly); num_mbs = 16'(nmb);
    {ed_td_ready, rec_ready, db_ready} = '1;
    @(negedge clk);
    frame_start = 0;
  endtask

  // =====================================================================
  // 1. padding: picture of 2 MB rows, the second row is the BL frame
  // =====================================================================
  int pic [32][16*W];
  bit intra [2][W];
  int pad_mb;

  function automatic line4_t hline(int y, int x0);
    line4_t r;
    for (int z = 0; z < 4; z++) r[z] = pix_t'(pic[y][x0 + z]);
    return r;
  endfunction
  function automatic line4_t vline(int y0, int x);
    line4_t r;
    for (int z = 0; z < 4; z++) r[z] = pix_t'(pic[y0 + z][x]);
    return r;
  endfunction
  function automatic bit is_intra(int y, int x, int mbx);
    if (x / 16 < mbx - 1) return 0;
    return intra[y / 16][x / 16];
  endfunction
  function automatic int ref_pad(int y, int x, int mbx, output bit need);
    int ox, dx, dy, vx, hy;
    bit own, hn, vn, dn;
    ox = 16 * mbx;
    own = (x < 0) ? 1'b1 : is_intra(y, x, mbx);
    vx  = (x < ox) ? ox : ox - 1;
    hy  = (y < 16) ? 16 : 15;
    hn  = (vx < 0) ? 1'b0 : is_intra(y, vx, mbx);
    vn  = (x < 0) ? 1'b0 : is_intra(hy, x, mbx);
    dn  = (vx < 0) ? 1'b0 : is_intra(hy, vx, mbx);
    need = !own && (hn || vn || dn);
    if (!need) return 0;
    dx = (x < ox) ? ox - 1 - x : x - ox;
    dy = (y < 16) ? 15 - y : y - 16;
    if (hn && vn) return (dx < dy) ? pic[y][vx] : (dx > dy) ? pic[hy][x] : (pic[y][vx] + pic[hy][x] + 1) / 2;
    if (hn) return pic[y][vx];
    if (vn) return pic[hy][x];
    return pic[hy][vx];
  endfunction

  task automatic drive_pad_lines(int mbx);
    int cx = 16 * mbx;
    pad_left_edge = (mbx == 0);
    tl_intra = (mbx > 0) ? intra[0][mbx-1] : 1'b0;
    t_intra  = intra[0][mbx];
    l_intra  = (mbx > 0) ? intra[1][mbx-1] : 1'b0;
    c_intra  = intra[1][mbx];
    pad_lines[0] = hline(15, cx); pad_lines[1] = hline(15, cx + 4);
    pad_lines[2] = hline(15, cx + 8); pad_lines[3] = hline(15, cx + 12);
    pad_lines[4] = (mbx > 0) ? hline(16, cx - 4) : '0;
    pad_lines[5] = hline(16, cx); pad_lines[6] = hline(16, cx + 4);
    pad_lines[7] = hline(16, cx + 8); pad_lines[8] = hline(16, cx + 12);
    pad_lines[9]  = (mbx > 0) ? vline(16, cx - 1) : '0;
    pad_lines[10] = (mbx > 0) ? vline(20, cx - 1) : '0;
    pad_lines[11] = (mbx > 0) ? vline(24, cx - 1) : '0;
    pad_lines[12] = vline(12, cx);
    pad_lines[13] = vline(16, cx); pad_lines[14] = vline(20, cx); pad_lines[15] = vline(24, cx);
    pad_lines[16] = vline(12, cx + 15);
    pad_v0_ext = (mbx > 0 && intra[0][mbx-1]) ? vline(8, cx - 1) : vline(8, cx);
  endtask

  always @(posedge clk) if (rst_n && pad_we) begin
    int y, x, ex;
    bit nd;
    n_pad_rows++;
    y = 8 + 8 * pad_blk[1] + pad_row;
    for (int z = 0; z < 8; z++) begin
      x = 16 * pad_mb - 8 + 8 * pad_blk[0] + z;
      ex = ref_pad(y, x, pad_mb, nd);
      checks++;
      if (!nd || pad_pix[z] != pix_t'(ex)) begin
        failures++;
        if (failures < 10) $display("pad mb %0d blk %0d row %0d px %0d: got %0d expected %0d",
                                    pad_mb, pad_blk, pad_row, z, pad_pix[z], ex);
      end
    end
  end

  task automatic frame_bl_padding();
    foreach (pic[y, x]) pic[y][x] = $urandom_range(0, 255);
    foreach (intra[r, x]) intra[r][x] = $urandom_range(0, 1);
    intra[0][1] = 1; intra[1][1] = 0;        // make sure some padding is needed
    pad_en = 1;
    start_frame(0, 1, 0, W);
    while (frame_busy) begin
      wait_step();
      if (s3_job.valid) begin
        pad_mb = s3_job.mb;
        drive_pad_lines(s3_job.mb);
      end
      repeat ($urandom_range(0, 40)) @(negedge clk);
      {ed_td_ready, rec_ready, db_ready} = '1;
      if (!frame_busy) break;
    end
    pad_en = 0;
  endtask

  // =====================================================================
  // 2. upsampling: one BL window per EL MB
  // =====================================================================
  int win [W][3][12][12];

  function automatic int tap4(int ph, int i);
    int t1 [4] = '{-3, 28, 8, -1};
    int t3 [4] = '{-1, 8, 28, -3};
    return ph ? t3[i] : t1[i];
  endfunction
  function automatic int wgt(int e, int b, int li, int res, int bs);
    int p1, ph, own, q;
    p1  = (e % 2 == 0) ? (e / 2 - 1) : (e - 1) / 2;
    ph  = (e % 2 == 0) ? 1 : 0;
    own = e / 2;
    if (li) return (b >= p1 - 1 && b <= p1 + 2) ? tap4(ph, b - (p1 - 1)) : 0;
    q = ph ? p1 : p1 + 1;                        // the other tap
    if (res && (q < 0 || q / bs != own / bs)) return (b == own) ? 32 : 0;
    if (b == p1)     return ph ? 8 : 24;
    if (b == p1 + 1) return ph ? 24 : 8;
    return 0;
  endfunction
  function automatic int ref_up(int mb, int plane, int X, int Y, int res, int t8);
    int n, bs, li, acc, h, r;
    n  = (plane == 0) ? 8 : 4;
    bs = (plane == 0 && t8) ? 8 : 4;
    li = (plane == 0 && !res);
    acc = 0;
    for (int by = -2; by < n + 2; by++) begin
      int wy = wgt(Y, by, li, res, bs);
      if (wy == 0) continue;
      h = 0;
      for (int bx = -2; bx < n + 2; bx++) h += wgt(X, bx, li, res, bs) * win[mb][plane][by + 2][bx + 2];
      acc += wy * h;
    end
    r = (acc + 512) >>> 10;
    if (!res) r = (r < 0) ? 0 : (r > 255) ? 255 : r;
    return r;
  endfunction
  function automatic bit mb_res(int mb); return mb % 2; endfunction
  function automatic bit mb_t8(int mb);  return (mb % 4) == 3; endfunction

  task automatic load_bl(int mb);
    for (int p = 0; p < 3; p++)
      for (int r = 0; r < 12; r++)
        for (int c = 0; c < 12; c++)
          win[mb][p][r][c] = mb_res(mb) ? int'($urandom_range(0, 510)) - 255 : int'($urandom_range(0, 255));
    for (int a = 0; a < 28; a++) begin
      int p, r;
      p = (a < 12) ? 0 : (a < 20) ? 1 : 2;
      r = (a < 12) ? a : (a < 20) ? a - 12 : a - 20;
      @(negedge clk);
      bl_ld_we = 1; bl_ld_addr = 5'(a);
      for (int c = 0; c < 12; c++) bl_ld_data[c] = (p > 0 && c >= 8) ? sample_t'(0) : sample_t'(win[mb][p][r][c]);
    end
    @(negedge clk);
    bl_ld_we = 0;
  endtask

  task automatic check_up_bank(int mb);
    for (int a = 0; a < 96; a++) begin
      int plane, y, g;
      @(negedge clk);
      upd_c_re = 1; upd_c_addr = 7'(a);
      @(negedge clk);
      upd_c_re = 0;
      if (a < 64) begin plane = 0; y = a / 4; g = a % 4; end
      else if (a < 80) begin plane = 1; y = (a - 64) / 2; g = (a - 64) % 2; end
      else begin plane = 2; y = (a - 80) / 2; g = (a - 80) % 2; end
      for (int k = 0; k < 4; k++) begin
        int ex = ref_up(mb, plane, 4 * g + k, y, mb_res(mb), mb_t8(mb));
        checks++;
        if (sample_t'(upd_c_rdata[k*9 +: 9]) != sample_t'(ex)) begin
          failures++;
          if (failures < 4) $display("UP mb %0d plane %0d (%0d,%0d): got %0d expected %0d",
                                      mb, plane, 4 * g + k, y, sample_t'(upd_c_rdata[k*9 +: 9]), ex);
        end
      end
    end
  endtask

  task automatic frame_el_upsampling();
    up_need = 1;
    load_bl(0);
    start_frame(0, 2, 1, W);
    while (frame_busy) begin
      wait_step();
      up_ilrp = s1_job.valid ? mb_res(s1_job.mb) : 1'b0;
      up_t8x8 = s1_job.valid ? mb_t8(s1_job.mb) : 1'b0;
      if (s1_job.valid) begin
        if (mb_res(s1_job.mb)) n_up_res++; else n_up_intra++;
      end
      @(negedge clk);                     // engine starts here
      if (s1_job.valid && s1_job.mb + 1 < W) load_bl(s1_job.mb + 1);
      if (s2_job.valid) check_up_bank(s2_job.mb);
      {ed_td_ready, rec_ready, db_ready} = '1;
    end
    up_need = 0;
  endtask

  // =====================================================================
  // 3. quality scalability: layer-interleaved, 4 layers
  // =====================================================================
  int ctx_model [4][460];
  bit ctx_init  [4][460];
  int last_layer = -1;
  localparam int QW = 3;          // quality frame width in MBs (two rows)
  logic [15:0] si_model [4][QMB];
  int n_si_left = 0, n_si_top = 0;
  int n_bs_reads = 0;
  int bs_next [4];

  function automatic logic [31:0] bs_word(int ly, int k);
    return 32'(ly * 32'h0100_0000 + k * 7919 + 13);
  endfunction

  // memory controller: put 12 words of every layer's slice data into its FIFO
  task automatic fill_bitstreams();
    for (int ly = 0; ly < 4; ly++) begin
      bs_next[ly] = 0;
      for (int k = 0; k < 12; k++) begin
        @(negedge clk);
        bs_wr_en = 1; bs_wr_layer = 2'(ly); bs_wr_data = bs_word(ly, k);
      end
    end
    @(negedge clk);
    bs_wr_en = 0;
    checks++;
    if (bs_empty != 4'b0000 || bs_refill != 4'b1111) begin
      failures++; $display("bitstream FIFO flags wrong after fill: empty %b refill %b", bs_empty, bs_refill);
    end
  endtask

  function automatic logic [35:0] qdata(int mb, int ly, int a, int salt);
    return 36'({16'(mb * 977 + ly * 131 + salt), 8'(a), 12'(mb ^ (ly << 4) ^ a ^ salt)});
  endfunction

  task automatic ctx_access(bit w, int ly, int cx, int val);
    @(negedge clk);
    while (!ctx_ready) @(negedge clk);
    ctx_req = 1; ctx_we = w; ctx_idx = 9'(cx); ctx_wdata = 7'(val);
    @(negedge clk);
    ctx_req = 0;
    while (!ctx_ack) @(negedge clk);
    if (!w && ctx_init[ly][cx]) begin
      checks++;
      if (ctx_rdata != 7'(ctx_model[ly][cx])) begin
        failures++;
        $display("ctx layer %0d idx %0d: got %0d expected %0d", ly, cx, ctx_rdata, ctx_model[ly][cx]);
      end
    end
    if (w) begin ctx_model[ly][cx] = val; ctx_init[ly][cx] = 1; end
  endtask

  task automatic frame_quality();
    fill_bitstreams();
    start_frame(1, 4, 0, QMB);
    while (frame_busy) begin
      wait_step();
      if (s1_job.valid) begin
        int mb = s1_job.mb, ly = s1_job.layer;
        if (last_layer >= 0 && last_layer != ly) n_layer_sw++;
        last_layer = ly;
        // entropy decoding of this layer: its own context set
        for (int z = 0; z < 6; z++) begin
          int cx = (z * 37) % 60 + (mb % 2);
          if (ctx_init[ly][cx]) ctx_access(0, ly, cx, 0);
          ctx_access(1, ly, cx, (mb * 7 + ly * 29 + z) % 128);
        end
        // slice data of this layer: the next two words of its own FIFO
        for (int k = 0; k < 2; k++) begin
          @(negedge clk);
          bs_rd_en = 1;
          @(negedge clk);
          bs_rd_en = 0;
          checks++; n_bs_reads++;
          if (!bs_rd_valid || bs_rd_data != bs_word(ly, bs_next[ly])) begin
            failures++; $display("bitstream word %0d of layer %0d wrong", bs_next[ly], ly);
          end
          bs_next[ly]++;
        end
        // neighbour side information of this layer: left and upper MB
        @(negedge clk);
        si_rd = 1; si_rd_mbx = 7'(mb % QW);
        @(negedge clk);
        si_rd = 0;
        checks++;
        if (!si_valid) begin failures++; $display("side info read not answered"); end
        if (mb % QW != 0) begin
          checks++; n_si_left++;
          if (si_left != si_model[ly][mb-1]) begin
            failures++; $display("side info left mb %0d layer %0d wrong", mb, ly);
          end
        end
        if (mb >= QW) begin
          checks++; n_si_top++;
          if (si_top != si_model[ly][mb-QW]) begin
            failures++; $display("side info top mb %0d layer %0d wrong", mb, ly);
          end
        end
        si_model[ly][mb] = 16'($urandom);
        si_wr = 1; si_wr_mbx = 7'(mb % QW); si_wdata = si_model[ly][mb];
        @(negedge clk);
        si_wr = 0;
        // texture decoding: write this layer, read the lower layer of the same MB
        for (int a = 0; a < 96; a++) begin
          @(negedge clk);
          res_we = 1; res_addr = 7'(a); res_wdata = qdata(mb, ly, a, 0);
          upd_we = 1; upd_addr = 7'(a); upd_wdata = qdata(mb, ly, a, 5);
          res_ilp_re = (ly > 0); res_ilp_addr = 7'(95 - a);
          upd_ilp_re = (ly > 0); upd_ilp_addr = 7'(a);
          res_c_re = s2_job.valid; res_c_addr = 7'(a);
          @(negedge clk);
          {res_we, upd_we, res_ilp_re, upd_ilp_re, res_c_re} = '0;
          if (ly > 0) begin
            checks += 2; n_ilp_reads += 2;
            if (res_ilp_rdata != qdata(mb, ly - 1, 95 - a, 0)) begin
              failures++; $display("res ILP mb %0d layer %0d addr %0d wrong", mb, ly, 95 - a);
            end
            if (upd_ilp_rdata != qdata(mb, ly - 1, a, 5)) begin
              failures++; $display("UP ILP mb %0d layer %0d addr %0d wrong", mb, ly, a);
            end
          end
          if (s2_job.valid) begin
            checks++;
            if (res_c_rdata != qdata(s2_job.mb, s2_job.layer, a, 0)) begin
              failures++; $display("res consumer mb %0d layer %0d addr %0d wrong %h %h", s2_job.mb, s2_job.layer, a, res_c_rdata, qdata(s2_job.mb, s2_job.layer, a, 0));
            end
          end
        end
        checks++;
        if (s1_ilp != (ly > 0)) begin failures++; $display("s1_ilp wrong"); end
      end
      {ed_td_ready, rec_ready, db_ready} = '1;
    end
  endtask

  // =====================================================================
  initial begin
    frame_start = 0; interleave = 0; num_layers = 1; layer = 0; num_mbs = 1;
    {ed_td_ready, rec_ready, db_ready} = '0;
    up_need = 0; up_ilrp = 0; up_t8x8 = 0; bl_ld_we = 0; bl_ld_addr = 0;
    foreach (bl_ld_data[z]) bl_ld_data[z] = '0;
    pad_en = 0; pad_left_edge = 0; {tl_intra, t_intra, l_intra, c_intra} = '0;
    foreach (pad_lines[z]) pad_lines[z] = '0;
    pad_v0_ext = '0; pad_mb = 0;
    {res_we, res_ilp_re, res_c_re, upd_we, upd_ilp_re, upd_c_re, rec_we, rec_ilp_re, rec_c_re} = '0;
    {res_addr, res_ilp_addr, res_c_addr, upd_addr, upd_ilp_addr, upd_c_addr} = '0;
    {rec_addr, rec_ilp_addr, rec_c_addr} = '0;
    {res_wdata, upd_wdata, rec_wdata} = '0;
    ctx_req = 0; ctx_we = 0; ctx_idx = 0; ctx_wdata = 0;
    si_rd = 0; si_wr = 0; si_rd_mbx = 0; si_wr_mbx = 0; si_wdata = 0;
    bs_wr_en = 0; bs_rd_en = 0; bs_wr_layer = 0; bs_wr_data = 0;
    foreach (ctx_init[a, b]) ctx_init[a][b] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    frame_bl_padding();
    frame_el_upsampling();
    frame_quality();
    repeat (5) @(negedge clk);

    $display("padded rows %0d, V4 stores %0d, upsampled MBs intra %0d residual %0d",
             n_pad_rows, n_v4, n_up_intra, n_up_res);
    $display("stall cycles: upsampling %0d padding %0d; bank swaps %0d; ILP reads %0d",
             n_up_stall, n_pad_stall, n_swaps, n_ilp_reads);
    $display("context hits %0d misses %0d; layer switches %0d; frames %0d",
             n_ctx_hit, n_ctx_miss, n_layer_sw, n_frames);
    $display("side information checked: left %0d top %0d; bitstream words read %0d",
             n_si_left, n_si_top, n_bs_reads);
    checks++; if (n_pad_rows == 0)  begin failures++; $display("no padding happened"); end
    checks++; if (n_v4 != W)        begin failures++; $display("V4 stored %0d times", n_v4); end
    checks++; if (n_up_intra == 0)  begin failures++; $display("no intra upsampling"); end
    checks++; if (n_up_res == 0)    begin failures++; $display("no residual upsampling"); end
    checks++; if (n_up_stall == 0)  begin failures++; $display("upsampling never stalled the pipeline"); end
    checks++; if (n_pad_stall == 0) begin failures++; $display("padding never stalled the pipeline"); end
    checks++; if (n_swaps == 0)     begin failures++; $display("no bank swap"); end
    checks++; if (n_ilp_reads == 0) begin failures++; $display("no ILP reads"); end
    checks++; if (n_ctx_hit == 0)   begin failures++; $display("no context hit"); end
    checks++; if (n_ctx_miss == 0)  begin failures++; $display("no context miss"); end
    checks++; if (n_layer_sw == 0)  begin failures++; $display("no layer switch"); end
    checks++; if (n_si_left == 0)   begin failures++; $display("no left side information read"); end
    checks++; if (n_si_top == 0)    begin failures++; $display("no top side information read"); end
    checks++; if (n_bs_reads == 0)  begin failures++; $display("no bitstream word read"); end
    checks++; if (n_frames != 3)    begin failures++; $display("%0d frames done, expected 3", n_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
