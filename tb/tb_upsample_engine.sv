// tb_upsample_engine: self-checking test of the on-line upsampling engine.
// Random base-layer windows (luma 12x12, Cb/Cr 8x8) are loaded into the idle SRAM
// bank, a job is started, and every UP data SRAM word is compared with a direct
// model of dyadic SVC upsampling: each enhancement-layer sample is mapped to its
// base-layer position, the 4-tap (luma intra) or 2-tap (chroma intra, residual)
// weights are applied separably, residual taps that fall outside the transform
// block are replaced by the sample inside it, and intra results are clipped.
// Jobs: intra, residual 4x4, residual 8x8; the next window is loaded while the
// current job runs (ping-pong banks). The job length is checked: 128 issue cycles
// (four samples per output cycle after a 4-row fill per column group) plus drain.
module tb_upsample_engine;
  import svc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ld_we;
  logic [4:0] ld_addr;
  sample_t    ld_data [12];
  logic       start, ilrp, t8x8, busy, done, up_we;
  logic [6:0] up_addr;
  sample_t    up_data [4];

  upsample_engine dut (.*);

  int checks = 0, failures = 0;
  int win  [2][3][12][12];   // [bank-copy][plane][row][col], window coordinates
  int got  [96][4];
  int seen [96];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap4(int ph, int i);   // ph 0: +1/4, 1: +3/4
    int t1 [4] = '{-3, 28, 8, -1};
    int t3 [4] = '{-1, 8, 28, -3};
    return ph ? t3[i] : t1[i];
  endfunction

  // weight of base-layer sample b (block coordinates) for enhancement-layer index e
  function automatic int wgt(int e, int b, int lumaintra, int res, int bs);
    int p1, ph, own, w;
    p1  = (e % 2 == 0) ? (e / 2 - 1) : (e - 1) / 2;
    ph  = (e % 2 == 0) ? 1 : 0;
    own = e / 2;
    if (lumaintra) begin
      if (b >= p1 - 1 && b <= p1 + 2) return tap4(ph, b - (p1 - 1));
      return 0;
    end
    // 2-tap bilinear between p1 and p1+1
    if (res && (own / bs != ((ph ? p1 : p1 + 1)) / bs || (ph ? p1 : p1 + 1) < 0))
      return (b == own) ? 32 : 0;
    w = 0;
    if (b == p1)     w = ph ? 8 : 24;
    if (b == p1 + 1) w = ph ? 24 : 8;
    return w;
  endfunction

  function automatic int expect_px(int cp, int plane, int X, int Y, int res, int t8);
    int n, bs, li, acc, h, r;
    n  = (plane == 0) ? 8 : 4;
    bs = (plane == 0 && t8) ? 8 : 4;
    li = (plane == 0 && !res);
    acc = 0;
    for (int by = -2; by < n + 2; by++) begin
      int wy = wgt(Y, by, li, res, bs);
      if (wy == 0) continue;
      h = 0;
      for (int bx = -2; bx < n + 2; bx++)
        h += wgt(X, bx, li, res, bs) * win[cp][plane][by + 2][bx + 2];
      acc += wy * h;
    end
    r = (acc + 512) >>> 10;
    if (!res) r = (r < 0) ? 0 : (r > 255) ? 255 : r;
    return r;
  endfunction

  task automatic load_window(int cp, int res);
    for (int p = 0; p < 3; p++)
      for (int r = 0; r < 12; r++)
        for (int c = 0; c < 12; c++)
          win[cp][p][r][c] = res ? (int'($urandom_range(0, 510)) - 255) : int'($urandom_range(0, 255));
    // a few extreme patterns to exercise the clip
    if (!res) begin
      win[cp][0][5][5] = 255; win[cp][0][5][6] = 0; win[cp][0][5][4] = 255;
    end
    for (int a = 0; a < 28; a++) begin
      int p, r;
      p = (a < 12) ? 0 : (a < 20) ? 1 : 2;
      r = (a < 12) ? a : (a < 20) ? a - 12 : a - 20;
      @(negedge clk);
      ld_we   = 1;
      ld_addr = 5'(a);
      for (int c = 0; c < 12; c++)
        ld_data[c] = (p > 0 && c >= 8) ? sample_t'(0) : sample_t'(win[cp][p][r][c]);
    end
    @(negedge clk);
    ld_we = 0;
  endtask

  // monitor: collects the UP data SRAM writes and the job length
  int job_cycles;
  always @(posedge clk) begin
    if (busy) job_cycles <= job_cycles + 1;
    if (up_we) begin
      seen[up_addr] <= seen[up_addr] + 1;
      for (int k = 0; k < 4; k++) got[up_addr][k] <= up_data[k];
    end
  end

  task automatic check_job(int cp, int res, int t8, int next_res);
    int x, y, plane, e, g, cycles;
    foreach (seen[i]) seen[i] = 0;
    job_cycles = 0;
    @(negedge clk);
    start = 1; ilrp = res[0]; t8x8 = t8[0];
    @(negedge clk);
    start = 0;
    // overlap: load the next window into the other bank while this job runs
    load_window(1 - cp, next_res);
    while (!done) @(negedge clk);
    @(negedge clk);
    cycles = job_cycles;
    checks++;
    if (cycles != 130) begin
      failures++;
      $display("job length %0d cycles, expected 130", cycles);
    end
    for (int a = 0; a < 96; a++) begin
      checks++;
      if (seen[a] != 1) begin
        failures++;
        $display("address %0d written %0d times", a, seen[a]);
        continue;
      end
      if (a < 64) begin plane = 0; y = a / 4; g = a % 4; end
      else if (a < 80) begin plane = 1; y = (a - 64) / 2; g = (a - 64) % 2; end
      else begin plane = 2; y = (a - 80) / 2; g = (a - 80) % 2; end
      for (int k = 0; k < 4; k++) begin
        x = 4 * g + k;
        e = expect_px(cp, plane, x, y, res, t8);
        checks++;
        if (got[a][k] != e) begin
          failures++;
          if (failures < 10)
            $display("plane %0d (%0d,%0d) res=%0d t8=%0d: got %0d expected %0d",
                     plane, x, y, res, t8, got[a][k], e);
        end
      end
    end
  endtask

  initial begin
    ld_we = 0; ld_addr = 0; start = 0; ilrp = 0; t8x8 = 0;
    foreach (ld_data[i]) ld_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_window(0, 0);
    check_job(0, 0, 0, 1);  // intra; residual data for the next job loads meanwhile
    check_job(1, 1, 0, 1);  // residual, 4x4 transform
    check_job(0, 1, 1, 0);  // residual, 8x8 transform
    check_job(1, 0, 0, 0);  // intra again
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
