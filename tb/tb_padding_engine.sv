// tb_padding_engine: self-checking test of the MB-level padding engine.
// A random two-macroblock-row picture with random intra/inter modes is built. The
// macroblocks of the second row are padded in raster order (so the pipelined
// lines of the previous macroblock are the left neighbour's), with the boundary
// lines cut from the picture and V0 taken from the line the macroblock above would
// have stored. Every padded row is compared with a geometric reference working on
// picture coordinates: the intra pixel across the vertical or horizontal MB edge,
// the nearer of the two (average on the diagonal), or the diagonal neighbour's
// corner pixel. Also checks that exactly the blocks needing padding are written,
// the 33-cycle macroblock time, and that each extension case occurred.
module tb_padding_engine;
  import svc_pkg::*;

  localparam int W = 6;     // macroblocks per row

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   start, left_edge, tl_intra, t_intra, l_intra, c_intra;
  line4_t a, b, c, d, e, f, g, h, i, j, k, l, m, n, o, p, q, v0_ext;
  logic   v4_we, busy, done, out_we;
  line4_t v4_data;
  logic [1:0] out_blk;
  logic [2:0] out_row;
  pix_t   out_pix [8];

  padding_engine dut (.*);

  int checks = 0, failures = 0;
  int pic [32][16*W];
  bit intra [2][W];
  int cnt_h = 0, cnt_v = 0, cnt_hv = 0, cnt_d = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // is the macroblock containing picture pixel (y, x) intra (and available)?
  function automatic bit is_intra(int y, int x, int mbx);
    int bx = x / 16;
    if (bx < mbx - 1) return 0;   // left of TL: outside the padding window
    return intra[y / 16][bx];
  endfunction

  // expected padded pixel at picture position (y, x) for current MB column mbx
  function automatic int ref_px(int y, int x, int mbx, output bit need, output int kind);
    int ox, oy, dx, dy, vy, vx, hy, hx;
    bit own, hn, vn, dn;
    ox = 16 * mbx;                 // vertical MB edge lies between ox-1 and ox
    oy = 16;                       // horizontal MB edge lies between 15 and 16
    own = is_intra(y, x, mbx);
    vx  = (x < ox) ? ox : ox - 1;  // pixel across the vertical edge
    hy  = (y < oy) ? oy : oy - 1;  // pixel across the horizontal edge
    hn  = is_intra(y, vx, mbx) && (mbx > 0 || vx >= 0);
    vn  = is_intra(hy, x, mbx);
    dn  = is_intra(hy, vx, mbx);
    if (vx < 0) begin hn = 0; dn = 0; end
    if (x < 0) own = 1;
    need = !own && (hn || vn || dn);
    dx = (x < ox) ? ox - 1 - x : x - ox;
    dy = (y < oy) ? oy - 1 - y : y - oy;
    kind = 0;
    if (!need) return 0;
    if (hn && vn) begin
      kind = 3;
      if (dx < dy) return pic[y][vx];
      if (dx > dy) return pic[hy][x];
      return (pic[y][vx] + pic[hy][x] + 1) / 2;
    end
    if (hn) begin kind = 1; return pic[y][vx]; end
    if (vn) begin kind = 2; return pic[hy][x]; end
    kind = 4;
    return pic[hy][vx];
  endfunction

  int nexp, ngot;
  int cur_mbx;
  int kinds [5];

  // checker: every written row must be expected; count rows written
  always @(posedge clk) begin
    if (rst_n && out_we) begin
      int y, x, ex, kd;
      bit nd;
      ngot++;
      y = 8 + 8 * out_blk[1] + out_row;
      for (int z = 0; z < 8; z++) begin
        x = 16 * cur_mbx - 8 + 8 * out_blk[0] + z;
        ex = ref_px(y, x, cur_mbx, nd, kd);
        checks++;
        if (!nd || out_pix[z] != pix_t'(ex)) begin
          failures++;
          if (failures < 10)
            $display("mb %0d blk %0d row %0d px %0d: got %0d expected %0d (need %0d)",
                     cur_mbx, out_blk, out_row, z, out_pix[z], ex, nd);
        end
        if (nd) kinds[kd]++;
      end
    end
  end

  task automatic run_mb(int mbx);
    int cx, cycles;
    bit nd;
    int kd, dummy;
    cx = 16 * mbx;
    cur_mbx = mbx;
    @(negedge clk);
    tl_intra = (mbx > 0) ? intra[0][mbx-1] : 1'b0;
    t_intra  = intra[0][mbx];
    l_intra  = (mbx > 0) ? intra[1][mbx-1] : 1'b0;
    c_intra  = intra[1][mbx];
    a = hline(15, cx);      b = hline(15, cx + 4); c = hline(15, cx + 8); d = hline(15, cx + 12);
    e = (mbx > 0) ? hline(16, cx - 4) : '0;
    f = hline(16, cx);      g = hline(16, cx + 4); h = hline(16, cx + 8); i = hline(16, cx + 12);
    j = (mbx > 0) ? vline(16, cx - 1) : '0;
    k = (mbx > 0) ? vline(20, cx - 1) : '0;
    l = (mbx > 0) ? vline(24, cx - 1) : '0;
    m = vline(12, cx);
    n = vline(16, cx);      o = vline(20, cx);     p = vline(24, cx);
    q = vline(12, cx + 15);
    // V0: the line the macroblock above stored (its V4), rows 8..11 at this edge
    v0_ext = (mbx > 0 && intra[0][mbx-1]) ? vline(8, cx - 1) : vline(8, cx);
    left_edge = (mbx == 0);
    start = 1;
    // expected number of padded rows
    nexp = 0;
    for (int bq = 0; bq < 4; bq++) begin
      int y, x;
      y = 8 + 8 * (bq / 2);
      x = cx - 8 + 8 * (bq % 2);
      dummy = ref_px(y, x, mbx, nd, kd);
      if (nd) nexp += 8;
    end
    ngot = 0;
    cycles = 0;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (cycles != 33) begin failures++; $display("mb %0d took %0d cycles", mbx, cycles); end
    checks++;
    if (ngot != nexp) begin failures++; $display("mb %0d: %0d rows written, %0d expected", mbx, ngot, nexp); end
  endtask

  initial begin
    start = 0; left_edge = 0; {tl_intra, t_intra, l_intra, c_intra} = '0;
    {a, b, c, d, e, f, g, h, i, j, k, l, m, n, o, p, q, v0_ext} = '0;
    foreach (kinds[z]) kinds[z] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 40; pass++) begin
      foreach (pic[y, x]) pic[y][x] = $urandom_range(0, 255);
      foreach (intra[r, x]) intra[r][x] = $urandom_range(0, 1);
      for (int x = 0; x < W; x++) run_mb(x);
    end
    // each extension kind must have been exercised
    for (int z = 1; z <= 4; z++) begin
      checks++;
      if (kinds[z] == 0) begin failures++; $display("extension kind %0d never occurred", z); end
    end
    $display("padded pixels: horizontal %0d vertical %0d both %0d diagonal %0d",
             kinds[1], kinds[2], kinds[3], kinds[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
