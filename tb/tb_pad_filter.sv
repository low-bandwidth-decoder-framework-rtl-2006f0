// tb_pad_filter: self-checking test of the padding filter on its own.
// The 16x16 padding block is modelled in its own coordinates: a vertical line of
// 16 pixels between columns 7 and 8 (V0..V3 from the top) and a horizontal line
// of 16 pixels between rows 7 and 8 (H0..H3 from the left). For random lines and
// every intra pattern, every row of every block is compared with the extension
// rule applied to that picture: copy across the edge whose neighbour is intra,
// the nearer edge (average on the diagonal) when both are, the corner pixel across
// both edges when only the diagonal neighbour is; need is checked too.
module tb_pad_filter;
  import svc_pkg::*;

  logic [1:0] blk;
  logic [2:0] row;
  logic       tl_intra, t_intra, l_intra, c_intra, need;
  line4_t     vl [4], hl [4];
  pix_t       pix [8];

  pad_filter dut (.*);

  int checks = 0, failures = 0;
  int vline [16], hline [16];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      bit [3:0] md;
      md = 4'($urandom_range(0, 15));     // {C, L, T, TL}
      {c_intra, l_intra, t_intra, tl_intra} = md;
      for (int z = 0; z < 16; z++) begin
        vline[z] = $urandom_range(0, 255);
        hline[z] = $urandom_range(0, 255);
        vl[z / 4][z % 4] = pix_t'(vline[z]);
        hl[z / 4][z % 4] = pix_t'(hline[z]);
      end
      for (int bq = 0; bq < 4; bq++)
        for (int r = 0; r < 8; r++) begin
          int y, x, dx, dy, ex;
          bit own, hn, vn, dn, nd;
          blk = 2'(bq); row = 3'(r);
          #1;
          y   = 8 * (bq / 2) + r;
          own = md[bq];
          hn  = md[bq ^ 1];
          vn  = md[bq ^ 2];
          dn  = md[bq ^ 3];
          nd  = !own && (hn || vn || dn);
          checks++;
          if (need != nd) begin failures++; $display("need %0d expected %0d", need, nd); end
          if (!nd) continue;
          for (int z = 0; z < 8; z++) begin
            x  = 8 * (bq % 2) + z;
            dx = (x < 8) ? 7 - x : x - 8;
            dy = (y < 8) ? 7 - y : y - 8;
            if (hn && vn) ex = (dx < dy) ? vline[y] : (dx > dy) ? hline[x] : (vline[y] + hline[x] + 1) / 2;
            else if (hn)  ex = vline[y];
            else if (vn)  ex = hline[x];
            else          ex = (x < 8) ? hline[8] : hline[7];
            checks++;
            if (pix[z] != pix_t'(ex)) begin
              failures++;
              if (failures < 10)
                $display("modes %04b blk %0d row %0d px %0d: got %0d expected %0d", md, bq, r, z, pix[z], ex);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
