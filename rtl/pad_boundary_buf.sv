// pad_boundary_buf: the twelve 4x1 boundary pixel lines of the padding engine
// (V0..V5 vertical, H0..H5 horizontal), loaded once per base-layer macroblock.
//
// The padding block of the current macroblock C is the 16x16 square centred on
// its top-left corner: the bottom-right 8x8 of the top-left neighbour TL, the
// bottom-left 8x8 of the top neighbour T, the top-right 8x8 of the left neighbour
// L and the top-left 8x8 of C. V0,V1 run down the vertical MB edge through the
// upper half (rows 8..15 of TL/T), V2,V3 through the lower half (rows 0..7 of L/C)
// and V4 continues to rows 8..11. H0,H1 run along the horizontal MB edge under TL
// (columns 8..15), H2,H3 over C's columns 0..7 and H4,H5 over C's columns 8..15.
// V5 is the bottom four pixels of T's right column.
//
// Only intra-coded pixels are useful as padding input, so which neighbour a line
// is taken from depends on the intra flags of (TL,T,L,C), per the document's
// assignment table:
//   V1    : M (T left column, rows 12..15) if T intra, else V5 of the previous MB if TL intra
//   V2..4 : J,K,L (L right column) if L intra, else N,O,P (C left column) if C intra
//   V5    : Q always
//   H0    : H4 of the previous MB if L or TL intra
//   H1    : E (L top row, columns 12..15, after deblocking) if L intra,
//           else H5 of the previous MB if TL intra
//   H2..5 : F,G,H,I (C top row) if C intra, else A,B,C,D (T bottom row) if T intra
//   V0    : always from external memory (the V4 saved by the macroblock above)
// "Previous MB" values are the registers' own contents before the load, so no
// extra pipeline registers are needed. Don't-care lines keep their old contents.
// After a load, V4 is the line to be written to external memory for the MB below.
// The caller marks unavailable neighbours (outside the picture) as inter-coded.
module pad_boundary_buf
  import svc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   tl_intra, t_intra, l_intra, c_intra,
  // sources from the deblocking filter / pipelined MB data (names as in the document)
  input  line4_t a, b, c, d,          // T bottom row, columns 0..15
  input  line4_t e,                   // L top row, columns 12..15
  input  line4_t f, g, h, i,          // C top row, columns 0..15
  input  line4_t j, k, l,             // L right column, rows 0..11
  input  line4_t m,                   // T left column, rows 12..15
  input  line4_t n, o, p,             // C left column, rows 0..11
  input  line4_t q,                   // T right column, rows 12..15
  input  line4_t v0_ext,              // from external memory
  output line4_t vl [6],              // V0..V5
  output line4_t hl [6]               // H0..H5
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < 6; x++) begin
        vl[x] <= '0;
        hl[x] <= '0;
      end
    end else if (load) begin
      vl[0] <= v0_ext;
      if (t_intra)       vl[1] <= m;
      else if (tl_intra) vl[1] <= vl[5];
      if (l_intra) begin
        vl[2] <= j; vl[3] <= k; vl[4] <= l;
      end else if (c_intra) begin
        vl[2] <= n; vl[3] <= o; vl[4] <= p;
      end
      vl[5] <= q;
      if (l_intra || tl_intra) hl[0] <= hl[4];
      if (l_intra)       hl[1] <= e;
      else if (tl_intra) hl[1] <= hl[5];
      if (c_intra) begin
        hl[2] <= f; hl[3] <= g; hl[4] <= h; hl[5] <= i;
      end else if (t_intra) begin
        hl[2] <= a; hl[3] <= b; hl[4] <= c; hl[5] <= d;
      end
    end
  end

endmodule
