// pad_filter: the padding filter. For one of the four 8x8 blocks of the padding
// block (q = 0: TL quadrant, 1: T, 2: L, 3: C) and one of its rows it produces the
// eight border-extended pixels in one cycle (combinational).
//
// Inputs of block q: its vertical boundary line (V0,V1 for the upper blocks,
// V2,V3 for the lower) and its horizontal boundary line (H0,H1 for the left
// blocks, H2,H3 for the right), as the document assigns them. The block is padded
// only if its own macroblock is inter-coded; the direction follows which
// neighbours are intra-coded, in the manner of H.264 intra prediction:
//   horizontal neighbour only : each row copies the vertical line (horizontal extension)
//   vertical neighbour only   : each column copies the horizontal line (vertical extension)
//   both                      : a pixel copies the nearer line; pixels on the
//                               diagonal take (V + H + 1) >> 1
//   diagonal neighbour only   : every pixel copies the neighbour's corner pixel
//                               (H2[0] for the left blocks, H1[3] for the right)
//   none                      : nothing to pad (need = 0)
// The set of inputs per block is the document's; the exact extension rules are
// this design's reading of its border-extension figure.
module pad_filter
  import svc_pkg::*;
(
  input  logic [1:0] blk,
  input  logic [2:0] row,
  input  logic       tl_intra, t_intra, l_intra, c_intra,
  input  line4_t     vl [4],     // V0..V3
  input  line4_t     hl [4],     // H0..H3
  output logic       need,       // block is inter-coded and has an intra neighbour
  output pix_t       pix [8]     // padded row, pixel 0 = leftmost
);

  logic [3:0] intra;             // indexed by quadrant
  assign intra = {c_intra, l_intra, t_intra, tl_intra};

  logic own, hn, vn, dn;
  pix_t vpix, hp [8], corner;
  logic [8:0] avg [8];
  logic [2:0] dy;

  always_comb begin
    own = intra[blk];
    hn  = intra[blk ^ 2'b01];    // across the vertical line
    vn  = intra[blk ^ 2'b10];    // across the horizontal line
    dn  = intra[blk ^ 2'b11];    // diagonal
    need = !own && (hn || vn || dn);
    // boundary samples of this block
    vpix = blk[1] ? ((row < 3'd4) ? vl[2][row[1:0]] : vl[3][row[1:0]])
                  : ((row < 3'd4) ? vl[0][row[1:0]] : vl[1][row[1:0]]);
    for (int x = 0; x < 8; x++)
      hp[x] = blk[0] ? ((x < 4) ? hl[2][x % 4] : hl[3][x % 4])
                     : ((x < 4) ? hl[0][x % 4] : hl[1][x % 4]);
    corner = blk[0] ? hl[1][3] : hl[2][0];
    dy     = blk[1] ? row : 3'd7 - row;          // distance from the horizontal line
    for (int x = 0; x < 8; x++) begin
      logic [2:0] dx;
      dx  = blk[0] ? 3'(x) : 3'(7 - x);          // distance from the vertical line
      avg[x] = (9'(vpix) + 9'(hp[x]) + 9'd1) >> 1;   // avg[x][8] is always 0
      if (hn && vn) begin
        if (dx < dy)      pix[x] = vpix;
        else if (dx > dy) pix[x] = hp[x];
        else              pix[x] = avg[x][7:0];
      end else if (hn) pix[x] = vpix;
      else if (vn)     pix[x] = hp[x];
      else if (dn)     pix[x] = corner;
      else             pix[x] = '0;
    end
  end

endmodule
