// bl_data_sram: base-layer data SRAM of the upsampling engine, two banks of
// dual-port SRAM (Bank 0 / Bank 1). While the upsample filter reads the window of
// the current macroblock from one bank, the next macroblock's base-layer data
// (mode-dependent: reconstructed intra texture after padding, or residual) is
// written from external memory into the other bank.
//
// One word is one row of the base-layer window, WORD_SAMPLES 9-bit samples.
// Default layout of a bank (28 words): rows 0..11 hold the 12x12 luma window
// (8x8 base-layer block plus 2 samples left/top and 2 right/bottom, the reach of
// the 4-tap filter), rows 12..19 the 8x8 Cb window and rows 20..27 the 8x8 Cr
// window (4x4 block plus 2 each side); chroma rows use the first 8 samples.
// Write and read each name their bank; the read is synchronous (one cycle).
module bl_data_sram
  import svc_pkg::*;
#(
  parameter int WORD_SAMPLES = 12,
  parameter int DEPTH        = 28,
  parameter int AW           = $clog2(DEPTH)
)(
  input  logic    clk,
  // write port (from external memory)
  input  logic    we,
  input  logic    wbank,
  input  logic [AW-1:0] waddr,
  input  sample_t wdata [WORD_SAMPLES],
  // read port (to the upsample filter)
  input  logic    re,
  input  logic    rbank,
  input  logic [AW-1:0] raddr,
  output sample_t rdata [WORD_SAMPLES]
);

  localparam int DW = WORD_SAMPLES * SAMPLE_W;

  logic [DW-1:0] wflat;
  logic [DW-1:0] rflat [2];
  logic          rbank_q;

  always_comb
    for (int i = 0; i < WORD_SAMPLES; i++)
      wflat[i*SAMPLE_W +: SAMPLE_W] = wdata[i];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dp_sram #(.DW(DW), .DEPTH(DEPTH), .AW(AW)) u_bank (
      .clk   (clk),
      .we    (we && (wbank == b[0])),
      .waddr (waddr),
      .wdata (wflat),
      .re    (re && (rbank == b[0])),
      .raddr (raddr),
      .rdata (rflat[b])
    );
  end

  always_ff @(posedge clk)
    if (re) rbank_q <= rbank;

  always_comb
    for (int i = 0; i < WORD_SAMPLES; i++)
      rdata[i] = sample_t'(rflat[rbank_q][i*SAMPLE_W +: SAMPLE_W]);

endmodule
