// layer_bitstream_buf: per-layer bitstream buffer between the memory controller
// and the entropy decoder.
//
// In layer-interleaved decoding the entropy decoder works on the slices of all
// layers in turn, one macroblock each. So the bitstream of every layer must be
// buffered separately and resumed where that layer stopped. This buffer keeps
// one FIFO per layer. All FIFOs share one dual-port SRAM: layer l owns the words
// l*LDEPTH .. l*LDEPTH+LDEPTH-1, with its own read and write pointers.
//
// Interface and timing:
//   wr_en/wr_layer/wr_data: the memory controller appends a 32-bit word to a
//     layer's FIFO. It must not write a layer whose full bit is set.
//   rd_en/rd_layer: the entropy decoder takes the oldest word of a layer. It must
//     not read a layer whose empty bit is set. rd_valid/rd_data follow one cycle
//     later.
//   empty/full are per layer. refill asks the memory controller for more data
//     for a layer whose FIFO holds no more than half of its depth.
//   A word written in one cycle can be read from the next cycle on.
// The stack of per-layer bitstream buffers is from the source design's system
// architecture. The shared-SRAM FIFO organisation, the depth and the refill
// threshold are this design's choice.
module layer_bitstream_buf #(
  parameter int NUM_LAYERS = 4,     // base layer + three quality enhancement layers
  parameter int LDEPTH     = 32,    // words per layer
  parameter int DW         = 32,
  parameter int LW         = $clog2(NUM_LAYERS),
  parameter int PW         = $clog2(LDEPTH)
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [LW-1:0]         wr_layer,
  input  logic [DW-1:0]         wr_data,
  input  logic                  rd_en,
  input  logic [LW-1:0]         rd_layer,
  output logic                  rd_valid,
  output logic [DW-1:0]         rd_data,
  output logic [NUM_LAYERS-1:0] empty,
  output logic [NUM_LAYERS-1:0] full,
  output logic [NUM_LAYERS-1:0] refill
);

  // pointers carry one extra bit to tell full from empty
  logic [PW:0] wptr [NUM_LAYERS];
  logic [PW:0] rptr [NUM_LAYERS];

  dp_sram #(.DW(DW), .DEPTH(NUM_LAYERS * LDEPTH)) u_mem (
    .clk,
    .we(wr_en), .waddr({wr_layer, wptr[wr_layer][PW-1:0]}), .wdata(wr_data),
    .re(rd_en), .raddr({rd_layer, rptr[rd_layer][PW-1:0]}), .rdata(rd_data)
  );

  always_comb begin
    for (int l = 0; l < NUM_LAYERS; l++) begin
      logic [PW:0] level;
      level     = wptr[l] - rptr[l];
      empty[l]  = (level == '0);
      full[l]   = (level == (PW+1)'(LDEPTH));
      refill[l] = (level <= (PW+1)'(LDEPTH / 2));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      for (int l = 0; l < NUM_LAYERS; l++) begin
        wptr[l] <= '0;
        rptr[l] <= '0;
      end
    end else begin
      rd_valid <= rd_en;
      if (wr_en) wptr[wr_layer] <= wptr[wr_layer] + 1'b1;
      if (rd_en) rptr[rd_layer] <= rptr[rd_layer] + 1'b1;
    end
  end

  // handshake rules: no write into a full FIFO, no read from an empty one
  a_no_overflow:  assert property (@(posedge clk) !(rst_n && wr_en && full[wr_layer]));
  a_no_underflow: assert property (@(posedge clk) !(rst_n && rd_en && empty[rd_layer]));

endmodule
