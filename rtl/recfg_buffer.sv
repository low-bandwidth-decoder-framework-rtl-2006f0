// recfg_buffer: reconfigurable MB-pipeline buffer (used for the Residual SRAM, the
// UP Data SRAM and the REC Data SRAM of the decoder).
//
// Two banks of one macroblock each. In the ordinary configuration they are a
// ping-pong pipeline buffer between two MB-pipeline stages: the producing stage
// writes bank wsel while the consuming stage reads the other, and a swap pulse at
// each MB-pipeline step exchanges the roles.
// In the layer-interleaved configuration (ilp_mode = 1, quality scalability) the
// same banks also act as the internal inter-layer prediction buffer: while the
// producing stage decodes layer n of a macroblock into its bank, it reads the
// data of layer n-1 of the same macroblock, which sits in the other bank because
// that bank was written one step earlier and is now being consumed. No extra
// buffer and no external-memory traffic are needed for the inter-layer data.
// The reconfigurable-buffer idea is the document's; the two-bank organisation and
// the ports are this design's.
//
// Ports: p_* = producer write; ilp_* = producer's read of the other bank
// (ilp_mode only); c_* = consumer read. Reads are synchronous (one cycle).
module recfg_buffer #(
  parameter int DW    = 36,   // one word = four 9-bit samples
  parameter int WORDS = 96,   // 384 samples = one 4:2:0 macroblock
  parameter int AW    = $clog2(WORDS)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ilp_mode,
  input  logic          swap,
  // producer stage
  input  logic          p_we,
  input  logic [AW-1:0] p_addr,
  input  logic [DW-1:0] p_wdata,
  input  logic          ilp_re,
  input  logic [AW-1:0] ilp_addr,
  output logic [DW-1:0] ilp_rdata,
  // consumer stage
  input  logic          c_re,
  input  logic [AW-1:0] c_addr,
  output logic [DW-1:0] c_rdata,
  output logic          wsel            // bank written by the producer
);

  logic [DW-1:0] mem0 [WORDS];
  logic [DW-1:0] mem1 [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wsel <= 1'b0;
    else if (swap) wsel <= ~wsel;
  end

  always_ff @(posedge clk) begin
    if (p_we && !wsel) mem0[p_addr] <= p_wdata;
    if (p_we &&  wsel) mem1[p_addr] <= p_wdata;
    if (c_re)                c_rdata   <= wsel ? mem0[c_addr]   : mem1[c_addr];
    if (ilp_re && ilp_mode)  ilp_rdata <= wsel ? mem0[ilp_addr] : mem1[ilp_addr];
  end

  // The inter-layer read is only meaningful in the layer-interleaved configuration.
  a_ilp_only_in_ilp_mode: assert property (@(posedge clk) disable iff (!rst_n) !(ilp_re && !ilp_mode))
    else $error("recfg_buffer: inter-layer read while configured as a pipeline buffer");

endmodule
