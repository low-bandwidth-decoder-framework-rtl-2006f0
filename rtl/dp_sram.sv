// dp_sram: simple dual-port SRAM model (one write port, one read port, one clock).
// The read is synchronous: rdata holds the word at raddr one cycle after re.
// A read of the address being written in the same cycle returns the old word.
// Written as an array so that synthesis can map it to an SRAM macro.
module dp_sram #(
  parameter int DW    = 108,
  parameter int DEPTH = 28,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
)(
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
