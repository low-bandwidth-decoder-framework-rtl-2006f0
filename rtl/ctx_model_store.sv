// ctx_model_store: N-layer context-model SRAM with a context-model (CM) cache for
// the CABAC entropy decoder. In the layer-interleaved schedule the entropy
// decoder switches between the slices of all layers every macroblock, so the
// probability state of every layer's contexts must survive the switches: the
// SRAM holds NUM_LAYERS complete context sets (one per layer) and a small
// direct-mapped, write-back cache in front of it serves the context of the
// layer being decoded.
//
// A context model is 7 bits: {valMPS, pStateIdx[5:0]} as in H.264 CABAC.
// Access: when ready, pulse req with layer/ctx (and we/wdata for an update, also
// used to initialise contexts at a slice start). ack pulses with rdata (the value
// before any write) one cycle later on a hit and three cycles later on a miss
// (victim write-back and line fill overlap on the two SRAM ports).
// Index = ctx[IDX_W-1:0], tag = {layer, ctx[upper bits]}. SRAM address =
// layer*NUM_CTX + ctx.
// The document names the context SRAM and the cache; their organisation, size
// and protocol are this design's.
module ctx_model_store #(
  parameter int NUM_LAYERS = 4,     // base layer + three quality enhancement layers
  parameter int NUM_CTX    = 460,   // CABAC contexts per layer
  parameter int CTX_W      = 7,
  parameter int SETS       = 16,
  parameter int LW         = $clog2(NUM_LAYERS),
  parameter int CW         = $clog2(NUM_CTX),
  parameter int IDX_W      = $clog2(SETS),
  parameter int DEPTH      = NUM_LAYERS * NUM_CTX,
  parameter int AW         = $clog2(DEPTH)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             we,
  input  logic [LW-1:0]    layer,
  input  logic [CW-1:0]    ctx,
  input  logic [CTX_W-1:0] wdata,
  output logic             ready,
  output logic             ack,
  output logic [CTX_W-1:0] rdata,
  output logic             hit          // the access being acknowledged was a cache hit
);

  localparam int TW = LW + CW - IDX_W;

  typedef enum logic [1:0] {S_IDLE, S_MISS, S_FILL} state_e;
  state_e state;

  logic [TW-1:0]    tag_q  [SETS];
  logic [CTX_W-1:0] data_q [SETS];
  logic [SETS-1:0]  valid_q, dirty_q;

  // latched request
  logic             r_we;
  logic [LW-1:0]    r_layer;
  logic [CW-1:0]    r_ctx;
  logic [CTX_W-1:0] r_wdata;

  logic [IDX_W-1:0] idx, r_idx;
  logic [TW-1:0]    tag, r_tag;
  logic             lookup_hit;

  assign idx   = ctx[IDX_W-1:0];
  assign tag   = {layer, ctx[CW-1:IDX_W]};
  assign r_idx = r_ctx[IDX_W-1:0];
  assign r_tag = {r_layer, r_ctx[CW-1:IDX_W]};
  assign lookup_hit = valid_q[idx] && (tag_q[idx] == tag);
  assign ready = (state == S_IDLE);

  // SRAM ports
  logic             s_we, s_re;
  logic [AW-1:0]    s_waddr, s_raddr;
  logic [CTX_W-1:0] s_rdata;
  logic [LW-1:0]    v_layer;
  logic [CW-1:0]    v_ctx;

  always_comb begin
    {v_layer, v_ctx[CW-1:IDX_W]} = tag_q[r_idx];
    v_ctx[IDX_W-1:0] = r_idx;
    s_we    = (state == S_MISS) && valid_q[r_idx] && dirty_q[r_idx];
    s_waddr = AW'(v_layer) * AW'(NUM_CTX) + AW'(v_ctx);
    s_re    = (state == S_MISS);
    s_raddr = AW'(r_layer) * AW'(NUM_CTX) + AW'(r_ctx);
  end

  dp_sram #(.DW(CTX_W), .DEPTH(DEPTH), .AW(AW)) u_ctx_sram (
    .clk, .we(s_we), .waddr(s_waddr), .wdata(data_q[r_idx]),
    .re(s_re), .raddr(s_raddr), .rdata(s_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      valid_q <= '0;
      dirty_q <= '0;
      ack     <= 1'b0;
      hit     <= 1'b0;
      rdata   <= '0;
      r_we    <= 1'b0;
      r_layer <= '0;
      r_ctx   <= '0;
      r_wdata <= '0;
      for (int s = 0; s < SETS; s++) begin
        tag_q[s]  <= '0;
        data_q[s] <= '0;
      end
    end else begin
      ack <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          r_we    <= we;
          r_layer <= layer;
          r_ctx   <= ctx;
          r_wdata <= wdata;
          if (lookup_hit) begin
            ack   <= 1'b1;
            hit   <= 1'b1;
            rdata <= data_q[idx];
            if (we) begin
              data_q[idx]  <= wdata;
              dirty_q[idx] <= 1'b1;
            end
          end else begin
            state <= S_MISS;
          end
        end
        S_MISS: state <= S_FILL;       // victim written back, requested context read
        default: begin                 // S_FILL: install the line and answer
          valid_q[r_idx] <= 1'b1;
          tag_q[r_idx]   <= r_tag;
          data_q[r_idx]  <= r_we ? r_wdata : s_rdata;
          dirty_q[r_idx] <= r_we;
          rdata          <= s_rdata;
          ack            <= 1'b1;
          hit            <= 1'b0;
          state          <= S_IDLE;
        end
      endcase
    end
  end

  a_req_when_ready: assert property (@(posedge clk) disable iff (!rst_n) req |-> ready)
    else $error("ctx_model_store: request while busy");

endmodule
