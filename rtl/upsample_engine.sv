// upsample_engine: on-line upsampling engine for spatial-scalability inter-layer
// prediction (dyadic 2x). It runs in the first MB-pipeline stage of the
// enhancement layer: for each enhancement-layer macroblock it reads the
// co-located base-layer window (padded intra texture or residual) from the
// two-bank BL data SRAM, runs it through the FIR filter array and writes the
// 16x16 luma and two 8x8 chroma predictors to the UP data SRAM, where the second
// pipeline stage picks them up. The upsampled frame never goes to external memory.
//
// Schedule (upsample control). Planes are processed Y, Cb, Cr. A plane of
// base-layer size N (8 luma, 4 chroma) is cut into N/2 column groups of four output
// columns; per group the controller pushes window rows 0..3 (filter fill), then
// alternates {output phase 3/4 + push next row} and {output phase 1/4}, so a
// group takes 4+2N cycles and emits 2N rows of four samples. A macroblock takes
// 4*20 + 2*2*12 = 128 cycles plus a 2-cycle pipeline drain.
// Residual (ILRP) jobs clamp at transform-block edges (4x4, or 8x8 luma when
// t8x8 is set); intra (ILIP) jobs filter across them and are clipped.
//
// Interface:
//   ld_*    : writes one base-layer window row into the bank not being filtered
//   start   : pulse when idle; the bank just loaded becomes the filter bank and the
//             job (ilrp = residual, else intra; t8x8) starts. done pulses at the end.
//   up_*    : one UP data SRAM word (4 samples) per cycle. Address map:
//             luma row r, group g -> 4r+g (0..63); Cb -> 64+2r+g; Cr -> 80+2r+g.
// The engine structure (filter array, two SRAM banks, control) follows the
// document; the window layout, the schedule and the address map are this design's.
module upsample_engine
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // base-layer data load port (from external memory)
  input  logic       ld_we,
  input  logic [4:0] ld_addr,
  input  sample_t    ld_data [12],
  // job control
  input  logic       start,
  input  logic       ilrp,
  input  logic       t8x8,
  output logic       busy,
  output logic       done,
  // UP data SRAM write port
  output logic       up_we,
  output logic [6:0] up_addr,
  output sample_t    up_data [4]
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic       rd_bank;        // bank read by the filter; loads go to the other one
  logic       job_ilrp, job_t8;
  logic [1:0] plane;          // 0 = Y, 1 = Cb, 2 = Cr
  logic [1:0] grp;
  logic [4:0] step;
  logic [1:0] drain_cnt;

  // ---------------- issue stage (combinational decode of the counters) ----------------
  logic [3:0] n_bl;           // base-layer block size of the plane
  logic [4:0] last_step;
  logic [1:0] last_grp;
  logic       is_push, is_out, odd;
  logic [3:0] push_row, i_idx;
  logic [3:0] out_row;
  logic [3:0] bs_mask;
  logic [4:0] rd_base;
  up_mode_e   mode_i;
  logic       hcl_i, hcr_i, vcl_i;
  logic [6:0] oaddr_i;
  logic [4:0] t_step;

  always_comb begin
    n_bl      = (plane == 2'd0) ? 4'd8 : 4'd4;
    last_step = 5'(4 + 2 * n_bl - 1);
    last_grp  = (plane == 2'd0) ? 2'd3 : 2'd1;
    rd_base   = (plane == 2'd0) ? 5'd0 : (plane == 2'd1) ? 5'd12 : 5'd20;
    bs_mask   = (plane == 2'd0 && job_t8) ? 4'd7 : 4'd3;
    t_step    = step - 5'd4;
    odd       = t_step[0];
    i_idx     = t_step[4:1];
    is_out    = (step >= 5'd4);
    is_push   = (step < 5'd4) || (!odd && (i_idx < n_bl));
    push_row  = (step < 5'd4) ? step[3:0] : 4'(4 + i_idx);
    out_row   = odd ? 4'(2 * i_idx + 1) : 4'(2 * i_idx);
    mode_i    = job_ilrp ? UP_RESIDUAL : ((plane == 2'd0) ? UP_LUMA_INTRA : UP_CHROMA_INTRA);
    // transform-block edges (residual only); the tap generator ignores them otherwise
    hcl_i     = ((4'({grp, 1'b0})        & bs_mask) == 4'd0);
    hcr_i     = ((4'({grp, 1'b0} + 4'd2) & bs_mask) == 4'd0);
    // output row 2i (phase 3/4, m = i-1) and 2i+1 (phase 1/4, m = i): edge if (m+1)%bs == 0
    vcl_i     = (((odd ? i_idx + 4'd1 : i_idx)) & bs_mask) == 4'd0;
    unique case (plane)
      2'd0:    oaddr_i = 7'({out_row, grp});
      2'd1:    oaddr_i = 7'd64 + 7'({out_row[2:0], grp[0]});
      default: oaddr_i = 7'd80 + 7'({out_row[2:0], grp[0]});
    endcase
  end

  // ---------------- control FSM ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_bank   <= 1'b1;      // loads go to bank 0 first
      job_ilrp  <= 1'b0;
      job_t8    <= 1'b0;
      plane     <= '0;
      grp       <= '0;
      step      <= '0;
      drain_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          rd_bank  <= ~rd_bank;
          job_ilrp <= ilrp;
          job_t8   <= t8x8;
          plane    <= '0;
          grp      <= '0;
          step     <= '0;
        end
        S_RUN: begin
          if (step == last_step) begin
            step <= '0;
            if (grp == last_grp) begin
              grp <= '0;
              if (plane == 2'd2) begin
                state     <= S_DRAIN;
                drain_cnt <= 2'd1;
              end else begin
                plane <= plane + 2'd1;
              end
            end else begin
              grp <= grp + 2'd1;
            end
          end else begin
            step <= step + 5'd1;
          end
        end
        default: begin  // S_DRAIN: let the last output leave the filter
          if (drain_cnt == 2'd0) state <= S_IDLE;
          else                   drain_cnt <= drain_cnt - 2'd1;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DRAIN) && (drain_cnt == 2'd0);

  // ---------------- BL data SRAM ----------------
  sample_t rdata [12];
  logic    run;
  assign run = (state == S_RUN);

  bl_data_sram #(.WORD_SAMPLES(12), .DEPTH(28), .AW(5)) u_bl_sram (
    .clk   (clk),
    .we    (ld_we),
    .wbank (~rd_bank),
    .waddr (ld_addr),
    .wdata (ld_data),
    .re    (run && is_push),
    .rbank (rd_bank),
    .raddr (rd_base + 5'(push_row)),
    .rdata (rdata)
  );

  // ---------------- stage 1: operation meets SRAM data ----------------
  logic       d1_push, d1_out, d1_hcl, d1_hcr, d1_vcl;
  up_phase_e  d1_phase;
  up_mode_e   d1_mode;
  logic [1:0] d1_grp;
  logic [6:0] d1_addr, d2_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_push  <= 1'b0;
      d1_out   <= 1'b0;
      d1_hcl   <= 1'b0;
      d1_hcr   <= 1'b0;
      d1_vcl   <= 1'b0;
      d1_phase <= PH_Q1;
      d1_mode  <= UP_LUMA_INTRA;
      d1_grp   <= '0;
      d1_addr  <= '0;
      d2_addr  <= '0;
    end else begin
      d1_push  <= run && is_push;
      d1_out   <= run && is_out;
      d1_hcl   <= hcl_i;
      d1_hcr   <= hcr_i;
      d1_vcl   <= vcl_i;
      d1_phase <= odd ? PH_Q1 : PH_Q3;
      d1_mode  <= mode_i;
      d1_grp   <= grp;
      d1_addr  <= oaddr_i;
      d2_addr  <= d1_addr;
    end
  end

  sample_t win [6];
  always_comb
    for (int i = 0; i < 6; i++)
      win[i] = rdata[int'({d1_grp, 1'b0}) + i];

  upsample_filter u_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (d1_mode),
    .push      (d1_push),
    .in_pix    (win),
    .h_clamp_l (d1_hcl),
    .h_clamp_r (d1_hcr),
    .out_en    (d1_out),
    .out_phase (d1_phase),
    .v_clamp   (d1_vcl),
    .out_pix   (up_data),
    .out_valid (up_we)
  );

  assign up_addr = d2_addr;

endmodule
