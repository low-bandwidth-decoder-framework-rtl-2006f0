// upsample_filter: the FIR filter array of the upsampling engine.
//
// Structure: six base-layer samples of one row enter per push. Four horizontal
// FIR cells turn them into four 2x-upsampled samples (output columns 2k..2k+3 from
// input columns k-2..k+3). Each of the four columns keeps its last four horizontal
// results in a shift register (R0 oldest .. R3 newest). Four vertical FIR cells
// filter the shift registers, producing four enhancement-layer samples per
// output cycle. One pushed row yields two output rows (phase 1/4 and 3/4), so in
// steady state a row is pushed every second cycle and four samples leave every
// cycle; a push and an output may happen in the same cycle (the output uses the
// register contents from before the push).
//
// Arithmetic: horizontal and vertical coefficients are on a 1/32 scale, so the
// result is (V + 512) >> 10. Intra (texture) results are clipped to [0,255];
// residual results are not clipped (the bilinear weights cannot leave the input
// range). The clip, the tap selection and the shift-register control are
// the document's "clip control", "FIR tap generator" and "register control".
//
// Interface: push + in_pix + h_clamp_l/h_clamp_r (residual only: a transform-block
// edge lies left of input column k / right of k+1). out_en + out_phase + v_clamp
// request one output row; out_pix/out_valid follow one cycle later.
module upsample_filter
  import svc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  up_mode_e  mode,
  // row input
  input  logic      push,
  input  sample_t   in_pix [6],
  input  logic      h_clamp_l,
  input  logic      h_clamp_r,
  // output request
  input  logic      out_en,
  input  up_phase_e out_phase,
  input  logic      v_clamp,
  output sample_t   out_pix [4],
  output logic      out_valid
);

  localparam int HW = SAMPLE_W + COEF_W + 2;  // horizontal result width
  localparam int VW = HW + COEF_W + 2;        // vertical result width

  // ---------------- horizontal stage ----------------
  coef_t hc [4][4];
  logic signed [HW-1:0] hsum [4];

  // column 2k   : p(k-1)+3/4, window in[0..3], edge between in[1] and in[2]
  // column 2k+1 : p(k)  +1/4, window in[1..4]
  // column 2k+2 : p(k)  +3/4, window in[1..4]
  // column 2k+3 : p(k+1)+1/4, window in[2..5], edge between in[3] and in[4]
  up_tap_gen u_htap0 (.mode(mode), .phase(PH_Q3), .clamp(h_clamp_l), .coef(hc[0]));
  up_tap_gen u_htap1 (.mode(mode), .phase(PH_Q1), .clamp(1'b0),      .coef(hc[1]));
  up_tap_gen u_htap2 (.mode(mode), .phase(PH_Q3), .clamp(1'b0),      .coef(hc[2]));
  up_tap_gen u_htap3 (.mode(mode), .phase(PH_Q1), .clamp(h_clamp_r), .coef(hc[3]));

  sample_t hwin [4][4];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      hwin[0][i] = in_pix[i];
      hwin[1][i] = in_pix[i+1];
      hwin[2][i] = in_pix[i+1];
      hwin[3][i] = in_pix[i+2];
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_hfir
    up_fir4 #(.IW(SAMPLE_W)) u_fir (.x(hwin[c]), .c(hc[c]), .y(hsum[c]));
  end

  // ---------------- column shift registers (register control) ----------------
  logic signed [HW-1:0] sr [4][4];   // sr[col][0] oldest row .. sr[col][3] newest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) sr[c][r] <= '0;
    end else if (push) begin
      for (int c = 0; c < 4; c++) begin
        for (int r = 0; r < 3; r++) sr[c][r] <= sr[c][r+1];
        sr[c][3] <= hsum[c];
      end
    end
  end

  // ---------------- vertical stage ----------------
  coef_t vc [4];
  up_tap_gen u_vtap (.mode(mode), .phase(out_phase), .clamp(v_clamp), .coef(vc));

  logic signed [VW-1:0] vsum [4];
  for (genvar c = 0; c < 4; c++) begin : g_vfir
    up_fir4 #(.IW(HW)) u_fir (.x(sr[c]), .c(vc), .y(vsum[c]));
  end

  // ---------------- rounding and clip control ----------------
  function automatic sample_t round_clip(input logic signed [VW-1:0] v, input logic clip);
    logic signed [VW-1:0] r;
    r = (v + VW'(512)) >>> 10;
    if (clip) begin
      if (r < 0)        return sample_t'(0);
      else if (r > 255) return sample_t'(255);
      else              return sample_t'(r);
    end
    return sample_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < 4; c++) out_pix[c] <= '0;
    end else begin
      out_valid <= out_en;
      if (out_en)
        for (int c = 0; c < 4; c++)
          out_pix[c] <= round_clip(vsum[c], mode != UP_RESIDUAL);
    end
  end

endmodule
