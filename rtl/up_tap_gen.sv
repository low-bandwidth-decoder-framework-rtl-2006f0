// up_tap_gen: FIR tap generator of the upsampling engine.
//
// Produces the four coefficients (1/32 scale) applied to a window of base-layer
// samples (p0,p1,p2,p3) to obtain one dyadic (2x) enhancement-layer sample at
// position p1+1/4 (PH_Q1) or p1+3/4 (PH_Q3).
//   * luma intra  : 4-tap filter (-3,28,8,-1) / (-1,8,28,-3)
//   * chroma intra: 2-tap filter (0,24,8,0) / (0,8,24,0)
//   * residual    : same bilinear weights, but when a transform-block edge lies
//                   between p1 and p2 (clamp=1) the sample is taken whole from the
//                   base-layer sample of its own block: (0,32,0,0) / (0,0,32,0),
//                   so the filter never reads across a transform-block edge.
// The 4-tap/2-tap split and the no-crossing rule for residual follow the document;
// the coefficient values are those of the SVC standard's dyadic case.
// Purely combinational.
module up_tap_gen
  import svc_pkg::*;
(
  input  up_mode_e  mode,
  input  up_phase_e phase,
  input  logic      clamp,
  output coef_t     coef [4]
);

  always_comb begin
    unique case (mode)
      UP_LUMA_INTRA: begin
        if (phase == PH_Q1) coef = '{-7'sd3, 7'sd28, 7'sd8, -7'sd1};
        else                coef = '{-7'sd1, 7'sd8, 7'sd28, -7'sd3};
      end
      UP_RESIDUAL: begin
        if (clamp) begin
          if (phase == PH_Q1) coef = '{7'sd0, 7'sd32, 7'sd0, 7'sd0};
          else                coef = '{7'sd0, 7'sd0, 7'sd32, 7'sd0};
        end else begin
          if (phase == PH_Q1) coef = '{7'sd0, 7'sd24, 7'sd8, 7'sd0};
          else                coef = '{7'sd0, 7'sd8, 7'sd24, 7'sd0};
        end
      end
      default: begin  // UP_CHROMA_INTRA
        if (phase == PH_Q1) coef = '{7'sd0, 7'sd24, 7'sd8, 7'sd0};
        else                coef = '{7'sd0, 7'sd8, 7'sd24, 7'sd0};
      end
    endcase
  end

endmodule
