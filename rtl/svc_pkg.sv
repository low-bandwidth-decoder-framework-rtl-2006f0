// svc_pkg: types and constants shared by the inter-layer prediction blocks of the
// low-bandwidth SVC decoder (upsampling engine, padding engine, layer-interleaving
// buffers and control).
//
// Samples travel as 9-bit signed values so that one datapath carries both 8-bit
// reconstructed intra texture (0..255) and 9-bit residual (-255..255). Filter
// coefficients are signed 7-bit numbers on a 1/32 scale. A "line" is the 4x1 pixel
// group the padding engine moves around (four 8-bit pixels, element 0 is the pixel
// nearest the top or the left).
package svc_pkg;

  localparam int SAMPLE_W = 9;
  localparam int COEF_W   = 7;
  localparam int PIX_W    = 8;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic [PIX_W-1:0]           pix_t;
  typedef pix_t [3:0]                 line4_t;   // 4x1 pixel line, [0] = top/left

  // What the upsampling datapath is asked to produce.
  typedef enum logic [1:0] {
    UP_LUMA_INTRA   = 2'd0,  // inter-layer intra prediction, luma: 4-tap FIR, clipped
    UP_CHROMA_INTRA = 2'd1,  // inter-layer intra prediction, chroma: 2-tap FIR, clipped
    UP_RESIDUAL     = 2'd2   // inter-layer residual prediction: bilinear inside a transform block
  } up_mode_e;

  // Interpolation phase of an enhancement-layer sample between base-layer samples
  // p1 and p2 of a 4-sample window (p0,p1,p2,p3).
  typedef enum logic {
    PH_Q1 = 1'b0,   // position p1 + 1/4
    PH_Q3 = 1'b1    // position p1 + 3/4
  } up_phase_e;

  // Where a decoding job sits in the layer-interleaved MB schedule.
  typedef struct packed {
    logic        valid;
    logic [15:0] mb;      // macroblock index in raster order
    logic [1:0]  layer;   // 0 = base layer, 1..3 = quality enhancement layers
  } mb_job_t;

endpackage
