// up_fir4: one 4-tap FIR cell of the upsampling filter array (four multipliers and
// an adder tree): y = c0*x0 + c1*x1 + c2*x2 + c3*x3, full precision, no rounding.
// IW is the signed input width; the output is IW+COEF_W+2 bits wide so that no sum
// can overflow. Purely combinational.
module up_fir4
  import svc_pkg::*;
#(
  parameter int IW = SAMPLE_W
)(
  input  logic signed [IW-1:0]          x [4],
  input  coef_t                         c [4],
  output logic signed [IW+COEF_W+1:0]   y
);

  localparam int OW = IW + COEF_W + 2;

  always_comb begin
    logic signed [OW-1:0] xe, ce;
    y = '0;
    for (int i = 0; i < 4; i++) begin
      xe = OW'(x[i]);   // sign-extending casts: both operands are signed
      ce = OW'(c[i]);
      y += xe * ce;
    end
  end

endmodule
