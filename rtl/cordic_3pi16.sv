// cordic_3pi16: approximate rotation by 3pi/16 (rotator C3 of the Loeffler
// DCT) as two unfolded CORDIC micro-rotations followed by a CSD gain
// compensation.
//
//   x1 = x  + y >>> 1     y1 = y  - x >>> 1
//   x2 = x1 + y1 >>> 3    y2 = y1 - x1 >>> 3
//   xo = x2 * C           yo = y2 * C,   C = COEF_C3_COMP / 4096 = 0.8875
//
// atan(2^-1) + atan(2^-3) = 33.69 degrees against the exact 33.75. Unlike
// the pi/16 rotation, these two iterations have a gain of 1.1267, which is
// too far from one to ignore, and the outputs meet the (almost unity-gain)
// pi/16 outputs in the next butterflies, so the gain cannot be moved past
// them: it is removed here, with one CSD constant multiplier per output
// (3635 = 2^12 - 2^9 + 2^6 - 2^4 + 2^2 - 2^0). The choice of shifts and the
// place of the compensation are this design's; the block itself, a CORDIC
// 3pi/16 rotator in the odd half of the DCT, is from the published architecture.
//
// Combinational, W-bit signed inputs and outputs; the caller leaves one bit
// of headroom for the 1.13 gain before compensation.
module cordic_3pi16
  import dct_pkg::*;
#(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] x1, y1, x2, y2;

  always_comb begin
    x1 = x_in + (y_in >>> 1);
    y1 = y_in - (x_in >>> 1);
    x2 = x1 + (y1 >>> 3);
    y2 = y1 - (x1 >>> 3);
  end

  csd_const_mult #(.W(W), .OW(W), .COEF(COEF_C3_COMP)) u_comp_x (.a(x2), .p(x_out));
  csd_const_mult #(.W(W), .OW(W), .COEF(COEF_C3_COMP)) u_comp_y (.a(y2), .p(y_out));

endmodule
