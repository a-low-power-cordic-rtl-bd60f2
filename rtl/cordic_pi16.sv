// cordic_pi16: approximate rotation by pi/16 (rotator C1 of the Loeffler
// DCT) as two unfolded CORDIC micro-rotations, with shift-adds only.
//
//   x1 = x  + y >>> 3     y1 = y  - x >>> 3
//   xo = x1 + y1 >>> 4    yo = y1 - x1 >>> 4
//
// The micro-rotation angles are atan(2^-3) + atan(2^-4) = 10.70 degrees
// against the exact 11.25. The CORDIC gain sqrt(1+2^-6)*sqrt(1+2^-8) =
// 1.0097 is so close to one that no compensation is applied: the outputs
// are about 1% larger than an exact rotation. Directions follow the rotator
// equations (r0 = x cos + y sin, r1 = -x sin + y cos). The shifts are
// arithmetic and truncate; the caller provides fractional guard bits.
// The shifts and the omitted compensation follow the published
// architecture; the truncating shifts and the widths are this design's.
//
// Combinational, W-bit signed inputs and outputs.
module cordic_pi16 #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] x1, y1;

  always_comb begin
    x1    = x_in + (y_in >>> 3);
    y1    = y_in - (x_in >>> 3);
    x_out = x1 + (y1 >>> 4);
    y_out = y1 - (x1 >>> 4);
  end

endmodule
