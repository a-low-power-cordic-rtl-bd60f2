// csd_rotator: the rotator kCn of the Loeffler DCT with its four
// multiplications done by CSD shift-add constant multipliers.
//
//   r0 =  i0 * k*cos(n*pi/16) + i1 * k*sin(n*pi/16)
//   r1 = -i0 * k*sin(n*pi/16) + i1 * k*cos(n*pi/16)
//
// The structure is the direct one: four constant multipliers and two
// adders, no pre-addition, which keeps the critical path short and avoids
// the intermediate overflow of the three-multiplier form. The defaults are
// the one rotator of the proposed DCT that uses it, k = sqrt2 and n = 6
// (angle 3pi/8), with the constants of dct_pkg (12 fractional bits,
// truncated). Each product is truncated to the operand's scale before the
// add, so r0/r1 can differ from the exact value by up to two LSBs plus the
// constants' quantisation. The four-multiplier structure, the CSD
// multipliers and the 12-bit constants follow the published architecture;
// truncating each product before the add is this design's choice.
//
// Combinational. W-bit signed inputs and outputs; the caller leaves enough
// headroom for a gain of k*(|cos|+|sin|) (1.85 for the defaults).
module csd_rotator
  import dct_pkg::*;
#(
  parameter int          W     = 16,
  parameter int unsigned K_COS = COEF_R6_COS,
  parameter int unsigned K_SIN = COEF_R6_SIN
) (
  input  logic signed [W-1:0] i0,
  input  logic signed [W-1:0] i1,
  output logic signed [W-1:0] r0,
  output logic signed [W-1:0] r1
);

  logic signed [W-1:0] i0_cos, i0_sin, i1_cos, i1_sin;

  csd_const_mult #(.W(W), .OW(W), .COEF(K_COS)) u_i0_cos (.a(i0), .p(i0_cos));
  csd_const_mult #(.W(W), .OW(W), .COEF(K_SIN)) u_i0_sin (.a(i0), .p(i0_sin));
  csd_const_mult #(.W(W), .OW(W), .COEF(K_COS)) u_i1_cos (.a(i1), .p(i1_cos));
  csd_const_mult #(.W(W), .OW(W), .COEF(K_SIN)) u_i1_sin (.a(i1), .p(i1_sin));

  always_comb begin
    r0 = i0_cos + i1_sin;
    r1 = i1_cos - i0_sin;
  end

endmodule
