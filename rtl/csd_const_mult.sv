// csd_const_mult: multiplier-less multiplication of a signed operand by a
// fixed constant, p = floor(a * COEF / 2^FRAC).
//
// COEF is the constant scaled by 2^FRAC (12 fractional bits by default, as
// in the published CSD example). At elaboration it is recoded into
// canonical signed digits; for every non-zero digit i the operand, shifted
// left by i, is added (digit +1) or subtracted (digit -1). The exact integer
// sum a*COEF is then shifted right arithmetically by FRAC, which truncates
// towards minus infinity. Because CSD has no two adjacent non-zero digits,
// the adder count is at most about half the constant's bit count: 5351
// (sqrt2*sin(3pi/8)) takes 6 terms instead of the 8 ones of its binary form.
//
// Combinational, no clock. The product is returned in OW bits; the caller
// chooses OW large enough for |a| * COEF / 2^FRAC.
module csd_const_mult
  import dct_pkg::*;
#(
  parameter int          W    = 16,
  parameter int          OW   = 16,
  parameter int unsigned COEF = COEF_SQRT2,
  parameter int          FRAC = CSD_FRAC
) (
  input  logic signed [W-1:0]  a,
  output logic signed [OW-1:0] p
);

  localparam csd_t DIG  = csd_encode(COEF);
  localparam int   ACCW = W + CSD_DIGITS + 1;

  logic signed [ACCW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < CSD_DIGITS; i++) begin
      if (DIG.pos[i]) acc = acc + (ACCW'(a) <<< i);
      if (DIG.neg[i]) acc = acc - (ACCW'(a) <<< i);
    end
    p = OW'(acc >>> FRAC);
  end

  // The recoder must reproduce the constant exactly.
  initial begin
    assert (longint'(DIG.pos) - longint'(DIG.neg) == longint'(COEF))
      else $error("csd_const_mult: CSD recoding of %0d is wrong", COEF);
  end

endmodule
