// dct_pkg: constants and the CSD recoder shared by the 8-point Loeffler DCT.
//
// All fixed multiplicands are stored as integers scaled by 2^CSD_FRAC, that is
// with 12 bits after the binary point, and truncated (not rounded) to that
// precision, the way the CSD example for sqrt2*sin(3pi/8) is written
// (binary 1.010011100111 = 5351/4096). The constant multipliers do not use
// these integers as binary numbers: csd_encode() recodes each one at
// elaboration time into canonical signed digits (digits -1, 0, +1 with no two
// adjacent non-zero digits), and the hardware adds or subtracts one shifted
// copy of the operand per non-zero digit.
//
// Constants (formula, then value):
//   COEF_SQRT2    floor(sqrt(2)              * 4096) = 5792
//   COEF_R6_COS   floor(sqrt(2) * cos(3pi/8) * 4096) = 2216
//   COEF_R6_SIN   floor(sqrt(2) * sin(3pi/8) * 4096) = 5351
//   COEF_C3_COMP  floor(4096 / (sqrt(1 + 2^-2) * sqrt(1 + 2^-6))) = 3635
// COEF_C3_COMP undoes the gain of the two CORDIC micro-rotations (shifts 1
// and 3) of the 3pi/16 rotator; it is this design's choice, see cordic_3pi16.
package dct_pkg;

  localparam int CSD_FRAC   = 12;   // bits after the binary point of every constant
  localparam int CSD_DIGITS = 18;   // enough digits for any constant below 2^17

  localparam int unsigned COEF_SQRT2   = 5792;
  localparam int unsigned COEF_R6_COS  = 2216;
  localparam int unsigned COEF_R6_SIN  = 5351;
  localparam int unsigned COEF_C3_COMP = 3635;

  // One canonical signed-digit number: digit i is +1 where pos[i] is set,
  // -1 where neg[i] is set, and 0 elsewhere.
  typedef struct packed {
    logic [CSD_DIGITS-1:0] pos;
    logic [CSD_DIGITS-1:0] neg;
  } csd_t;

  // Recode a non-negative integer into CSD. At each step an odd remainder
  // takes digit +1 when it is 1 mod 4 and -1 when it is 3 mod 4, which
  // leaves the next remainder even, so no two non-zero digits are adjacent.
  function automatic csd_t csd_encode(input int unsigned value);
    csd_t        d;
    longint      v;
    d = '0;
    v = longint'(value);
    for (int i = 0; i < CSD_DIGITS; i++) begin
      if (v[0]) begin
        if (v[1]) begin
          d.neg[i] = 1'b1;
          v = v + 1;
        end else begin
          d.pos[i] = 1'b1;
          v = v - 1;
        end
      end
      v = v >>> 1;
    end
    return d;
  endfunction

  // Number of non-zero digits, i.e. adders/subtractors of one multiplier.
  function automatic int csd_weight(input csd_t d);
    int n;
    n = 0;
    for (int i = 0; i < CSD_DIGITS; i++) n += int'(d.pos[i]) + int'(d.neg[i]);
    return n;
  endfunction

endpackage
