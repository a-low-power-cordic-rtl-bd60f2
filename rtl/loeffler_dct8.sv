// loeffler_dct8: low-power 8-point 1-D DCT. It follows the Loeffler flow
// graph (11 multiplications' worth of rotations, 29 additions) and removes
// every general multiplier from it:
//   - the odd-half rotator C3 (3pi/16) is a two-iteration unfolded CORDIC
//     with a CSD gain compensation (cordic_3pi16),
//   - the odd-half rotator C1 (pi/16) is a two-iteration unfolded CORDIC
//     whose gain of 1.0097 is left uncompensated (cordic_pi16),
//   - the even-half rotator sqrt2*C6 (3pi/8) is the direct four-multiplier
//     rotator with CSD shift-add multipliers (csd_rotator),
//   - the two sqrt2 scalers of the last stage are CSD shift-add multipliers.
//
// Result scaling: X[0] = sum of x[n]; X[k] = sqrt2 * sum x[n]*cos((2n+1)k*pi/16)
// for k = 1..7, i.e. 2*sqrt2 times the orthonormal DCT-II, apart from the
// small errors of the CORDIC approximations and of the 12-bit constants.
//
// Flow graph, by row (stage 1..4, one pipeline register after each):
//   1: butterflies (x0,x7) (x1,x6) (x2,x5) (x3,x4); sums to rows 0..3,
//      differences to rows 7,6,5,4.
//   2: even: butterflies (0,3) (1,2); odd: C3 on rows (4,7), C1 on (5,6).
//   3: even: butterfly (0,1) -> X0, X4; sqrt2*C6 on rows (2,3) -> X2, X6.
//      odd: row4 = r4 + r6, row6 = r4 - r6, row7 = r7 + r5, row5 = r7 - r5.
//   4: X1 = r7 + r4, X7 = r7 - r4, X3 = sqrt2*r5, X5 = sqrt2*r6.
// The flow graph and the choice of CORDIC or CSD per rotator follow the
// published architecture. The word widths, the fractional guard bits, the output
// rounding and the four-stage pipeline with a valid bit are this design's
// choices.
//
// Number format: inputs are DATA_W-bit signed integers. Internally every
// row is DATA_W+4 integer bits plus FRAC_W fraction bits (DC needs 3 bits of
// growth, one more is margin). The outputs are rounded to integers (half
// rounds up) and given in OUT_W bits.
//
// Interface and timing: x and in_valid are taken at a rising clock edge;
// the result for them appears on X with out_valid exactly 4 clock edges
// later. A new vector may be given every cycle (throughput 8 samples per
// clock); gaps in in_valid travel through as out_valid low. The registers
// load only for valid data, so an idle datapath does not toggle. rst_n is
// asynchronous and active low and clears every register.
module loeffler_dct8
  import dct_pkg::*;
#(
  parameter int DATA_W = 8,
  parameter int FRAC_W = 4,
  parameter int OUT_W  = DATA_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [8],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  X [8]
);

  localparam int IW     = DATA_W + 4 + FRAC_W;  // internal word
  localparam int STAGES = 4;

  typedef logic signed [IW-1:0] word_t;

  // Combinational results of each stage (d*) and the registers behind them (s*).
  word_t xi [8];
  word_t d1 [8], s1 [8];
  word_t d2 [8], s2 [8];
  word_t d3 [8], s3 [8];
  word_t d4 [8];                         // indexed by coefficient number
  logic signed [OUT_W-1:0] rnd [8];
  logic [STAGES-1:0] vld;

  always_comb begin
    for (int i = 0; i < 8; i++) xi[i] = word_t'(x[i]) <<< FRAC_W;
  end

  // ---------------- stage 1: input butterflies ----------------
  butterfly #(.W(IW)) u_s1_07 (.i0(xi[0]), .i1(xi[7]), .r0(d1[0]), .r1(d1[7]));
  butterfly #(.W(IW)) u_s1_16 (.i0(xi[1]), .i1(xi[6]), .r0(d1[1]), .r1(d1[6]));
  butterfly #(.W(IW)) u_s1_25 (.i0(xi[2]), .i1(xi[5]), .r0(d1[2]), .r1(d1[5]));
  butterfly #(.W(IW)) u_s1_34 (.i0(xi[3]), .i1(xi[4]), .r0(d1[3]), .r1(d1[4]));

  // ---------------- stage 2: even butterflies, odd CORDIC rotators ----------------
  butterfly    #(.W(IW)) u_s2_03 (.i0(s1[0]), .i1(s1[3]), .r0(d2[0]), .r1(d2[3]));
  butterfly    #(.W(IW)) u_s2_12 (.i0(s1[1]), .i1(s1[2]), .r0(d2[1]), .r1(d2[2]));
  cordic_3pi16 #(.W(IW)) u_c3    (.x_in(s1[4]), .y_in(s1[7]), .x_out(d2[4]), .y_out(d2[7]));
  cordic_pi16  #(.W(IW)) u_c1    (.x_in(s1[5]), .y_in(s1[6]), .x_out(d2[5]), .y_out(d2[6]));

  // ---------------- stage 3: DC/Nyquist butterfly, CSD rotator, odd butterflies ----------------
  butterfly   #(.W(IW)) u_s3_01 (.i0(s2[0]), .i1(s2[1]), .r0(d3[0]), .r1(d3[1]));
  csd_rotator #(.W(IW), .K_COS(COEF_R6_COS), .K_SIN(COEF_R6_SIN))
                        u_c6    (.i0(s2[2]), .i1(s2[3]), .r0(d3[2]), .r1(d3[3]));
  butterfly   #(.W(IW)) u_s3_46 (.i0(s2[4]), .i1(s2[6]), .r0(d3[4]), .r1(d3[6]));
  butterfly   #(.W(IW)) u_s3_75 (.i0(s2[7]), .i1(s2[5]), .r0(d3[7]), .r1(d3[5]));

  // ---------------- stage 4: last odd butterfly and sqrt2 scalers ----------------
  butterfly      #(.W(IW)) u_s4_74 (.i0(s3[7]), .i1(s3[4]), .r0(d4[1]), .r1(d4[7]));
  csd_const_mult #(.W(IW), .OW(IW), .COEF(COEF_SQRT2)) u_sq3 (.a(s3[5]), .p(d4[3]));
  csd_const_mult #(.W(IW), .OW(IW), .COEF(COEF_SQRT2)) u_sq5 (.a(s3[6]), .p(d4[5]));

  always_comb begin
    d4[0] = s3[0];
    d4[4] = s3[1];
    d4[2] = s3[2];
    d4[6] = s3[3];
  end

  // Round to the nearest integer (half up) and drop the guard bits.
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (FRAC_W > 0) rnd[k] = OUT_W'((d4[k] + (word_t'(1) <<< (FRAC_W - 1))) >>> FRAC_W);
      else            rnd[k] = OUT_W'(d4[k]);
    end
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[STAGES-2:0], in_valid};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        s1[i] <= '0;
        s2[i] <= '0;
        s3[i] <= '0;
        X[i]  <= '0;
      end
    end else begin
      if (in_valid) s1 <= d1;
      if (vld[0])   s2 <= d2;
      if (vld[1])   s3 <= d3;
      if (vld[2])   X  <= rnd;
    end
  end

  assign out_valid = vld[STAGES-1];

endmodule
