// butterfly: the two-point add/subtract element of the Loeffler DCT flow
// graph, R0 = I0 + I1 and R1 = I0 - I1.
//
// Purely combinational. Inputs and outputs are W-bit two's complement; the
// caller sizes W with enough headroom, so no bit is added here and an
// overflowing result wraps. The equations follow the published architecture; the width
// handling is this design's.
module butterfly #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] i0,
  input  logic signed [W-1:0] i1,
  output logic signed [W-1:0] r0,
  output logic signed [W-1:0] r1
);

  always_comb begin
    r0 = i0 + i1;
    r1 = i0 - i1;
  end

endmodule
