// tb_cordic_pi16: self-checking test of the unfolded CORDIC rotator for
// 1*pi/16. Each random input pair is checked bit-exactly against the two
// micro-rotations (shifts 3 and 4) worked out here, and against the exact rotation by
// 1*pi/16 in floating point, within 0.035 of the vector length plus 3 LSBs.
module tb_cordic_pi16;
  localparam int W = 16;
  logic clk = 1'b0;
  logic signed [W-1:0] xi, yi, xo, yo;
  int checks = 0, failures = 0;
  real worst = 0.0;

  cordic_pi16 #(.W(W)) dut (.x_in(xi), .y_in(yi), .x_out(xo), .y_out(yo));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b);
    longint x1, y1, x2, y2;
    real th, fx, fy, len, err;
    xi = W'(a); yi = W'(b);
    @(posedge clk);
    x1 = a + (b >>> 3);
    y1 = b - (a >>> 3);
    x2 = x1 + (y1 >>> 4);
    y2 = y1 - (x1 >>> 4);
    th  = 1.0 * 3.14159265358979 / 16.0;
    fx  =  a * $cos(th) + b * $sin(th);
    fy  = -a * $sin(th) + b * $cos(th);
    len = $sqrt(real'(a) * a + real'(b) * b);
    checks += 2;
    if (xo !== W'(x2) || yo !== W'(y2)) begin
      failures++;
      $display("FAIL (%0d,%0d): x=%0d exp %0d, y=%0d exp %0d", a, b, xo, x2, yo, y2);
    end
    err = $sqrt((real'(xo) - fx) ** 2 + (real'(yo) - fy) ** 2);
    if (err > worst) worst = err;
    if (err > 0.035 * len + 3.0) begin
      failures++;
      $display("FAIL (%0d,%0d): error %f against exact rotation", a, b, err);
    end
  endtask

  initial begin
    apply(0, 0); apply(4096, 0); apply(0, 4096); apply(-4096, -4096);
    for (int n = 0; n < 2000; n++)
      apply(int'($urandom_range(0, 16383)) - 8192, int'($urandom_range(0, 16383)) - 8192);
    $display("largest error against the exact rotation: %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
