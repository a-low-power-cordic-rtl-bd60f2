// tb_csd_rotator: self-checking test of the sqrt2*C6 CSD rotator.
// Each random input pair is checked two ways: bit-exactly against
//   r0 = floor(i0*2216/4096) + floor(i1*5351/4096)
//   r1 = floor(i1*2216/4096) - floor(i0*5351/4096)
// worked out here with ordinary multiplications, and against the ideal
// rotation by 3pi/8 with gain sqrt2 in floating point, within 2 LSBs of
// truncation plus 1/4096 of |i0| + |i1| for the truncated constants.
module tb_csd_rotator;
  localparam int W = 16;
  logic clk = 1'b0;
  logic signed [W-1:0] i0, i1, r0, r1;
  int checks = 0, failures = 0;

  csd_rotator #(.W(W)) dut (.i0(i0), .i1(i1), .r0(r0), .r1(r1));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b);
    longint e0, e1;
    real c, s, f0, f1, tol;
    i0 = W'(a); i1 = W'(b);
    @(posedge clk);
    e0 = ((longint'(a) * 2216) >>> 12) + ((longint'(b) * 5351) >>> 12);
    e1 = ((longint'(b) * 2216) >>> 12) - ((longint'(a) * 5351) >>> 12);
    c  = $sqrt(2.0) * $cos(3.0 * 3.14159265358979 / 8.0);
    s  = $sqrt(2.0) * $sin(3.0 * 3.14159265358979 / 8.0);
    f0 =  a * c + b * s;
    f1 = -a * s + b * c;
    checks += 2;
    if (r0 !== W'(e0) || r1 !== W'(e1)) begin
      failures++;
      $display("FAIL (%0d,%0d): r0=%0d exp %0d, r1=%0d exp %0d", a, b, r0, e0, r1, e1);
    end
    tol = 2.0 + (((a < 0) ? -a : a) + ((b < 0) ? -b : b)) / 4096.0;
    if ((real'(r0) - f0) > tol || (f0 - real'(r0)) > tol ||
        (real'(r1) - f1) > tol || (f1 - real'(r1)) > tol) begin
      failures++;
      $display("FAIL (%0d,%0d): r0=%0d r1=%0d far from ideal rotation %f %f", a, b, r0, r1, f0, f1);
    end
  endtask

  initial begin
    apply(0, 0); apply(4096, 0); apply(0, 4096); apply(-4096, 4096);
    for (int n = 0; n < 2000; n++)
      apply(int'($urandom_range(0, 16383)) - 8192, int'($urandom_range(0, 16383)) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
