// tb_butterfly: self-checking test of the two-point butterfly.
// Drives random and corner-value pairs and compares r0/r1 with the sum and
// difference computed here (modulo 2^W, as the block does not widen).
module tb_butterfly;
  localparam int W = 16;
  logic clk = 1'b0;
  logic signed [W-1:0] i0, i1, r0, r1;
  int checks = 0, failures = 0;

  butterfly #(.W(W)) dut (.i0(i0), .i1(i1), .r0(r0), .r1(r1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [W-1:0] a, input logic signed [W-1:0] b);
    logic signed [W-1:0] es, ed;
    i0 = a; i1 = b;
    @(posedge clk);
    es = W'(int'(a) + int'(b));
    ed = W'(int'(a) - int'(b));
    checks++;
    if (r0 !== es || r1 !== ed) begin
      failures++;
      $display("FAIL i0=%0d i1=%0d: r0=%0d (exp %0d) r1=%0d (exp %0d)", a, b, r0, es, r1, ed);
    end
  endtask

  initial begin
    check(16'sd0, 16'sd0);
    check(16'sd100, -16'sd37);
    check(-16'sd5, 16'sd1000);
    check(16'sh7fff, 16'sd1);
    for (int n = 0; n < 1000; n++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
