// tb_csd_const_mult: self-checking test of the CSD constant multiplier.
// Four instances with the constants the DCT uses and one with a constant
// of long runs of ones (4095 = 2^12 - 1) are driven with random operands;
// each product is compared with floor(a * COEF / 4096) computed with an
// ordinary multiplication. The CSD recoder is also checked: the number of
// non-zero digits of 5351 must be 6 (binary 1.010011100111 has 8 ones), and
// no constant may have two adjacent non-zero digits.
module tb_csd_const_mult;
  import dct_pkg::*;
  localparam int W = 16;
  localparam int NC = 5;
  localparam int unsigned COEFS [NC] = '{COEF_SQRT2, COEF_R6_COS, COEF_R6_SIN, COEF_C3_COMP, 4095};

  logic clk = 1'b0;
  logic signed [W-1:0] a;
  logic signed [W-1:0] p [NC];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NC; g++) begin : g_dut
    csd_const_mult #(.W(W), .OW(W), .COEF(COEFS[g])) dut (.a(a), .p(p[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [W-1:0] v);
    longint e;
    a = v;
    @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      e = (longint'(v) * longint'(COEFS[c])) >>> 12;
      checks++;
      if (p[c] !== W'(e)) begin
        failures++;
        $display("FAIL coef=%0d a=%0d: p=%0d exp=%0d", COEFS[c], v, p[c], e);
      end
    end
  endtask

  initial begin
    csd_t d;
    d = csd_encode(COEF_R6_SIN);
    checks++;
    if (csd_weight(d) != 6) begin
      failures++;
      $display("FAIL CSD weight of 5351 is %0d", csd_weight(d));
    end
    for (int c = 0; c < NC; c++) begin
      logic [CSD_DIGITS-1:0] nz;
      d = csd_encode(COEFS[c]);
      nz = d.pos | d.neg;
      checks++;
      if ((nz & (nz >> 1)) != 0 || (d.pos & d.neg) != 0) begin
        failures++;
        $display("FAIL CSD form of %0d not canonical", COEFS[c]);
      end
    end
    apply(16'sd0); apply(16'sd1); apply(-16'sd1); apply(16'sd4096); apply(-16'sd4096);
    apply(16'sd2047); apply(-16'sd2048);
    for (int n = 0; n < 2000; n++) apply(W'(int'($urandom_range(0, 8191)) - 4096));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
