// tb_loeffler_dct8: end-to-end, self-checking test of the 8-point DCT at its
// default parameters (8-bit inputs, 4 guard bits, 12-bit outputs).
//
// Every input vector is checked against two references computed here:
//   - a bit-exact model of the same fixed-point flow graph, written with
//     plain multiplications instead of shift-add networks, so that any
//     wiring, sign, shift or CSD error shows as a mismatch;
//   - the ideal DCT, X[0] = sum x[n], X[k] = sqrt2 * sum x[n] cos((2n+1)k pi/16),
//     in floating point, within 10 LSBs (the CORDIC approximations and the
//     12-bit constants stay below about 7.5).
// The stream contains back-to-back vectors (one per clock), gaps in
// in_valid, full-scale vectors (all -128 or +127 with worst-case signs) and a
// reset in the middle of a stream. The latency from in_valid to out_valid is
// checked to be exactly 4 clocks for every vector, and each of these
// situations must occur at least once.
module tb_loeffler_dct8;
  localparam int DATA_W  = 8;
  localparam int OUT_W   = 12;
  localparam int F       = 4;
  localparam int LATENCY = 4;
  localparam int NVEC    = 3000;

  typedef int vec_t [8];

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [DATA_W-1:0] x [8];
  logic out_valid;
  logic signed [OUT_W-1:0] X [8];

  int checks = 0, failures = 0;
  int cycle = 0;
  real worst = 0.0;

  // vectors issued and not yet checked: a ring of inputs, expected results
  // and issue cycles, written at wr and read at rd
  localparam int RING = 16;
  int exp_r [RING][8];
  int in_r  [RING][8];
  int t_r   [RING];
  int wr = 0, rd = 0;

  // mechanism counters
  int n_back_to_back = 0, n_gaps = 0, n_full_scale = 0, n_reset_flush = 0;

  loeffler_dct8 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .X(X)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference models ----------------
  function automatic longint mulc(longint a, longint c);
    return (a * c) >>> 12;
  endfunction

  function automatic vec_t model(vec_t xs);
    longint v[8], a[8], b[8], c[8], d[8], t1, t2, t3, t4;
    vec_t r;
    for (int i = 0; i < 8; i++) v[i] = longint'(xs[i]) * (1 << F);
    for (int i = 0; i < 4; i++) begin
      a[i]     = v[i] + v[7-i];
      a[7-i]   = v[i] - v[7-i];
    end
    b[0] = a[0] + a[3]; b[3] = a[0] - a[3];
    b[1] = a[1] + a[2]; b[2] = a[1] - a[2];
    // 3pi/16: shifts 1, 3 and gain compensation 3635/4096
    t1 = a[4] + (a[7] >>> 1); t2 = a[7] - (a[4] >>> 1);
    t3 = t1 + (t2 >>> 3);     t4 = t2 - (t1 >>> 3);
    b[4] = mulc(t3, 3635);    b[7] = mulc(t4, 3635);
    // pi/16: shifts 3, 4
    t1 = a[5] + (a[6] >>> 3); t2 = a[6] - (a[5] >>> 3);
    b[5] = t1 + (t2 >>> 4);   b[6] = t2 - (t1 >>> 4);
    c[0] = b[0] + b[1]; c[1] = b[0] - b[1];
    c[2] = mulc(b[2], 2216) + mulc(b[3], 5351);
    c[3] = mulc(b[3], 2216) - mulc(b[2], 5351);
    c[4] = b[4] + b[6]; c[6] = b[4] - b[6];
    c[7] = b[7] + b[5]; c[5] = b[7] - b[5];
    d[0] = c[0]; d[4] = c[1]; d[2] = c[2]; d[6] = c[3];
    d[1] = c[7] + c[4]; d[7] = c[7] - c[4];
    d[3] = mulc(c[5], 5792); d[5] = mulc(c[6], 5792);
    for (int k = 0; k < 8; k++) r[k] = int'((d[k] + (1 << (F - 1))) >>> F);
    return r;
  endfunction

  function automatic real ideal(vec_t xs, int k);
    real s = 0.0;
    for (int n = 0; n < 8; n++) s += xs[n] * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
    return (k == 0) ? s : s * $sqrt(2.0);
  endfunction

  // ---------------- output checker ----------------
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      vec_t e, xin;
      int t0;
      real err;
      if (wr == rd) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        for (int k = 0; k < 8; k++) begin
          e[k]   = exp_r[rd % RING][k];
          xin[k] = in_r[rd % RING][k];
        end
        t0 = t_r[rd % RING];
        rd = rd + 1;
        checks++;
        if (cycle - t0 != LATENCY) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - t0, LATENCY);
        end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(X[k]) != e[k]) begin
            failures++;
            $display("FAIL X[%0d]=%0d, bit-exact model %0d (x = %p)", k, X[k], e[k], xin);
          end
          err = real'(X[k]) - ideal(xin, k);
          if (err < 0.0) err = -err;
          if (err > worst) worst = err;
          checks++;
          if (err > 10.0) begin
            failures++;
            $display("FAIL X[%0d]=%0d, ideal DCT %f", k, X[k], ideal(xin, k));
          end
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  logic prev_valid = 1'b0;

  task automatic send(vec_t xs);
    vec_t e;
    @(negedge clk);
    for (int i = 0; i < 8; i++) x[i] = DATA_W'(xs[i]);
    in_valid = 1'b1;
    if (prev_valid) n_back_to_back++;
    prev_valid = 1'b1;
    e = model(xs);
    for (int k = 0; k < 8; k++) begin
      exp_r[wr % RING][k] = e[k];
      in_r[wr % RING][k]  = xs[k];
    end
    @(posedge clk);
    t_r[wr % RING] = cycle;
    wr = wr + 1;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      for (int i = 0; i < 8; i++) x[i] = DATA_W'($urandom);
      prev_valid = 1'b0;
    end
    n_gaps++;
  endtask

  function automatic vec_t rand_vec();
    vec_t v;
    for (int i = 0; i < 8; i++) v[i] = int'($urandom_range(0, 255)) - 128;
    return v;
  endfunction

  function automatic vec_t full_scale_vec();
    vec_t v;
    for (int i = 0; i < 8; i++) v[i] = $urandom_range(0, 1) ? 127 : -128;
    return v;
  endfunction

  initial begin
    vec_t v;
    rst_n = 1'b0; in_valid = 1'b0;
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // a ramp and constants
    send('{10, 20, 30, 40, 50, 60, 70, 80});
    send('{127, 127, 127, 127, 127, 127, 127, 127});
    send('{-128, -128, -128, -128, -128, -128, -128, -128});
    send('{127, -128, 127, -128, 127, -128, 127, -128});
    idle(3);

    // random stream with random gaps and full-scale vectors
    for (int n = 0; n < NVEC; n++) begin
      if ($urandom_range(0, 9) == 0) begin
        v = full_scale_vec();
        n_full_scale++;
      end else begin
        v = rand_vec();
      end
      send(v);
      if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 3));
    end

    // reset in the middle of a stream: in-flight results are dropped
    for (int n = 0; n < 3; n++) send(rand_vec());
    @(negedge clk);
    in_valid = 1'b0; prev_valid = 1'b0;
    rst_n = 1'b0;
    rd = wr;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid high during reset");
    end
    rst_n = 1'b1;
    repeat (LATENCY + 2) begin
      @(posedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL flushed result appeared after reset");
      end
    end
    n_reset_flush++;
    send('{1, 2, 3, 4, 5, 6, 7, 8});
    idle(LATENCY + 2);

    checks++;
    if (wr != rd) begin
      failures++;
      $display("FAIL %0d results never came out", wr - rd);
    end
    $display("back-to-back=%0d gaps=%0d full-scale=%0d reset-flush=%0d",
             n_back_to_back, n_gaps, n_full_scale, n_reset_flush);
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back vectors"); end
    if (n_gaps == 0)         begin failures++; $display("FAIL no gaps in the stream"); end
    if (n_full_scale == 0)   begin failures++; $display("FAIL no full-scale vectors"); end
    if (n_reset_flush == 0)  begin failures++; $display("FAIL no reset in a stream"); end
    $display("largest error against the ideal DCT: %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
