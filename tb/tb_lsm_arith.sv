// Self-checking test of lsm_arith.
// Windows are built here (straight lines with known slope, consecutive hours
// with random %T, random hours), their sums formed with integers, and the
// expected Q.8 slope computed in floating point from the textbook formula
// SSxy/SSxx, truncated toward zero and saturated. A window with all hours
// equal must give 0.
module tb_lsm_arith;
  import oil_pkg::*;

  localparam int unsigned N = 10;

  logic      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  lsm_sums_t sums;
  slope_t    slope;
  logic      out_valid;
  int        checks = 0, failures = 0;

  lsm_arith #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int xs[N], int ys[N]);
    longint sx = 0, sy = 0, sxx = 0, sxy = 0;
    real    mx, my, ssxx = 0.0, ssxy = 0.0, q;
    longint e;
    for (int i = 0; i < N; i++) begin
      sx += longint'(xs[i]); sy += longint'(ys[i]); sxx += xs[i] * xs[i]; sxy += xs[i] * ys[i];
    end
    mx = real'(sx) / N;
    my = real'(sy) / N;
    for (int i = 0; i < N; i++) begin
      ssxx += (xs[i] - mx) * (xs[i] - mx);
      ssxy += (xs[i] - mx) * (ys[i] - my);
    end
    if (ssxx < 1e-9) e = 0;
    else begin
      q = ssxy / ssxx * 256.0;
      e = longint'($rtoi(q + ((q >= 0) ? 1e-9 : -1e-9)));
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
    end
    sums.sx = SUM1_W'(sx); sums.sy = SUM1_W'(sy);
    sums.sxx = SUM2_W'(sxx); sums.sxy = SUM2_W'(sxy);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || longint'(slope) != e) begin
      failures++;
      if (failures < 15) $display("slope = %0d, expected %0d (valid %b)", slope, e, out_valid);
    end
    @(negedge clk);
  endtask

  initial begin
    int xs[N], ys[N];
    int base, m;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // exact lines of slope m over consecutive hours
    for (m = -12; m <= 4; m++) begin
      base = $urandom_range(0, 60);
      for (int i = 0; i < N; i++) begin
        xs[i] = base + i;
        ys[i] = 256 + m * i;
      end
      run(xs, ys);
      checks++;
      if (slope != slope_t'(m * 256)) begin failures++; $display("line m=%0d: %0d", m, slope); end
    end
    // consecutive hours, random %T
    for (int t = 0; t < 150; t++) begin
      base = $urandom_range(0, 502);
      for (int i = 0; i < N; i++) begin
        xs[i] = base + N - 1 - i;
        ys[i] = $urandom_range(0, 511);
      end
      run(xs, ys);
    end
    // random hours, random %T (includes saturation cases)
    for (int t = 0; t < 150; t++) begin
      for (int i = 0; i < N; i++) begin
        xs[i] = $urandom_range(0, 511);
        ys[i] = $urandom_range(0, 511);
      end
      run(xs, ys);
    end
    // all hours equal
    for (int i = 0; i < N; i++) begin xs[i] = 511; ys[i] = 100 + i; end
    run(xs, ys);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
