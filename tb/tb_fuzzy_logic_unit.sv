// Self-checking test of fuzzy_logic_unit at its default breakpoints.
// A reference model here evaluates the three-set partitions of decline rate,
// percentage drop and hour, the min/max rules and the centroid, for random
// and corner inputs. Spot checks: fresh oil gives severity 0, a 50 % drop
// alone gives at least the critical threshold 160, a pure warning gives 128.
module tb_fuzzy_logic_unit;
  import oil_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  slope_t     slope = '0;
  logic [6:0] drop_pct = '0;
  hour_t      hour = '0;
  mu_t        severity;
  fuzzy_mu_t  mu;
  logic       out_valid;
  int         checks = 0, failures = 0;

  fuzzy_logic_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // degree of set k (0 normal, 1 warning, 2 critical) for value v
  function automatic int part(int v, int b1, int b2, int b3, int k);
    case (k)
      0: return (v <= b1) ? 255 : (v >= b2) ? 0 : 255 * (b2 - v) / (b2 - b1);
      1: return (v <= b1 || v >= b3) ? 0 :
                (v <= b2) ? 255 * (v - b1) / (b2 - b1) : 255 * (b3 - v) / (b3 - b2);
      default: return (v <= b2) ? 0 : (v >= b3) ? 255 : 255 * (v - b2) / (b3 - b2);
    endcase
  endfunction

  function automatic int imin(int a, int b); return a < b ? a : b; endfunction
  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  task automatic apply(int s, int d, int h, output int sev);
    int rate, mr[3], md[3], mh[3], n, w, c, e;
    rate = (s < 0) ? -s : 0;
    for (int k = 0; k < 3; k++) begin
      mr[k] = part(rate, 512, 768, 1024, k);
      md[k] = part(d, 30, 45, 50, k);
      mh[k] = part(h, 200, 300, 400, k);
    end
    n = imin(imin(mr[0], md[0]), mh[0]);
    w = imax(imax(imax(mr[1], mr[2]), md[1]), mh[1]);
    c = imax(md[2], mh[2]);
    e = (n + w + c == 0) ? 0 : (128 * w + 255 * c) / (n + w + c);
    if (e > 255) e = 255;
    slope = slope_t'(s); drop_pct = 7'(d); hour = hour_t'(h);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || int'(severity) != e || int'(mu.normal) != n ||
        int'(mu.warning) != w || int'(mu.critical) != c) begin
      failures++;
      if (failures < 15)
        $display("s=%0d d=%0d h=%0d: sev %0d/%0d mu %0d,%0d,%0d / %0d,%0d,%0d", s, d, h,
                 severity, e, mu.normal, mu.warning, mu.critical, n, w, c);
    end
    sev = int'(severity);
  endtask

  task automatic expect_true(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("failed: %s", what); end
  endtask

  initial begin
    int sev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    apply(0, 0, 0, sev);            expect_true("fresh oil is 0", sev == 0);
    apply(100, 10, 50, sev);        expect_true("rising %T is 0", sev == 0);
    apply(0, 50, 0, sev);           expect_true("50 % drop reaches 160", sev >= 160);
    apply(-768, 0, 0, sev);         expect_true("rate at B2 gives 128", sev == 128);
    apply(-32768, 100, 511, sev);   expect_true("extreme drop and age give 191", sev == 191);
    apply(-32768, 0, 0, sev);       expect_true("steep slope alone is warning", sev == 128);
    for (int t = 0; t < 3000; t++) begin
      int s, d, h;
      s = (t % 3 == 0) ? int'($urandom_range(0, 65535)) - 32768 : int'($urandom_range(0, 1300)) - 1200;
      d = $urandom_range(0, 100);
      h = $urandom_range(0, 511);
      apply(s, d, h, sev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
