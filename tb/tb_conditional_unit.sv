// Self-checking test of conditional_unit at thresholds 96 / 160.
// Random severities (biased towards low values so all three levels are
// visited in many runs) are fed with random gaps; a model of the rising-only
// condition predicts cond and the one-hot outputs after each update. Resets
// between runs restart the condition at normal.
module tb_conditional_unit;
  import oil_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  mu_t   severity = '0;
  cond_e cond;
  logic  normal_on, warning_on, critical_on, out_valid;
  int    checks = 0, failures = 0;
  int    seen [3] = '{0, 0, 0};

  conditional_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, lvl, s;
    for (int run = 0; run < 20; run++) begin
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      model = 0;
      for (int t = 0; t < 200; t++) begin
        s = (run % 2 == 0) ? $urandom_range(0, 100 + 2 * t) : $urandom_range(0, 255);
        if (s > 255) s = 255;
        severity = mu_t'(s);
        in_valid = ($urandom_range(0, 4) != 0);
        lvl = (s >= 160) ? 2 : (s >= 96) ? 1 : 0;
        @(negedge clk);
        if (in_valid && lvl > model) model = lvl;
        in_valid = 1'b0;
        seen[model]++;
        checks++;
        if (int'(cond) != model || normal_on != (model == 0) || warning_on != (model == 1) ||
            critical_on != (model == 2)) begin
          failures++;
          if (failures < 15) $display("run %0d t %0d: cond %0d, expected %0d", run, t, cond, model);
        end
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("level %0d never reached", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
