// Lifetime run of oil_monitor_top shaped like the published example.
//
// The published example oil reaches warning at 84 h with about 54 h of life
// predicted, and critical at 135 h, where the prediction has counted down to 0.
// Its %T data are not available, so this test uses a synthetic oil of the same
// shape: %T starts at 400 and falls slowly (0.1 code/h) until hour ONSET, then
// falls at RATE_X10/10 codes per hour. The design at its default fuzzy and
// decision parameters (an 8-cycle "hour") must show:
//   - normal until warning, then warning within +-3 h of 84 h,
//   - a valid prediction at warning within +-10 h of 54 h,
//   - predictions that do not rise while in warning,
//   - critical within +-3 h of 135 h, with the prediction 0 from then on.
module tb_oil_lifetime_run;
  import oil_pkg::*;

  localparam longint unsigned P = 8;
  parameter int ONSET    = 76;
  parameter int RATE_X10 = 30;

  logic              clk = 1'b0, rst_n = 1'b0;
  data_t             data_in;
  logic              sample_tick, hour_full;
  hour_t             hour;
  logic              normal_on, warning_on, critical_on;
  logic [PRED_W-1:0] predicted;
  logic              pred_valid;
  slope_t            slope;
  logic [6:0]        drop_pct;
  mu_t               severity;
  fuzzy_mu_t         fuzzy_mu;
  logic              result_valid;

  int checks = 0, failures = 0;

  oil_monitor_top #(.CLK_PER_HOUR(P)) dut (.*);

  always #5 clk = ~clk;

  function automatic data_t oil_t(int h);
    int y;
    if (h <= ONSET) y = 400 - h / 10;
    else            y = 400 - ONSET / 10 - (RATE_X10 * (h - ONSET)) / 10;
    if (y < 0) y = 0;
    return data_t'(y);
  endfunction

  assign data_in = oil_t(int'(hour));

  initial begin
    repeat (200 * P + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("failed: %s", what); end
  endtask

  initial begin
    int h, warn_h, crit_h, warn_pred, last_pred;
    warn_h = -1; crit_h = -1; warn_pred = -1; last_pred = 65535; h = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (crit_h < 0 || h < 160) begin
      @(negedge clk);
      if (sample_tick) h = int'(hour);
      if (result_valid) begin
        checks++;
        if (normal_on + warning_on + critical_on != 1) begin
          failures++;
          $display("hour %0d: condition outputs not one-hot", h);
        end
        if (warning_on && warn_h < 0) begin
          warn_h = h; warn_pred = int'(predicted);
          $display("warning at hour %0d, predicted %0d h left", h, predicted);
        end
        if (warning_on) begin
          expect_true("prediction valid in warning", pred_valid);
          expect_true("prediction does not rise", int'(predicted) <= last_pred);
          last_pred = int'(predicted);
        end
        if (critical_on && crit_h < 0) begin
          crit_h = h;
          $display("critical at hour %0d", h);
        end
        if (critical_on) expect_true("prediction 0 at critical", predicted == '0 && pred_valid);
        if (!warning_on && !critical_on) expect_true("normal before warning", warn_h < 0);
      end
    end
    expect_true("warning near 84 h", warn_h >= 81 && warn_h <= 87);
    expect_true("about 54 h left at warning", warn_pred >= 44 && warn_pred <= 64);
    expect_true("critical near 135 h", crit_h >= 132 && crit_h <= 138);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
