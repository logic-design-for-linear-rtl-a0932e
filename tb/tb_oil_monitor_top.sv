// End-to-end test of oil_monitor_top with an 8-cycle "hour".
//
// A synthetic oil ages over the whole 0..511 hour range: %T starts at 400,
// falls slowly (0.1 code/h) with +-1 code of noise up to hour 80, then at
// 0.5 code/h. A reference model (oil_ref_pkg) follows the same sample stream
// and predicts slope, drop, severity, condition and remaining life for every
// update; result_valid must come exactly 6 cycles after each sample tick once
// the window is full, and never before. The test counts each mechanism of
// the design and fails if one never happened: reference capture, window
// fill, sliding updates, normal / warning / critical, a valid prediction, a
// saturated (flat-slope) estimate, the 0 estimate at critical, and the stop
// of the hour counter at 511.
module tb_oil_monitor_top;
  import oil_pkg::*;
  import oil_ref_pkg::*;

  localparam longint unsigned P = 8;

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

  // mechanism counters
  int n_ref = 0, n_fill = 0, n_update = 0, n_normal = 0, n_warning = 0, n_critical = 0;
  int n_pred_valid = 0, n_pred_sat = 0, n_pred_zero = 0, n_hour_full = 0;

  oil_monitor_top #(.CLK_PER_HOUR(P)) dut (.*);

  always #5 clk = ~clk;

  // The synthetic oil: %T as a function of the running hour.
  function automatic data_t oil_t(int h);
    int noise = ((h * 37) % 3) - 1;
    int y = (h <= 80) ? 400 - h / 10 + noise : 392 - (h - 80) / 2 + noise;
    return data_t'(y);
  endfunction

  assign data_in = oil_t(int'(hour));

  initial begin
    repeat (600 * P + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int h);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("hour %0d: %s = %0d, expected %0d", h, what, got, exp);
    end
  endtask

  initial begin
    int xs[$], ys[$];
    int ref_y, nsamp, model_cond, tick_cycle, cyc, last_h;
    int e_s, e_d, e_sev, lvl, e_pred, h;
    ref_y = 0; nsamp = 0; model_cond = 0; tick_cycle = -1; cyc = 0; last_h = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    forever begin
      if (sample_tick) begin
        h = int'(hour);
        if (nsamp == 0) begin
          ref_y = int'(data_in);
          n_ref++;
        end else begin
          xs.push_front(h); ys.push_front(int'(data_in));
          if (xs.size() > WIN_N) begin void'(xs.pop_back()); void'(ys.pop_back()); end
          if (xs.size() == WIN_N) begin
            if (tick_cycle < 0) n_fill++;
            tick_cycle = cyc;
            last_h = h;
          end
        end
        nsamp++;
      end
      if (result_valid) begin
        checks++;
        if (tick_cycle < 0 || cyc - tick_cycle != 6) begin
          failures++;
          $display("result_valid at cycle %0d, tick at %0d", cyc, tick_cycle);
        end
        n_update++;
        e_s   = ref_slope_q8(xs, ys);
        e_d   = ref_drop_pct(ref_y, ys[0]);
        e_sev = ref_severity(e_s, e_d, xs[0]);
        lvl   = (e_sev >= 160) ? 2 : (e_sev >= 96) ? 1 : 0;
        if (lvl > model_cond) model_cond = lvl;
        e_pred = ref_remaining(e_s, ref_y, ys[0], model_cond);
        expect_eq("slope", int'(slope), e_s, last_h);
        expect_eq("drop", int'(drop_pct), e_d, last_h);
        expect_eq("severity", int'(severity), e_sev, last_h);
        expect_eq("normal_on", int'(normal_on), int'(model_cond == 0), last_h);
        expect_eq("warning_on", int'(warning_on), int'(model_cond == 1), last_h);
        expect_eq("critical_on", int'(critical_on), int'(model_cond == 2), last_h);
        expect_eq("predicted", int'(predicted), e_pred, last_h);
        expect_eq("pred_valid", int'(pred_valid), int'(model_cond != 0), last_h);
        case (model_cond)
          0: n_normal++;
          1: n_warning++;
          default: n_critical++;
        endcase
        if (pred_valid) n_pred_valid++;
        if (predicted == '1) n_pred_sat++;
        if (critical_on && predicted == '0) n_pred_zero++;
        if (model_cond == 1 && n_warning == 1)
          $display("warning from hour %0d, predicted %0d h left", last_h, predicted);
        if (model_cond == 2 && n_critical == 1)
          $display("critical from hour %0d", last_h);
      end
      if (hour_full) begin
        n_hour_full++;
        if (n_hour_full == 1) expect_eq("samples by hour_full", nsamp, 512, 511);
        if (n_hour_full > 20 * P) break;
      end
      @(negedge clk);
      cyc++;
    end
    expect_eq("samples at end", nsamp, 512, 511);
    expect_eq("updates", n_update, 512 - 1 - WIN_N + 1, 511);
    begin
      string names[10];
      int counts[10];
      names = '{"reference", "window fill", "sliding update", "normal", "warning",
                           "critical", "valid prediction", "saturated estimate",
                           "zero at critical", "hour counter stop"};
      counts = '{n_ref, n_fill, n_update, n_normal, n_warning, n_critical, n_pred_valid,
                 n_pred_sat, n_pred_zero, n_hour_full};
      for (int i = 0; i < 10; i++) begin
        $display("%-20s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism never happened: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
