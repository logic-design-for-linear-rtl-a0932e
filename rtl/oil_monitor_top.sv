// Engine-oil degradation monitor, top level.
//
// The oil's optical transmittance (%T, a 9-bit code from an external sensor
// and ADC on data_in) falls as oxidation products build up. Once per hour the
// monitor samples it; the first sample is kept as the virgin-oil reference,
// later ones slide through a 10-sample window together with their hour
// stamps. For every full window a least-squares line is fitted and its slope
// (%T codes per hour), the percentage drop from the reference and the running
// hour are graded by a fuzzy logic unit. The conditional unit turns the
// result into NORMAL / WARNING / CRITICAL, and the prediction unit reports the
// hours left until %T reaches half the reference, valid from warning on and 0
// at critical.
//
//   clock_divider -> data_collector -> lsm_sums -> lsm_arith -> fuzzy_logic_unit
//                                   \-> percent_drop -------------^      |
//                                                   conditional_unit <---/
//                                                   prediction_unit  <---/
//
// The block structure follows the source description; the handshake, the
// fixed-point formats and the fuzzy and decision parameters are this design's
// choices (see each block). The display driver is left outside: condition,
// estimate, slope and drop are brought out as ports.
//
// Timing: each block registers its result and passes a one-cycle valid
// strobe on. result_valid pulses 6 clock cycles after sample_tick when a full
// window was updated (the first 11 hourly samples only fill the reference and
// window). CLK_PER_HOUR must be at least 8 so a sample's results are complete
// before the next sample.
module oil_monitor_top
  import oil_pkg::*;
#(
  parameter longint unsigned CLK_PER_HOUR = 64'd180_000_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  data_t             data_in,
  output logic              sample_tick,
  output hour_t             hour,
  output logic              hour_full,
  output logic              normal_on,
  output logic              warning_on,
  output logic              critical_on,
  output logic [PRED_W-1:0] predicted,
  output logic              pred_valid,
  output slope_t            slope,
  output logic [6:0]        drop_pct,
  output mu_t               severity,
  output fuzzy_mu_t         fuzzy_mu,
  output logic              result_valid
);

  hour_t     x_win [WIN_N];
  data_t     y_win [WIN_N];
  data_t     ref_t, newest;
  logic      upd, win_full;
  lsm_sums_t sums;
  logic      sums_valid, slope_valid, drop_valid, fuzzy_valid, cond_valid;
  cond_e     cond;

  clock_divider #(.CLK_PER_HOUR(CLK_PER_HOUR)) u_clock_divider (
    .clk, .rst_n, .hour_tick(sample_tick), .hour, .hour_full
  );

  data_collector #(.N(WIN_N)) u_data_collector (
    .clk, .rst_n, .sample_en(sample_tick), .data_in, .hour_in(hour),
    .x_win, .y_win, .ref_t, .newest, .upd, .win_full
  );

  percent_drop u_percent_drop (
    .clk, .rst_n, .in_valid(upd), .ref_t, .cur_t(newest),
    .drop_pct, .out_valid(drop_valid)
  );

  lsm_sums #(.N(WIN_N)) u_lsm_sums (
    .clk, .rst_n, .in_valid(upd && win_full), .x_win, .y_win,
    .sums, .out_valid(sums_valid)
  );

  lsm_arith #(.N(WIN_N)) u_lsm_arith (
    .clk, .rst_n, .in_valid(sums_valid), .sums, .slope, .out_valid(slope_valid)
  );

  fuzzy_logic_unit u_fuzzy_logic_unit (
    .clk, .rst_n, .in_valid(slope_valid), .slope, .drop_pct, .hour(x_win[0]),
    .severity, .mu(fuzzy_mu), .out_valid(fuzzy_valid)
  );

  conditional_unit u_conditional_unit (
    .clk, .rst_n, .in_valid(fuzzy_valid), .severity, .cond,
    .normal_on, .warning_on, .critical_on, .out_valid(cond_valid)
  );

  prediction_unit u_prediction_unit (
    .clk, .rst_n, .in_valid(cond_valid), .slope, .ref_t, .cur_t(newest), .cond,
    .predicted, .pred_valid, .out_valid(result_valid)
  );

  // The percent drop and the regression sums of one sample are ready together.
  a_drop_with_sums: assert property (@(posedge clk) disable iff (!rst_n) sums_valid |-> drop_valid);

  initial assert (CLK_PER_HOUR >= 8) else $error("oil_monitor_top: CLK_PER_HOUR must be >= 8");

endmodule
