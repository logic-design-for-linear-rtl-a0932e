// Conditional unit: NORMAL / WARNING / CRITICAL decision.
//
// Compares the defuzzified severity with two thresholds: below WARN_TH the
// reading is normal, from WARN_TH warning, from CRIT_TH critical. The held
// condition only rises (normal -> warning -> critical) until reset, because
// oil does not recover by itself and a noisy reading must not clear an
// alert. The three outputs follow the source description; the thresholds
// and the latching are this design's choice. With the default fuzzy set
// centres a full critical degree gives a severity of at least 191, so
// CRIT_TH = 160 makes a 50 % drop of %T always read critical.
//
// Timing: one register; out_valid pulses the cycle after in_valid and the
// condition outputs change with it.
module conditional_unit
  import oil_pkg::*;
#(
  parameter int unsigned WARN_TH = 96,
  parameter int unsigned CRIT_TH = 160
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mu_t   severity,
  output cond_e cond,
  output logic  normal_on,
  output logic  warning_on,
  output logic  critical_on,
  output logic  out_valid
);

  cond_e level;

  always_comb begin
    if (32'(severity) >= CRIT_TH)      level = COND_CRITICAL;
    else if (32'(severity) >= WARN_TH) level = COND_WARNING;
    else                               level = COND_NORMAL;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cond      <= COND_NORMAL;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid && level > cond) cond <= level;
    end
  end

  assign normal_on   = (cond == COND_NORMAL);
  assign warning_on  = (cond == COND_WARNING);
  assign critical_on = (cond == COND_CRITICAL);

  a_never_falls: assert property (@(posedge clk) disable iff (!rst_n) cond >= $past(cond));

  initial assert (WARN_TH < CRIT_TH) else $error("conditional_unit: need WARN_TH < CRIT_TH");

endmodule
