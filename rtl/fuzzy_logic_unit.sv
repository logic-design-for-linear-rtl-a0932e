// Fuzzy logic unit: grades the oil from slope, percentage drop and hours.
//
// Three crisp inputs are fuzzified, each by a fuzzy_partition into normal /
// warning / critical degrees:
//   - decline rate r = max(0, -slope), Q.8 %T codes per hour (a steeply
//     falling %T is the warning sign), breakpoints RATE_B1..B3;
//   - percentage drop of %T from the reference, breakpoints DROP_B1..B3
//     (DROP_B3 = 50 %: the oil is due for a change when %T has halved);
//   - running hour, breakpoints HOUR_B1..B3.
// Rule base: the oil is normal only if all three inputs say normal (min).
// A falling slope is a warning sign only: both its warning and its critical
// (steepest) degrees raise the warning degree, since the oil-change point is
// defined by the drop, not by the rate. Warning is the max of those and the
// drop and hour warning degrees; critical is the max of the drop and hour
// critical degrees. The aggregated degrees are
// defuzzified by centroid with set centres 0, 128 and 255:
//   severity = (128*mu_warning + 255*mu_critical) / (mu_normal + mu_warning + mu_critical)
// The three inputs and the three condition sets follow the source
// description; the set shapes, breakpoints (except the 50 % drop), rules and
// defuzzifier are this design's choice. The default rate and drop
// breakpoints are set so that an oil whose %T starts falling by about 3 codes
// per hour reaches warning with roughly 55 h of life predicted and critical
// close to the half-%T point, the behaviour of the published example run.
//
// Timing: combinational evaluation, one output register; out_valid pulses
// the cycle after in_valid.
module fuzzy_logic_unit
  import oil_pkg::*;
#(
  parameter int unsigned RATE_B1 = 512,  // 2.0 %T codes per hour
  parameter int unsigned RATE_B2 = 768,  // 3.0
  parameter int unsigned RATE_B3 = 1024, // 4.0
  parameter int unsigned DROP_B1 = 30,
  parameter int unsigned DROP_B2 = 45,
  parameter int unsigned DROP_B3 = 50,
  parameter int unsigned HOUR_B1 = 200,
  parameter int unsigned HOUR_B2 = 300,
  parameter int unsigned HOUR_B3 = 400
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  slope_t     slope,
  input  logic [6:0] drop_pct,
  input  hour_t      hour,
  output mu_t        severity,
  output fuzzy_mu_t  mu,
  output logic       out_valid
);

  logic [15:0] rate;
  fuzzy_mu_t   mu_rate, mu_drop, mu_hour, mu_c;
  logic [17:0] num;
  logic [9:0]  den;
  logic [17:0] sev_c;

  assign rate = slope[SLOPE_W-1] ? 16'(-slope) : 16'd0;

  fuzzy_partition #(.IN_W(16), .B1(RATE_B1), .B2(RATE_B2), .B3(RATE_B3))
    u_rate (.v(rate), .mu(mu_rate));
  fuzzy_partition #(.IN_W(16), .B1(DROP_B1), .B2(DROP_B2), .B3(DROP_B3))
    u_drop (.v(16'(drop_pct)), .mu(mu_drop));
  fuzzy_partition #(.IN_W(16), .B1(HOUR_B1), .B2(HOUR_B2), .B3(HOUR_B3))
    u_hour (.v(16'(hour)), .mu(mu_hour));

  function automatic mu_t max3(mu_t a, mu_t b, mu_t c);
    mu_t m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  function automatic mu_t min3(mu_t a, mu_t b, mu_t c);
    mu_t m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

  always_comb begin
    mu_c.normal   = min3(mu_rate.normal,   mu_drop.normal,   mu_hour.normal);
    mu_c.warning  = max3(mu_rate.warning > mu_rate.critical ? mu_rate.warning : mu_rate.critical,
                         mu_drop.warning, mu_hour.warning);
    mu_c.critical = (mu_drop.critical > mu_hour.critical) ? mu_drop.critical : mu_hour.critical;
    num = 18'd128 * 18'(mu_c.warning) + 18'd255 * 18'(mu_c.critical);
    den = 10'(mu_c.normal) + 10'(mu_c.warning) + 10'(mu_c.critical);
    sev_c = (den == '0) ? '0 : num / 18'(den);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      severity  <= '0;
      mu        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        severity <= (sev_c > 18'd255) ? mu_t'(MU_ONE) : mu_t'(sev_c);
        mu       <= mu_c;
      end
    end
  end

endmodule
