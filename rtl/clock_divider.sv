// Hourly sample strobe and running-hour counter.
//
// The monitor takes one %T sample per hour. This block counts system clock
// cycles and raises hour_tick for one cycle at each sampling instant: first in
// the cycle right after reset (hour 0, the virgin-oil reference sample), then
// every CLK_PER_HOUR cycles. `hour` holds the running hour of the sample being
// taken and steps once per hour. The 9-bit hour range (0..511) follows the
// source description; after the tick of hour 511 the counter stops and
// hour_full is raised, so no further samples are taken (wrapping would corrupt
// the regression's time axis).
//
// CLK_PER_HOUR defaults to 50 MHz x 3600 s. The clock frequency is this
// design's assumption; set the parameter for the board clock in use.
//
// Timing: hour_tick and hour are decoded from registers, valid in the same
// cycle. Reset is synchronous, active low.
module clock_divider
  import oil_pkg::*;
#(
  parameter longint unsigned CLK_PER_HOUR = 64'd180_000_000_000
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  hour_tick,
  output hour_t hour,
  output logic  hour_full
);

  localparam int unsigned CNT_W = (CLK_PER_HOUR > 1) ? $clog2(CLK_PER_HOUR) : 1;
  localparam logic [CNT_W-1:0] CNT_LAST = CNT_W'(CLK_PER_HOUR - 1);

  logic [CNT_W-1:0] cnt;
  logic             done;

  assign hour_tick = (cnt == '0) && !done;
  assign hour_full = done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      hour <= '0;
      done <= 1'b0;
    end else if (!done) begin
      if (cnt == CNT_LAST) begin
        cnt <= '0;
        if (hour == '1) done <= 1'b1;
        else            hour <= hour + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
