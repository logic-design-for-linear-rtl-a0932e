// Self-checking test of clock_divider with a 5-cycle "hour".
// A reference count of clock edges since reset predicts hour_tick, hour and
// hour_full for the whole 0..511 hour range and beyond, where the ticks must
// stop. Checks are made on the falling edge.
module tb_clock_divider;
  import oil_pkg::*;

  localparam int unsigned P = 5;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  hour_tick, hour_full;
  hour_t hour;
  int    checks = 0, failures = 0;
  int    ticks = 0;

  clock_divider #(.CLK_PER_HOUR(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic  exp_tick, exp_full;
    int    exp_hour;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (k = 0; k < 512 * P + 40; k++) begin
      exp_full = (k >= 512 * P);
      exp_tick = !exp_full && (k % P == 0);
      exp_hour = (k / P > 511) ? 511 : k / P;
      checks++;
      if (hour_tick !== exp_tick || int'(hour) != exp_hour || hour_full !== exp_full) begin
        failures++;
        if (failures < 10)
          $display("k=%0d tick=%b/%b hour=%0d/%0d full=%b/%b", k, hour_tick, exp_tick,
                   hour, exp_hour, hour_full, exp_full);
      end
      if (hour_tick) ticks++;
      @(negedge clk);
    end
    checks++;
    if (ticks != 512) begin
      failures++;
      $display("tick count %0d, expected 512", ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
