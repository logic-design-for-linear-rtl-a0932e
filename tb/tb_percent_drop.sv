// Self-checking test of percent_drop: exhaustive over a grid of reference
// and current %T codes, against floor(100*(ref-cur)/ref) computed here.
module tb_percent_drop;
  import oil_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  data_t      ref_t = '0, cur_t = '0;
  logic [6:0] drop_pct;
  logic       out_valid;
  int         checks = 0, failures = 0;

  percent_drop dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 512; r += 7) begin
      for (int c = 0; c < 512; c += 11) begin
        ref_t = data_t'(r);
        cur_t = data_t'(c);
        e = (r == 0 || c >= r) ? 0 : (100 * (r - c)) / r;
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        checks++;
        if (!out_valid || int'(drop_pct) != e) begin
          failures++;
          if (failures < 15) $display("ref %0d cur %0d: drop %0d, expected %0d", r, c, drop_pct, e);
        end
      end
    end
    // half the reference is exactly 50 %
    ref_t = 9'd400; cur_t = 9'd200; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (drop_pct != 7'd50) begin failures++; $display("half: %0d", drop_pct); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
