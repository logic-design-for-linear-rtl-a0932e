// Self-checking test of prediction_unit.
// For random slopes, reference and current %T and each condition, the
// remaining hours are recomputed here as floor((cur - ref/2) / rate) in real
// arithmetic, saturated to 16 bits; warning must show it as valid, critical
// must show 0, normal must drive it with pred_valid low.
module tb_prediction_unit;
  import oil_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  slope_t      slope = '0;
  data_t       ref_t = '0, cur_t = '0;
  cond_e       cond = COND_NORMAL;
  logic [15:0] predicted;
  logic        pred_valid, out_valid;
  int          checks = 0, failures = 0;

  prediction_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int s, int r, int c, int k);
    real    margin, rate;
    longint e;
    margin = real'(c) - real'(r / 2);
    rate   = (s < 0) ? -real'(s) / 256.0 : 0.0;
    if (margin <= 0.0)     e = 0;
    else if (rate == 0.0)  e = 65535;
    else                   e = longint'($floor(margin / rate + 1e-9));
    if (e > 65535) e = 65535;
    if (k == 2) e = 0;
    slope = slope_t'(s); ref_t = data_t'(r); cur_t = data_t'(c); cond = cond_e'(k);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || longint'(predicted) != e || pred_valid != (k != 0)) begin
      failures++;
      if (failures < 15)
        $display("s=%0d ref=%0d cur=%0d cond=%0d: %0d/%0d valid %b", s, r, c, k, predicted, e, pred_valid);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // worked case: ref 400, cur 300, falling 1 code/h -> 100 h
    apply(-256, 400, 300, 1);
    checks++;
    if (predicted != 16'd100) begin failures++; $display("worked case: %0d", predicted); end
    apply(0, 400, 300, 1);      // flat: saturates
    apply(-256, 400, 150, 1);   // already below half
    apply(-256, 400, 300, 2);   // critical
    for (int t = 0; t < 3000; t++)
      apply(int'($urandom_range(0, 3000)) - 2900, $urandom_range(0, 511), $urandom_range(0, 511),
            $urandom_range(0, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
