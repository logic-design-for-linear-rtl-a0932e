// Self-checking test of lsm_sums.
// Random hour and %T windows (including all-ones extremes) are applied; the
// four sums are recomputed here with plain integers and compared one cycle
// after in_valid. Without in_valid the outputs must hold.
module tb_lsm_sums;
  import oil_pkg::*;

  localparam int unsigned N = 10;

  logic      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  hour_t     x_win [N];
  data_t     y_win [N];
  lsm_sums_t sums;
  logic      out_valid;
  int        checks = 0, failures = 0;

  lsm_sums #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint sx, sy, sxx, sxy;
    for (int i = 0; i < N; i++) begin x_win[i] = '0; y_win[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      sx = 0; sy = 0; sxx = 0; sxy = 0;
      for (int i = 0; i < N; i++) begin
        x_win[i] = (t == 0) ? '1 : hour_t'($urandom);
        y_win[i] = (t == 0) ? '1 : data_t'($urandom);
        sx  += longint'(x_win[i]);
        sy  += longint'(y_win[i]);
        sxx += longint'(x_win[i]) * x_win[i];
        sxy += longint'(x_win[i]) * y_win[i];
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      expect_eq("out_valid", longint'(out_valid), 1);
      expect_eq("sx", longint'(sums.sx), sx);
      expect_eq("sy", longint'(sums.sy), sy);
      expect_eq("sxx", longint'(sums.sxx), sxx);
      expect_eq("sxy", longint'(sums.sxy), sxy);
      // change the inputs without in_valid: the sums must hold
      for (int i = 0; i < N; i++) y_win[i] = data_t'($urandom);
      @(negedge clk);
      expect_eq("out_valid idle", longint'(out_valid), 0);
      expect_eq("sy held", longint'(sums.sy), sy);
      expect_eq("sxy held", longint'(sums.sxy), sxy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
