// Self-checking test of data_collector.
// The first strobed sample must land in the reference register only; later
// samples and their hour stamps must appear in the windows (newest first),
// upd must pulse exactly one cycle after each window sample, and win_full must
// rise with the 10th window sample.
module tb_data_collector;
  import oil_pkg::*;

  localparam int unsigned N = 10;

  logic  clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0;
  data_t data_in = '0;
  hour_t hour_in = '0;
  hour_t x_win [N];
  data_t y_win [N];
  data_t ref_t, newest;
  logic  upd, win_full;
  int    checks = 0, failures = 0;
  data_t ys [$];
  hour_t xs [$];
  data_t exp_ref;

  data_collector #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 30; s++) begin
      // strobe one sample
      sample_en = 1'b1;
      data_in   = data_t'($urandom);
      hour_in   = hour_t'(s);
      @(negedge clk);
      sample_en = 1'b0;
      if (s == 0) exp_ref = data_in;
      else begin
        ys.push_back(data_in);
        xs.push_back(hour_in);
      end
      expect_eq("upd", int'(upd), int'(s != 0));
      expect_eq("ref_t", int'(ref_t), int'(exp_ref));
      expect_eq("win_full", int'(win_full), int'(ys.size() >= N));
      if (ys.size() > 0) expect_eq("newest", int'(newest), int'(ys[ys.size() - 1]));
      for (int i = 0; i < N && i < ys.size(); i++) begin
        expect_eq("y_win", int'(y_win[i]), int'(ys[ys.size() - 1 - i]));
        expect_eq("x_win", int'(x_win[i]), int'(xs[xs.size() - 1 - i]));
      end
      // idle gap: nothing may move
      repeat (3) begin
        data_in = data_t'($urandom);
        @(negedge clk);
        expect_eq("upd idle", int'(upd), 0);
        if (ys.size() > 0) expect_eq("newest idle", int'(newest), int'(ys[ys.size() - 1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
