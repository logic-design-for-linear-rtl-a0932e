// Self-checking test of serial_input (10 x 9-bit chain).
// Random samples are shifted in with random gaps in the enable; a queue model
// of the last 10 samples predicts every tap and the full flag.
module tb_serial_input;
  localparam int unsigned DEPTH = 10;
  localparam int unsigned WIDTH = 9;

  logic             clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] taps [DEPTH];
  logic             full;
  int               checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  serial_input #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (full !== (model.size() >= DEPTH)) begin
      failures++;
      $display("full=%b with %0d samples", full, model.size());
    end
    for (int i = 0; i < DEPTH; i++) begin
      logic [WIDTH-1:0] e = (i < model.size()) ? model[model.size() - 1 - i] : '0;
      checks++;
      if (taps[i] !== e) begin
        failures++;
        if (failures < 10) $display("tap %0d = %0d, expected %0d", i, taps[i], e);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_state();
    for (int n = 0; n < 300; n++) begin
      en  = ($urandom_range(0, 3) != 0);
      din = WIDTH'($urandom);
      @(negedge clk);
      if (en) model.push_back(din);
      en = 1'b0;
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
