// Least-square block: the four sums of the regression.
//
// From the N hour stamps x and %T samples y of the window it forms
// sum x, sum x^2, sum y and sum x*y with combinational adder trees and
// multipliers, and registers them when in_valid is high. These are the sum
// blocks of the least-squares datapath in the source description; the output
// register and valid strobe are this design's choice. The sum widths in
// oil_pkg hold up to 16 samples of 9 bits without overflow.
//
// Timing: one cycle; out_valid pulses the cycle after in_valid.
module lsm_sums
  import oil_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  hour_t     x_win [N],
  input  data_t     y_win [N],
  output lsm_sums_t sums,
  output logic      out_valid
);

  lsm_sums_t acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) begin
      acc.sx  = acc.sx  + SUM1_W'(x_win[i]);
      acc.sy  = acc.sy  + SUM1_W'(y_win[i]);
      acc.sxx = acc.sxx + SUM2_W'(x_win[i]) * SUM2_W'(x_win[i]);
      acc.sxy = acc.sxy + SUM2_W'(x_win[i]) * SUM2_W'(y_win[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sums      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sums <= acc;
    end
  end

  initial assert (N >= 2 && N <= 16) else $error("lsm_sums: N must be 2..16");

endmodule
