// Percent-drop block: how far %T has fallen below the virgin-oil reference.
//
//   drop_pct = floor(100 * (ref_t - cur_t) / ref_t),  0 when cur_t >= ref_t
//
// The source description grades oil by its percentage drop and calls for an
// oil change when %T has fallen to half its original value (drop = 50 %);
// the integer-percent formula and its truncation are this design's choice.
// A zero reference gives 0.
//
// Timing: one output register; out_valid pulses the cycle after in_valid.
module percent_drop
  import oil_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  data_t      ref_t,
  input  data_t      cur_t,
  output logic [6:0] drop_pct,
  output logic       out_valid
);

  logic [15:0] num;
  logic [6:0]  pct_c;

  always_comb begin
    num = 16'(ref_t - cur_t) * 16'd100;
    if (ref_t == '0 || cur_t >= ref_t) pct_c = '0;
    else                               pct_c = 7'(num / 16'(ref_t));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drop_pct  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) drop_pct <= pct_c;
    end
  end

endmodule
