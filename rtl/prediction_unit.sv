// Prediction unit: remaining oil life in hours.
//
// Extrapolates the fitted line to the oil-change point, where %T has fallen
// to half the virgin-oil reference:
//   remaining = (cur_t - ref_t/2) / (-slope)     [hours]
// computed as ((cur_t - ref_t/2) << SLOPE_FRAC) / (-slope), truncated and
// saturated to PRED_W bits. A slope that is not falling gives the maximum
// value; %T already at or below half the reference gives 0. The estimate is
// shown as valid only once the conditional unit reports warning; at critical
// it is forced to 0. In the normal condition the raw estimate is still driven,
// with pred_valid low. The gating by the condition follows the source
// description; the extrapolation formula is this design's choice.
//
// Timing: one output register loaded when in_valid is high; pred_valid and
// predicted change together.
module prediction_unit
  import oil_pkg::*;
#(
  parameter int unsigned PW = PRED_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  slope_t        slope,
  input  data_t         ref_t,
  input  data_t         cur_t,
  input  cond_e         cond,
  output logic [PW-1:0] predicted,
  output logic          pred_valid,
  output logic          out_valid
);

  localparam logic [31:0] P_MAX = 32'((64'd1 << PW) - 1);

  data_t       half;
  logic [31:0] margin, rate, rem;
  logic [PW-1:0] pred_c;

  always_comb begin
    half   = ref_t >> 1;
    margin = (cur_t > half) ? (32'(cur_t - half) << SLOPE_FRAC) : 32'd0;
    rate   = slope[SLOPE_W-1] ? 32'(16'(-slope)) : 32'd0;
    if (margin == '0)    rem = '0;
    else if (rate == '0) rem = P_MAX;
    else                 rem = margin / rate;
    if (cond == COND_CRITICAL) pred_c = '0;
    else if (rem > P_MAX)      pred_c = PW'(P_MAX);
    else                       pred_c = PW'(rem);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      predicted  <= '0;
      pred_valid <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        predicted  <= pred_c;
        pred_valid <= (cond != COND_NORMAL);
      end
    end
  end

endmodule
