// Arithmetic block: least-squares slope from the window sums.
//
// The regression slope of %T against running hour is SSxy / SSxx with
//   SSxx = sum x^2 - (sum x)^2 / N,   SSxy = sum x*y - (sum x)(sum y) / N.
// Both terms are formed here multiplied by N,
//   N*SSxx = N sum x^2 - (sum x)^2,   N*SSxy = N sum x*y - (sum x)(sum y),
// which leaves the quotient unchanged and avoids truncating the two divisions
// by N (this scaling is this design's choice; the subtract / multiply / divide
// structure follows the source description). The slope is returned as a
// signed fixed-point number with SLOPE_FRAC fraction bits in %T codes per
// hour, truncated toward zero and saturated to SLOPE_W bits. A degenerate
// window (all hour stamps equal, SSxx = 0) gives slope 0.
//
// Timing: combinational multiply/divide, one output register; out_valid
// pulses the cycle after in_valid.
module lsm_arith
  import oil_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  lsm_sums_t sums,
  output slope_t    slope,
  output logic      out_valid
);

  localparam int unsigned W = 48;
  localparam logic signed [W-1:0] S_MAX = W'((1 << (SLOPE_W - 1)) - 1);
  localparam logic signed [W-1:0] S_MIN = -W'(1 << (SLOPE_W - 1));

  logic signed [W-1:0] n_ssxx, n_ssxy, quo;
  slope_t slope_c;

  always_comb begin
    n_ssxx = W'(N) * W'(sums.sxx) - W'(sums.sx) * W'(sums.sx);
    n_ssxy = W'(N) * W'(sums.sxy) - W'(sums.sx) * W'(sums.sy);
    if (n_ssxx == '0) quo = '0;
    else              quo = (n_ssxy <<< SLOPE_FRAC) / n_ssxx;
    if (quo > S_MAX)      slope_c = slope_t'(S_MAX);
    else if (quo < S_MIN) slope_c = slope_t'(S_MIN);
    else                  slope_c = slope_t'(quo);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slope     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) slope <= slope_c;
    end
  end

endmodule
