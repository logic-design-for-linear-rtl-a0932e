// Serial input register chain (the "data registers" of the monitor).
//
// DEPTH enabled D flip-flop words of WIDTH bits connected in series. Each
// cycle with `en` high shifts `din` into stage 0 and every stage one place
// along; the oldest word falls off the end. All stages are brought out in
// parallel (taps[0] newest, taps[DEPTH-1] oldest) for the least-squares
// arithmetic, so the window slides by one sample per enable and a new fit
// can be formed at every sample once `full` is set. The 10 x 9-bit chain with
// a common enable follows the source description; the fill counter and
// synchronous active-low reset are this design's choice.
//
// Timing: taps and full change on the clock edge where en is high.
module serial_input #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] taps [DEPTH],
  output logic             full
);

  localparam int unsigned FILL_W = $clog2(DEPTH + 1);

  logic [FILL_W-1:0] fill;

  assign full = (fill == FILL_W'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
      fill <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
      if (!full) fill <= fill + 1'b1;
    end
  end

endmodule
