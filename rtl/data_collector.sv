// Data input processor: reference register plus the %T and hour windows.
//
// At each sample strobe the first sample after reset (t = 0, virgin oil) is
// stored as the reference %T. Every later sample is shifted, together with
// its hour stamp, into two serial_input chains of N stages: y_win holds %T
// ("Data in") and x_win the hours ("Time in") for the regression. `newest`
// is the latest %T sample. `upd` pulses one cycle after a window sample was
// taken, i.e. when the windows show it; win_full says N samples after the
// reference are present, so a fit is meaningful. The reference-then-window
// order and the two register chains follow the source description; the upd
// strobe is this design's handshake to the arithmetic.
//
// Timing: registers load on the edge where sample_en is high; upd is high in
// the following cycle.
module data_collector
  import oil_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sample_en,
  input  data_t data_in,
  input  hour_t hour_in,
  output hour_t x_win [N],
  output data_t y_win [N],
  output data_t ref_t,
  output data_t newest,
  output logic  upd,
  output logic  win_full
);

  logic  have_ref;
  logic  shift_en;
  logic  x_full, y_full;

  assign shift_en = sample_en && have_ref;
  assign newest   = y_win[0];
  assign win_full = y_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_ref <= 1'b0;
      ref_t    <= '0;
      upd      <= 1'b0;
    end else begin
      upd <= shift_en;
      if (sample_en && !have_ref) begin
        ref_t    <= data_in;
        have_ref <= 1'b1;
      end
    end
  end

  serial_input #(.DEPTH(N), .WIDTH(DATA_W)) u_data_chain (
    .clk, .rst_n, .en(shift_en), .din(data_in), .taps(y_win), .full(y_full)
  );

  serial_input #(.DEPTH(N), .WIDTH(HOUR_W)) u_time_chain (
    .clk, .rst_n, .en(shift_en), .din(hour_in), .taps(x_win), .full(x_full)
  );

  // Both chains shift on the same enable, so they fill together.
  a_chains_in_step: assert property (@(posedge clk) disable iff (!rst_n) x_full == y_full);

endmodule
