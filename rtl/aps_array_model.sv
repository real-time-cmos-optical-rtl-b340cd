// aps_array_model: behavioural model of the 5 x 5 integrating active pixel
// array. It is not synthesizable logic: it stands in for the analogue pixels
// so that the digital controller can be simulated against them.
//
// Every pixel is reset globally while pix_reset is high: its output sits at the
// reset level (about 3.2 V, the source-follower output after a 5 V reset).
// When pix_reset falls, each pixel discharges at a rate proportional to the
// light falling on it. The discharge is modelled as linear, as the source
// design finds it to be above about 1 V, and stops at a floor of 0.2 V. The
// row and column selects (one-hot) route one pixel to the shared output
// vout_mv; with no pixel selected the output reads 0 V.
//
// Voltages are integers in millivolts; the pixel nodes are kept in microvolts.
// The model advances once per clk edge, which serves only as its time base
// (one edge = one period of the 32 MHz system clock). photo[i] is the light on
// pixel i (row-major, i = 5*row + col) in arbitrary units: each unit lowers the
// node by RATE_UV microvolts per clock. The reset level, the rate and the
// floor are this model's own numbers, read from the shape of the discharge
// curve the source design shows. OFFSET_MV (0 by default) spreads the reset
// levels from pixel to pixel: pixel i resets to RESET_MV + s(i) * OFFSET_MV
// with s(i) = (7 i mod 5) - 2, in -2..2, to exercise the converter's
// offset-independent mode.
module aps_array_model
  import sh_pkg::*;
#(
  parameter int unsigned RESET_MV = 3200,
  parameter int unsigned RATE_UV  = 40,
  parameter int unsigned FLOOR_MV = 200,
  parameter int unsigned OFFSET_MV = 0
) (
  input  logic                 clk,
  input  logic                 pix_reset,
  input  logic [ARRAY_N-1:0]   row_sel,
  input  logic [ARRAY_N-1:0]   col_sel,
  input  logic [7:0]           photo [NUM_PIXELS],
  output logic [15:0]          vout_mv
);

  int unsigned node_uv [NUM_PIXELS];

  function automatic int unsigned reset_uv(input int i);
    return 1000 * (RESET_MV + ((7 * i) % 5) * OFFSET_MV - 2 * OFFSET_MV);
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PIXELS; i++) begin
      if (pix_reset)
        node_uv[i] <= reset_uv(i);
      else if (node_uv[i] > FLOOR_MV * 1000 + photo[i] * RATE_UV)
        node_uv[i] <= node_uv[i] - photo[i] * RATE_UV;
      else
        node_uv[i] <= FLOOR_MV * 1000;
    end
  end

  always_comb begin
    vout_mv = '0;
    for (int r = 0; r < ARRAY_N; r++)
      for (int c = 0; c < ARRAY_N; c++)
        if (row_sel[r] && col_sel[c])
          vout_mv = 16'(node_uv[r*ARRAY_N + c] / 1000);
  end

endmodule
