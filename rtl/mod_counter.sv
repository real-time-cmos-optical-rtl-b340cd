// mod_counter: the modulo-N^(1/2) position counter of the centroid processor.
//
// The pixels of an N-pixel square array arrive in row-major order, so a
// counter modulo sqrt(N) (5 for the 5 x 5 array) stepped once per pixel gives
// the column, which is the x weight of the pixel. A second instance stepped on
// the first one's wrap gives the row, the y weight.
//
// count advances on every clock with en high and returns to 0 after MOD-1;
// wrap is high, combinationally, when en is high and count is MOD-1. clear
// (synchronous) restarts the sequence with the current clock's item at
// position 0: the count becomes 1 if en is high, 0 otherwise.
module mod_counter #(
  parameter int unsigned MOD = 5,
  parameter int unsigned W   = $clog2(MOD)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         wrap
);

  assign wrap = en && (count == W'(MOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= en ? W'(1 % MOD) : '0;
    else if (en)    count <= wrap ? '0 : count + 1'b1;
  end

endmodule
