// max_finder: finds the brightest pixel of a frame and its position.
//
// Each pixel's light level is compared with the largest so far and replaces
// it when strictly greater, so on a tie the earlier pixel (in row-major
// order) is kept. first marks the frame's first pixel, which is loaded
// unconditionally. max_level and max_idx are registered and hold the frame's
// result from the clock after its last pixel until the next frame's first.
module max_finder #(
  parameter int unsigned LIGHT_W = 11,
  parameter int unsigned IDX_W   = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               first,
  input  logic [LIGHT_W-1:0] light,
  input  logic [IDX_W-1:0]   idx,
  output logic [LIGHT_W-1:0] max_level,
  output logic [IDX_W-1:0]   max_idx
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_level <= '0;
      max_idx   <= '0;
    end else if (en && (first || light > max_level)) begin
      max_level <= light;
      max_idx   <= idx;
    end
  end

endmodule
