// moment_unit: multiplier and accumulating adder of one coordinate of the
// centroid processor.
//
// For each pixel it multiplies the digitised light level by the pixel's
// position weight (its column for x, its row for y) and adds the product to
// the running first moment, sum(r_n * I_n). The adder's output is fed back to
// its own input as in the source design's block diagram.
//
// Timing: on a clock with en high the product is added; with first also high
// the accumulator is loaded with the product instead, which starts a new
// frame. acc is the registered moment, valid the clock after the last pixel.
module moment_unit #(
  parameter int unsigned WEIGHT_W = 3,
  parameter int unsigned LIGHT_W  = 11,
  parameter int unsigned ACC_W    = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                first,
  input  logic [WEIGHT_W-1:0] weight,
  input  logic [LIGHT_W-1:0]  light,
  output logic [ACC_W-1:0]    acc
);

  logic [ACC_W-1:0] product;

  assign product = ACC_W'(weight) * ACC_W'(light);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= first ? product : acc + product;
  end

endmodule
