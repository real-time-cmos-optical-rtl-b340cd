// centroid_processor: computes the x and y centroids of one 5 x 5 frame,
//   C(x) = sum(x_n * I_n) / sum(I_n),   C(y) = sum(y_n * I_n) / sum(I_n),
// together with the brightest pixel and its position.
//
// How it works. The digitised light levels arrive one per pixel in row-major
// order. A modulo-5 counter stepped per pixel supplies the column (x weight)
// and a second one stepped on its wrap the row (y weight). For each coordinate
// a multiplier and an accumulating adder (moment_unit) form the first moment,
// while a third adder sums the light levels. After the 25th pixel the moments,
// shifted left by CENT_FRAC bits, are divided by the sum in two serial dividers
// working in parallel. The centroids are thus unsigned fixed-point numbers with
// 3 integer and 4 fraction bits, in pixel pitches from the centre of pixel
// column (row) 0: 0 to 4.0, coded 0 to 64 in the 7-bit outputs.
//
// Interface and timing. light_idx = 0 marks the first pixel of a frame and
// restarts the position counters and accumulators. The dividers start on the
// clock after the 25th pixel and finish N_W = 22 clocks later, when cent_valid
// pulses; the converter's 26th, idle pixel period (256 clocks) easily covers
// this. cent_x/cent_y, dividend_x/dividend_y, divisor, max_level and max_idx
// then hold until the next frame's result. A dark frame (sum 0) yields
// centroids of 0 with div_zero set.
//
// From the source design: first-moment centroids, the mod-sqrt(N) counter,
// multiplier, adders and divider of its x-processor diagram, the 7-bit
// centroids and the maximum level and position. This design's own: the
// weights 0..4, the 4 fraction bits and the serial divider.
module centroid_processor
  import sh_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LIGHT_W-1:0]   light,
  input  logic                 light_valid,
  input  logic [PIX_IDX_W-1:0] light_idx,
  output logic [CENT_W-1:0]    cent_x,
  output logic [CENT_W-1:0]    cent_y,
  output logic                 cent_valid,
  output logic                 div_zero,
  output logic [MOMENT_W-1:0]  dividend_x,
  output logic [MOMENT_W-1:0]  dividend_y,
  output logic [SUM_W-1:0]     divisor,
  output logic [LIGHT_W-1:0]   max_level,
  output logic [PIX_IDX_W-1:0] max_idx
);

  localparam int unsigned N_W = MOMENT_W + CENT_FRAC;

  logic                first;
  logic [POS_W-1:0]    xcnt, ycnt, xw, yw;
  logic                xwrap, ywrap;
  logic [MOMENT_W-1:0] mom_x, mom_y;
  logic [SUM_W-1:0]    sum;
  logic                last_d;
  logic                done_x, done_y, busy_x, busy_y, dz_x, dz_y;

  assign first = light_valid && (light_idx == '0);

  mod_counter #(.MOD(ARRAY_N), .W(POS_W)) u_xcnt (
    .clk, .rst_n, .clear(first), .en(light_valid), .count(xcnt), .wrap(xwrap)
  );
  mod_counter #(.MOD(ARRAY_N), .W(POS_W)) u_ycnt (
    .clk, .rst_n, .clear(first), .en(xwrap), .count(ycnt), .wrap(ywrap)
  );

  // the first pixel always has weight 0, whatever the counters held
  assign xw = first ? '0 : xcnt;
  assign yw = first ? '0 : ycnt;

  moment_unit #(.WEIGHT_W(POS_W), .LIGHT_W(LIGHT_W), .ACC_W(MOMENT_W)) u_mx (
    .clk, .rst_n, .en(light_valid), .first, .weight(xw), .light, .acc(mom_x)
  );
  moment_unit #(.WEIGHT_W(POS_W), .LIGHT_W(LIGHT_W), .ACC_W(MOMENT_W)) u_my (
    .clk, .rst_n, .en(light_valid), .first, .weight(yw), .light, .acc(mom_y)
  );

  // intensity sum: the adder without a multiplier
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           sum <= '0;
    else if (light_valid) sum <= first ? SUM_W'(light) : sum + SUM_W'(light);
  end

  max_finder #(.LIGHT_W(LIGHT_W), .IDX_W(PIX_IDX_W)) u_max (
    .clk, .rst_n, .en(light_valid), .first, .light, .idx(light_idx),
    .max_level, .max_idx
  );

  // the 25th pixel: both counters at their last value
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_d <= 1'b0;
    else        last_d <= ywrap;
  end

  seq_divider #(.N_W(N_W), .D_W(SUM_W), .Q_W(CENT_W)) u_div_x (
    .clk, .rst_n, .start(last_d), .dividend({mom_x, {CENT_FRAC{1'b0}}}),
    .divisor(sum), .busy(busy_x), .done(done_x), .quotient(cent_x),
    .div_zero(dz_x)
  );
  seq_divider #(.N_W(N_W), .D_W(SUM_W), .Q_W(CENT_W)) u_div_y (
    .clk, .rst_n, .start(last_d), .dividend({mom_y, {CENT_FRAC{1'b0}}}),
    .divisor(sum), .busy(busy_y), .done(done_y), .quotient(cent_y),
    .div_zero(dz_y)
  );

  assign cent_valid = done_x;
  assign div_zero   = dz_x;

  // the dividends and divisor of the last completed frame, for test output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend_x <= '0;
      dividend_y <= '0;
      divisor    <= '0;
    end else if (last_d) begin
      dividend_x <= mom_x;
      dividend_y <= mom_y;
      divisor    <= sum;
    end
  end

  // both dividers see the same divisor and start together
  a_div_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    done_x == done_y && busy_x == busy_y && dz_x == dz_y)
    else $error("x and y dividers out of step");

endmodule
