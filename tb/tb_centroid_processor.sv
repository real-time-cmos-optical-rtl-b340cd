// tb_centroid_processor: random and structured 5 x 5 frames, checked against
// C = floor(16 * sum(w * I) / sum(I)) saturated to 7 bits for x and y, the
// dividends, divisor and brightest pixel, and the 23-clock result latency.
module tb_centroid_processor;
  import sh_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [10:0] light;
  logic light_valid = 0;
  logic [4:0] light_idx;
  logic [6:0] cent_x, cent_y;
  logic cent_valid, div_zero;
  logic [17:0] dividend_x, dividend_y;
  logic [15:0] divisor;
  logic [10:0] max_level;
  logic [4:0] max_idx;
  int checks = 0, failures = 0;

  centroid_processor dut (.clk, .rst_n, .light, .light_valid, .light_idx,
    .cent_x, .cent_y, .cent_valid, .div_zero, .dividend_x, .dividend_y,
    .divisor, .max_level, .max_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int lv [25], input int gap);
    longint sx = 0, sy = 0, s = 0;
    int ex, ey, best = -1, besti = 0, lat = 0;
    for (int p = 0; p < 25; p++) begin
      sx += (longint'(p) % 5) * longint'(lv[p]);
      sy += (longint'(p) / 5) * longint'(lv[p]);
      s  += longint'(lv[p]);
      if (lv[p] > best) begin best = lv[p]; besti = p; end
    end
    ex = (s == 0) ? 0 : int'((16 * sx) / s);
    ey = (s == 0) ? 0 : int'((16 * sy) / s);
    if (ex > 127) ex = 127;
    if (ey > 127) ey = 127;
    for (int p = 0; p < 25; p++) begin
      light = 11'(lv[p]); light_idx = 5'(p); light_valid = 1;
      @(posedge clk);
      #1 light_valid = 0;
      repeat (gap) @(posedge clk);
      #1;
    end
    while (!cent_valid) begin
      @(posedge clk);
      #1 lat++;
    end
    checks++;
    if (int'(cent_x) != ex || int'(cent_y) != ey || div_zero != (s == 0)) begin
      failures++;
      $display("centroid %0d,%0d expected %0d,%0d", cent_x, cent_y, ex, ey);
    end
    checks++;
    if (longint'(dividend_x) != sx || longint'(dividend_y) != sy || longint'(divisor) != s) begin
      failures++;
      $display("dividends %0d %0d / %0d expected %0d %0d / %0d", dividend_x, dividend_y,
               divisor, sx, sy, s);
    end
    checks++;
    if (int'(max_level) != best || int'(max_idx) != besti) begin
      failures++;
      $display("max %0d@%0d expected %0d@%0d", max_level, max_idx, best, besti);
    end
    // 25th pixel + 1 clock to start + 22 divide clocks
    checks++;
    if (lat + gap != 23) begin
      failures++;
      $display("latency %0d", lat + gap);
    end
  endtask

  initial begin
    int lv [25];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // a single lit pixel gives exactly its position
    for (int p = 0; p < 25; p++) begin
      lv = '{default: 0};
      lv[p] = 1000;
      run_frame(lv, 0);
      checks++;
      if (int'(cent_x) != 16 * (p % 5) || int'(cent_y) != 16 * (p / 5)) failures++;
    end
    // uniform frame: centre of the array, 2.0
    lv = '{default: 2047};
    run_frame(lv, 3);
    checks++;
    if (cent_x != 7'd32 || cent_y != 7'd32) failures++;
    // dark frame
    lv = '{default: 0};
    run_frame(lv, 1);
    for (int f = 0; f < 40; f++) begin
      for (int p = 0; p < 25; p++) lv[p] = $urandom_range(0, 2047);
      run_frame(lv, f % 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
