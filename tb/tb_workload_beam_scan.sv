// tb_workload_beam_scan: the beam-scan measurement run on the tilt sensor at
// its default sizes. A light beam much narrower than one 100 um pixel is
// stepped across the middle row of the array in x (0 to 490 um, 20 um steps)
// and then down the middle column in y. Because the beam lights one pixel at a
// time, the centroid must follow a staircase: at beam position b the lit pixel
// is floor(b / 100) and the centroid is 16 codes per pixel, while the other
// coordinate stays at the array centre (32). Both centroids are also decoded
// from the RS-232 output (115200 baud) to show that every frame's result
// leaves the chip in real time. The centroid rate is reported.
module tb_workload_beam_scan;
  import sh_pkg::*;
  localparam int BAUD = 278;

  logic clk = 0, rst_n = 0;
  logic [7:0] photo [25];
  logic rxd = 1, txd;
  logic [10:0] light, max_level;
  logic light_valid, light_sat, frame_end, cent_valid, div_zero, tx_dropped, rx_frame_err;
  logic [4:0] light_idx, max_idx;
  logic [6:0] cent_x, cent_y;

  sh_tilt_sensor_top dut (.clk, .rst_n, .photo, .baud_div(16'(BAUD)), .rxd, .txd,
    .ext_en(1'b0), .ext_reset(1'b0), .ext_row(3'd0), .ext_col(3'd0),
    .light, .light_valid, .light_idx, .light_sat, .frame_end,
    .cent_x, .cent_y, .cent_valid, .div_zero, .max_level, .max_idx, .tx_dropped,
    .rx_frame_err);

  always #15.625 clk = ~clk;   // 32 MHz

  int checks = 0, failures = 0;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial decoder: last x and y centroid bytes received
  int ser_x = -1, ser_y = -1, n_bytes = 0;
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (BAUD / 2) @(posedge clk);
      if (txd) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (BAUD) @(posedge clk);
        b[i] = txd;
      end
      repeat (BAUD) @(posedge clk);
      n_bytes++;
      if (b[7]) ser_y = int'(b[6:0]);
      else      ser_x = int'(b[6:0]);
    end
  end

  int n_frames = 0, n_drop = 0;
  longint cyc = 0, first_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cent_valid) begin
      if (n_frames == 0) first_cyc = cyc;
      n_frames++;
    end
    if (rst_n && tx_dropped) n_drop++;
  end

  task automatic wait_frames(input int n);
    int f0 = n_frames;
    while (n_frames < f0 + n) @(posedge clk);
  endtask

  // beam at (bx, by) um from the array corner lights the pixel under it
  task automatic beam(input int bx, input int by);
    for (int p = 0; p < 25; p++) photo[p] = 8'd0;
    photo[(by / 100) * 5 + bx / 100] = 8'd240;
  endtask

  task automatic measure(input int bx, input int by);
    int ex = 16 * (bx / 100), ey = 16 * (by / 100);
    beam(bx, by);
    wait_frames(2);   // the first frame may straddle the move
    repeat (25 * BAUD) @(posedge clk);
    checks++;
    if (int'(cent_x) != ex || int'(cent_y) != ey || ser_x != ex || ser_y != ey) begin
      failures++;
      $display("beam at %0d,%0d um: centroid %0d,%0d (serial %0d,%0d), expected %0d,%0d",
               bx, by, cent_x, cent_y, ser_x, ser_y, ex, ey);
    end
  endtask

  initial begin
    int steps_x, steps_y, last, f0;
    longint c0, rate;
    beam(250, 250);
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait_frames(1);
    f0 = n_frames; c0 = cyc;
    wait_frames(4);
    rate = 64'd32000000 * (longint'(n_frames) - longint'(f0)) / (cyc - c0);
    $display("centroid rate with one lit pixel: %0d Hz at 32 MHz", rate);
    checks++;
    if (rate < 2300) begin
      failures++;
      $display("centroid rate below the expected range");
    end
    steps_x = 0;
    steps_y = 0;
    last = -1;
    for (int bx = 0; bx < 500; bx += 20) begin
      measure(bx, 250);
      if (int'(cent_x) != last) steps_x++;
      last = int'(cent_x);
    end
    last = -1;
    for (int by = 0; by < 500; by += 20) begin
      measure(250, by);
      if (int'(cent_y) != last) steps_y++;
      last = int'(cent_y);
    end
    checks++;
    if (steps_x != 5 || steps_y != 5) begin
      failures++;
      $display("staircase has %0d x and %0d y levels, expected 5", steps_x, steps_y);
    end
    $display("frames %0d, serial bytes %0d, dropped %0d, x levels %0d, y levels %0d",
             n_frames, n_bytes, n_drop, steps_x, steps_y);
    checks++;
    if (n_drop != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
