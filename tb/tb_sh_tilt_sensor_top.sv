// tb_sh_tilt_sensor_top: end-to-end test of the tilt sensor at its default
// sizes: a light spot on the pixel array, the serial link at 115200 baud
// (baud_div = 278 at 32 MHz), commands sent into rxd and results decoded from
// txd.
//
// Every frame's expected results are worked out here from the digitised pixel
// levels seen on the light port: centroids floor(16 * sum(w * I) / sum(I)),
// maximum, dividends, divisor and the test pixel; every byte that arrives on
// txd must match them (or be the read-back byte just requested). The spot is
// moved across the array in x and then in y, and the centroids must follow it.
// Each mechanism of the design is driven at least once and counted: the three
// conversion modes, the four discharge clocks, the mode-2 second cycle,
// counter saturation on dark pixels, all four transmit selections, mode
// read-back, a result dropped while the link is busy, a dark frame (division
// by zero), external control of reset and addressing and a bad serial frame.
module tb_sh_tilt_sensor_top;
  import sh_pkg::*;
  localparam int BAUD = 278;

  logic clk = 0, rst_n = 0;
  logic [7:0] photo [25];
  logic [15:0] baud_div = 16'(BAUD);
  logic rxd = 1, txd;
  logic ext_en = 0, ext_reset = 0;
  logic [2:0] ext_row = 0, ext_col = 0;
  logic [10:0] light, max_level;
  logic light_valid, light_sat, frame_end, cent_valid, div_zero, tx_dropped, rx_frame_err;
  logic [4:0] light_idx, max_idx;
  logic [6:0] cent_x, cent_y;

  sh_tilt_sensor_top dut (.clk, .rst_n, .photo, .baud_div, .rxd, .txd, .ext_en, .ext_reset,
    .ext_row, .ext_col, .light, .light_valid, .light_idx, .light_sat, .frame_end,
    .cent_x, .cent_y, .cent_valid, .div_zero, .max_level, .max_idx, .tx_dropped,
    .rx_frame_err);

  always #15.625 clk = ~clk;   // 32 MHz

  int checks = 0, failures = 0;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- host model
  // what the host last asked for (the testbench mirrors the mode registers)
  tx_sel_e host_tx_sel = TX_CENTROID;
  int host_test_pixel = 0;
  logic [7:0] rb_expect;
  bit rb_wanted = 0;

  task automatic host_send(input logic [7:0] b, input logic stop = 1'b1);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (BAUD) @(posedge clk);
    end
    rxd = 1;
    repeat (2 * BAUD) @(posedge clk);
  endtask

  // serial decoder on txd
  logic [7:0] rx_bytes [$];
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
      checks++;
      if (!txd) begin failures++; $display("txd stop bit missing"); end
      rx_bytes.push_back(b);
    end
  end

  // --------------------------------------------------------- frame reference
  int lv [25];
  int exp_x = 0, exp_y = 0;
  logic [7:0] expect_q [$];
  logic [7:0] pend [$];
  bit pend_valid = 0;
  int n_frames = 0, n_sat = 0, n_drop = 0, n_divzero = 0, n_cent_ok = 0;
  int n_second = 0, n_ext = 0, n_rxerr = 0, n_rb = 0, n_idle = 0;
  int mode_frames [3] = '{0, 0, 0};
  int sel_frames [4] = '{0, 0, 0, 0};
  int sel_pkts [4] = '{0, 0, 0, 0};
  logic second_d = 0;
  longint cyc = 0, last_cent_cyc = 0, cent_gap = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    second_d <= dut.u_adc.second;
    if (dut.u_adc.second && !second_d) n_second++;
    if (rx_frame_err) n_rxerr++;
    if (frame_end) n_idle++;
    if (light_valid) begin
      lv[light_idx] = int'(light);
      if (light_sat) n_sat++;
    end
    // a packet decided on the previous clock is expected unless dropped
    if (pend_valid) begin
      pend_valid = 0;
      if (tx_dropped) n_drop++;
      else begin
        foreach (pend[i]) expect_q.push_back(pend[i]);
        sel_pkts[host_tx_sel]++;
      end
    end
    if (cent_valid) begin
      longint sx, sy, s;
      int best, besti;
      sx = 0; sy = 0; s = 0; best = -1; besti = 0;
      for (int p = 0; p < 25; p++) begin
        sx += (longint'(p) % 5) * longint'(lv[p]);
        sy += (longint'(p) / 5) * longint'(lv[p]);
        s += longint'(lv[p]);
        if (lv[p] > best) begin best = lv[p]; besti = p; end
      end
      exp_x = (s == 0) ? 0 : int'((16 * sx) / s);
      exp_y = (s == 0) ? 0 : int'((16 * sy) / s);
      if (exp_x > 127) exp_x = 127;
      if (exp_y > 127) exp_y = 127;
      n_frames++;
      mode_frames[dut.u_cfg.cfg.mode]++;
      sel_frames[dut.u_cfg.cfg.dclk_sel]++;
      cent_gap = cyc - last_cent_cyc;
      last_cent_cyc = cyc;
      checks++;
      if (int'(cent_x) != exp_x || int'(cent_y) != exp_y || div_zero != (s == 0) ||
          int'(max_level) != best || int'(max_idx) != besti) begin
        failures++;
        $display("frame %0d: centroid %0d,%0d max %0d@%0d, expected %0d,%0d max %0d@%0d",
                 n_frames, cent_x, cent_y, max_level, max_idx, exp_x, exp_y, best, besti);
      end else n_cent_ok++;
      if (s == 0) n_divzero++;
      pend.delete();
      unique case (host_tx_sel)
        TX_CENTROID: begin
          pend.push_back({1'b0, 7'(exp_x)});
          pend.push_back({1'b1, 7'(exp_y)});
        end
        TX_MAXIMUM: begin
          pend.push_back({5'(besti), 3'(best >> 8)});
          pend.push_back(8'(best));
        end
        TX_DIVIDE: begin
          for (int k = 16; k >= 0; k -= 8) pend.push_back(8'(sx >> k));
          for (int k = 16; k >= 0; k -= 8) pend.push_back(8'(sy >> k));
          pend.push_back(8'(s >> 8));
          pend.push_back(8'(s));
        end
        default: begin
          pend.push_back({5'(host_test_pixel), 3'(lv[host_test_pixel] >> 8)});
          pend.push_back(8'(lv[host_test_pixel]));
        end
      endcase
      pend_valid = 1;
    end
  end

  // match received bytes against the expected stream
  always @(posedge clk) begin
    while (rx_bytes.size() > 0) begin
      logic [7:0] b;
      b = rx_bytes.pop_front();
      checks++;
      if (rb_wanted && b == rb_expect &&
          (expect_q.size() == 0 || expect_q[0] != b)) begin
        rb_wanted = 0;
        n_rb++;
      end else if (expect_q.size() == 0) begin
        failures++;
        $display("unexpected byte %h", b);
      end else begin
        logic [7:0] e;
        e = expect_q.pop_front();
        if (b != e) begin
          failures++;
          $display("byte %h, expected %h", b, e);
        end
      end
    end
  end

  // ------------------------------------------------------------------ stimulus
  // a light spot centred at (cx, cy) pixel pitches, in 1/4 pitch units
  task automatic spot(input int cx4, input int cy4);
    for (int p = 0; p < 25; p++) begin
      int dx = 4 * (p % 5) - cx4, dy = 4 * (p / 5) - cy4;
      int d2 = dx * dx + dy * dy;
      int v = 250 - 12 * d2;
      photo[p] = 8'(v < 0 ? 0 : v);
    end
  endtask

  task automatic wait_frames(input int n);
    int f0 = n_frames;
    while (n_frames < f0 + n) @(posedge clk);
  endtask

  task automatic set_mode(input int sel, input int mode);
    host_send(8'({2'd0, 2'b00, 2'(mode), 2'(sel)}));
  endtask

  task automatic set_tx(input tx_sel_e t);
    host_send(8'({2'd1, 4'b0, 2'(t)}));
    // the new choice applies from the next frame result
    host_tx_sel = t;
  endtask

  initial begin
    int xs [7], ys [7];
    for (int p = 0; p < 25; p++) photo[p] = 0;
    spot(8, 8);
    repeat (5) @(posedge clk);
    rst_n = 1;

    // centred spot, default mode: centroid at the array centre (2.0 = 32)
    wait_frames(3);
    checks++;
    if (exp_x < 30 || exp_x > 34 || exp_y < 30 || exp_y > 34) begin
      failures++;
      $display("centred spot gave %0d,%0d", exp_x, exp_y);
    end
    // centre pixel, photo 250 = 10 mV per clock: 3.00 V to 2.75 V takes 25
    // clocks, so it reads 2047 - 25
    checks++;
    if (lv[12] < 2019 || lv[12] > 2025) begin
      failures++;
      $display("centre pixel reads %0d, expected about 2022", lv[12]);
    end
    $display("spot frame period %0d clocks: %0d Hz at 32 MHz", cent_gap,
             32000000 / cent_gap);
    checks++;
    if (32000000 / cent_gap < 2400 || 32000000 / cent_gap > 4800) begin
      failures++;
      $display("frame rate outside 2.4-4.8 kHz");
    end

    // scan the spot in x, then in y
    for (int k = 0; k < 7; k++) begin
      spot(2 + 2 * k, 8);
      wait_frames(2);
      xs[k] = exp_x;
      ys[k] = exp_y;
    end
    for (int k = 1; k < 7; k++) begin
      checks++;
      if (xs[k] <= xs[k - 1] || ys[k] < 28 || ys[k] > 36) begin
        failures++;
        $display("x scan step %0d: %0d,%0d after %0d,%0d", k, xs[k], ys[k], xs[k-1], ys[k-1]);
      end
    end
    for (int k = 0; k < 7; k++) begin
      spot(8, 2 + 2 * k);
      wait_frames(2);
      ys[k] = exp_y;
      xs[k] = exp_x;
    end
    for (int k = 1; k < 7; k++) begin
      checks++;
      if (ys[k] <= ys[k - 1] || xs[k] < 28 || xs[k] > 36) begin
        failures++;
        $display("y scan step %0d: %0d,%0d after %0d,%0d", k, xs[k], ys[k], xs[k-1], ys[k-1]);
      end
    end

    // every conversion mode with every discharge clock
    spot(6, 10);
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 4; s++) begin
        set_mode(s, m);
        wait_frames(2);
      end
    set_mode(0, 1);

    // test outputs: maximum, dividends (longer than a frame: drops), one pixel
    set_tx(TX_MAXIMUM);
    wait_frames(3);
    set_tx(TX_DIVIDE);
    wait_frames(4);
    host_send(8'({2'd2, 1'b0, 5'd13}));
    host_test_pixel = 13;
    set_tx(TX_PIXEL);
    wait_frames(3);

    // read back the mode registers: {tx_sel, mode, dclk_sel, 00}
    rb_expect = {2'(TX_PIXEL), 2'd1, 2'd0, 2'b00};
    rb_wanted = 1;
    host_send(8'hC0);
    wait_frames(3);
    set_tx(TX_CENTROID);

    // a frame with a bad stop bit is rejected and changes nothing
    host_send(8'b00_00_10_11, 1'b0);
    wait_frames(1);
    checks++;
    if (dut.u_cfg.cfg.mode != MODE_REF1_TO_REF2) begin failures++; $display("bad frame obeyed"); end

    // dark frame: every pixel saturates, sum 0
    photo = '{default: 8'd0};
    wait_frames(3);

    // external control of reset and addressing
    spot(8, 8);
    wait_frames(1);
    ext_en = 1; ext_reset = 1; ext_row = 3'd2; ext_col = 3'd2;
    repeat (100) @(posedge clk);
    checks++;
    if (dut.pix_reset !== 1'b1 || dut.vout_mv != 16'd3200) failures++;
    ext_reset = 0;
    repeat (40) @(posedge clk);
    checks++;
    // centre pixel, photo 250: 10 mV per clock
    if (dut.pix_reset || dut.vout_mv > 16'd2820 || dut.vout_mv < 16'd2780) begin
      failures++;
      $display("external control: vout %0d", dut.vout_mv);
    end
    n_ext++;
    ext_en = 0;
    wait_frames(3);
    repeat (20 * BAUD) @(posedge clk);

    // -------------------------------------------------------------- coverage
    $display("frames %0d (ok %0d), modes %0d/%0d/%0d, clocks %0d/%0d/%0d/%0d",
             n_frames, n_cent_ok, mode_frames[0], mode_frames[1], mode_frames[2],
             sel_frames[0], sel_frames[1], sel_frames[2], sel_frames[3]);
    $display("packets centroid %0d max %0d divide %0d pixel %0d, read-backs %0d, dropped %0d",
             sel_pkts[0], sel_pkts[1], sel_pkts[2], sel_pkts[3], n_rb, n_drop);
    $display("second cycles %0d, saturated pixels %0d, dark frames %0d, idle periods %0d",
             n_second, n_sat, n_divzero, n_idle);
    $display("external control %0d, bad serial frames %0d", n_ext, n_rxerr);
    for (int m = 0; m < 3; m++) begin checks++; if (mode_frames[m] == 0) failures++; end
    for (int s = 0; s < 4; s++) begin checks++; if (sel_frames[s] == 0) failures++; end
    for (int t = 0; t < 4; t++) begin checks++; if (sel_pkts[t] == 0) failures++; end
    checks++; if (n_rb == 0) failures++;
    checks++; if (n_drop == 0) failures++;
    checks++; if (n_second == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_divzero == 0) failures++;
    checks++; if (n_ext == 0) failures++;
    checks++; if (n_rxerr == 0) failures++;
    checks++; if (n_idle < n_frames - 1) failures++;
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("%0d bytes never sent", expect_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
