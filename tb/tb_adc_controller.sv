// tb_adc_controller: runs the converter against the pixel, reference and
// comparator models over whole frames in all three modes and all four
// discharge clock rates. Each pixel's light level is checked against the value
// worked out from the pixel model's linear discharge (reset level 3.2 V,
// photo * 40 uV per clock; calibrated references 3.00 V and 2.75 V; mode 2
// second cycle to 2.00 V), within one discharge clock period of quantisation.
// Also checked: the 256-clock reset, the calibrated reference taps, 25 pixels
// and a 256-clock idle period per frame, the frame rate of a bright frame,
// dark-pixel saturation, the mode-2 second cycle and external control.
module tb_adc_controller;
  import sh_pkg::*;
  logic clk = 0, rst_n = 0;
  conv_mode_e mode;
  logic [1:0] dclk_sel;
  logic comp1, comp2, pix_reset;
  logic [4:0] row_sel, col_sel;
  logic [11:0] vref1_sel, vref2_sel;
  logic [10:0] light;
  logic light_valid, light_sat, frame_end;
  logic [4:0] light_idx;
  logic ext_en = 0, ext_reset = 0;
  logic [2:0] ext_row = 0, ext_col = 0;
  logic [7:0] photo [25];
  logic [15:0] vout_mv, vref1_mv, vref2_mv;
  int checks = 0, failures = 0;

  aps_array_model u_pix (.clk, .pix_reset, .row_sel, .col_sel, .photo, .vout_mv);
  ref_voltage_gen_model u_r1 (.sel(vref1_sel), .vref_mv(vref1_mv));
  ref_voltage_gen_model u_r2 (.sel(vref2_sel), .vref_mv(vref2_mv));
  comparator_model u_c1 (.vpix_mv(vout_mv), .vref_mv(vref1_mv), .above(comp1));
  comparator_model u_c2 (.vpix_mv(vout_mv), .vref_mv(vref2_mv), .above(comp2));

  adc_controller dut (.clk, .rst_n, .mode, .dclk_sel, .comp1, .comp2, .pix_reset,
    .row_sel, .col_sel, .vref1_sel, .vref2_sel, .light, .light_valid, .light_idx,
    .light_sat, .frame_end, .ext_en, .ext_reset, .ext_row, .ext_col);

  always #5 clk = ~clk;

  // monitor
  int got [25];
  bit got_sat [25];
  int nvalid = 0, nframe = 0, nsat = 0, nsecond = 0, nresets = 0;
  int nlong = 0;
  int reset_len = 0, bad_reset_len = 0, bad_refs = 0, idle_len = 0;
  longint cyc = 0, frame_start_cyc = 0, last_frame_len = 0;
  logic pix_reset_d = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    pix_reset_d <= pix_reset;
    if (!ext_en && rst_n) begin
      if (pix_reset) reset_len <= reset_len + 1;
      if (!pix_reset && pix_reset_d) begin
        nresets <= nresets + 1;
        // 256 clocks; 512 where the idle 26th period runs into pixel 0's reset
        if (reset_len != 256 && reset_len != 512) bad_reset_len <= bad_reset_len + 1;
        if (reset_len == 512) nlong <= nlong + 1;
        reset_len <= 0;
      end
      // after the reset the references sit at the calibrated taps
      if (!pix_reset && vref1_sel != 12'b0001_0000_0000) bad_refs <= bad_refs + 1;
      if (light_valid) begin
        got[light_idx] = int'(light);
        got_sat[light_idx] = light_sat;
        nvalid <= nvalid + 1;
        if (light_sat) nsat <= nsat + 1;
      end
      if (frame_end) begin
        nframe <= nframe + 1;
        last_frame_len <= cyc - frame_start_cyc;
        frame_start_cyc <= cyc;
      end
      // mode 2 second cycle: Vref2 four taps below Vref1
      if (!pix_reset && vref2_sel == 12'b0000_0001_0000) nsecond <= nsecond + 1;
    end
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks after the reset release until the pixel drops to or below ref_mv
  function automatic int cross_clocks(input int p, input int ref_mv);
    int s = 40 * p;
    if (p == 0) return 1 << 30;
    return (3200000 - (ref_mv * 1000 + 1000)) / s + 1;
  endfunction

  // expected light level; -1 where rounding makes the outcome ambiguous
  function automatic int expected(input int p, input conv_mode_e m, input int sel);
    int div = 1 << sel;
    int n1 = cross_clocks(p, 3000), n2 = cross_clocks(p, 2750), n3 = cross_clocks(p, 2000);
    int t, tt;
    if (m == MODE_RESET_TO_REF1) t = n1;
    else begin
      if (n1 / div > 257) return 0;
      if (n1 / div > 253) return -1;
      t = n2 - n1;
    end
    if (t / div > 257) return 0;
    if (t / div > 253) return -1;
    if (m == MODE_TWO_CYCLE) begin
      if (t / div > 65) tt = 4 * t;
      else if (t / div < 62) begin
        tt = n3 - n1;
        if (tt / div > 253) return -1;
      end
      else return -1;
    end else tt = t;
    if (tt > 2047) return 0;
    return 2047 - tt;
  endfunction

  task automatic run_frame(input conv_mode_e m, input int sel);
    int f0, e, tol;
    mode = m; dclk_sel = 2'(sel);
    // start from a clean frame boundary
    f0 = nframe;
    while (nframe == f0) @(posedge clk);
    f0 = nframe;
    while (nframe == f0) @(posedge clk);
    for (int i = 0; i < 25; i++) begin
      e = expected(int'(photo[i]), m, sel);
      if (e < 0) continue;
      tol = ((m == MODE_TWO_CYCLE && e > 0 && 2047 - e >= 4 * 62) ? 4 : 1) * (1 << sel) + 3;
      checks++;
      if (e == 0 ? (got[i] != 0 || !got_sat[i] && 2047 - got[i] < 2040)
                 : (got[i] > e + tol || got[i] < e - tol)) begin
        failures++;
        $display("mode %0d sel %0d pixel %0d photo %0d: light %0d, expected %0d",
                 m, sel, i, photo[i], got[i], e);
      end
    end
  endtask

  initial begin
    int v0, n0, s0, r0;
    for (int i = 0; i < 25; i++) photo[i] = 8'(i * 10 + 3);
    photo[0] = 0;            // a dark pixel
    photo[6] = 2;            // too dim for the fast clocks
    mode = MODE_REF1_TO_REF2; dclk_sel = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 4; s++)
        run_frame(conv_mode_e'(m), s);

    // frame structure
    checks++;
    if (bad_reset_len != 0 || bad_refs != 0) begin
      failures++;
      $display("%0d resets not 256 clocks, %0d clocks with wrong Vref1", bad_reset_len, bad_refs);
    end
    checks++;
    if (nlong != nframe && nlong != nframe - 1) begin
      failures++;
      $display("%0d idle periods in %0d frames", nlong, nframe);
    end
    checks++;
    if (nvalid != 25 * nframe) begin
      failures++;
      $display("%0d pixels in %0d frames", nvalid, nframe);
    end
    checks++;
    if (nsat == 0 || nsecond == 0) begin
      failures++;
      $display("saturation %0d, second cycles %0d", nsat, nsecond);
    end

    // bright uniform frame, default mode: the frame rate of the source design
    photo = '{default: 8'd255};
    run_frame(MODE_REF1_TO_REF2, 0);
    @(posedge clk);
    checks++;
    $display("bright frame: %0d clocks, %0d Hz at 32 MHz", last_frame_len,
             32000000 / last_frame_len);
    if (32000000 / last_frame_len < 2400 || 32000000 / last_frame_len > 4800) begin
      failures++;
      $display("frame rate out of the 2.4-4.8 kHz range");
    end
    photo = '{default: 8'd60};
    run_frame(MODE_REF1_TO_REF2, 0);
    @(posedge clk);
    $display("dimmer frame: %0d clocks, %0d Hz at 32 MHz", last_frame_len,
             32000000 / last_frame_len);
    checks++;
    if (last_frame_len < 26 * 256 || 32000000 / last_frame_len > 4800) failures++;

    // external control: reset and addressing follow the pins, no readings
    @(negedge clk);
    ext_en = 1; ext_reset = 1; ext_row = 3'd2; ext_col = 3'd4;
    v0 = nvalid;
    repeat (5) @(negedge clk);
    checks++;
    if (!pix_reset || row_sel != 5'b00100 || col_sel != 5'b10000 || vout_mv != 16'd3200)
      failures++;
    ext_reset = 0;
    repeat (50) @(negedge clk);
    checks++;
    // pixel 14 (photo 60) has discharged 49 * 2.4 mV
    if (pix_reset || vout_mv > 16'd3090 || vout_mv < 16'd3070) begin
      failures++;
      $display("external control: reset %0b vout %0d", pix_reset, vout_mv);
    end
    repeat (3000) @(negedge clk);
    checks++;
    if (nvalid != v0) failures++;
    ext_en = 0;
    n0 = nframe;
    while (nframe == n0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (nvalid != v0 + 25) begin failures++; $display("restart after external control"); end
    $display("frames %0d, pixels %0d, saturated %0d, second-cycle clocks %0d", nframe, nvalid,
             nsat, nsecond);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
