// tb_adc_reset_offset: shows why the converter's default mode times the fall
// between the two references. The pixel model is given a pixel-to-pixel spread
// of reset levels (-120 mV to +120 mV) and every pixel the same light. Timed
// from the reset release to Vref1 (mode 0), the readings spread with the reset
// level; timed from Vref1 to Vref2 (mode 1), after the references have been
// calibrated against each pixel's own reset level, they agree to within the
// counter's quantisation.
module tb_adc_reset_offset;
  import sh_pkg::*;
  logic clk = 0, rst_n = 0;
  conv_mode_e mode;
  logic comp1, comp2, pix_reset, light_valid, light_sat, frame_end;
  logic [4:0] row_sel, col_sel, light_idx;
  logic [11:0] vref1_sel, vref2_sel;
  logic [10:0] light;
  logic [7:0] photo [25];
  logic [15:0] vout_mv, vref1_mv, vref2_mv;
  int checks = 0, failures = 0;

  aps_array_model #(.OFFSET_MV(60)) u_pix (.clk, .pix_reset, .row_sel, .col_sel, .photo,
    .vout_mv);
  ref_voltage_gen_model u_r1 (.sel(vref1_sel), .vref_mv(vref1_mv));
  ref_voltage_gen_model u_r2 (.sel(vref2_sel), .vref_mv(vref2_mv));
  comparator_model u_c1 (.vpix_mv(vout_mv), .vref_mv(vref1_mv), .above(comp1));
  comparator_model u_c2 (.vpix_mv(vout_mv), .vref_mv(vref2_mv), .above(comp2));

  adc_controller dut (.clk, .rst_n, .mode, .dclk_sel(2'd0), .comp1, .comp2, .pix_reset,
    .row_sel, .col_sel, .vref1_sel, .vref2_sel, .light, .light_valid, .light_idx,
    .light_sat, .frame_end, .ext_en(1'b0), .ext_reset(1'b0), .ext_row(3'd0), .ext_col(3'd0));

  always #5 clk = ~clk;

  int lo, hi, nframe = 0;
  always @(posedge clk) begin
    if (rst_n && light_valid) begin
      if (int'(light) < lo) lo = int'(light);
      if (int'(light) > hi) hi = int'(light);
    end
    if (rst_n && frame_end) nframe++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame_spread(input conv_mode_e m, output int spread);
    int f0;
    mode = m;
    f0 = nframe;
    while (nframe < f0 + 1) @(posedge clk);
    lo = 4096; hi = -1;
    while (nframe < f0 + 2) @(posedge clk);
    spread = hi - lo;
  endtask

  initial begin
    int s0, s1;
    photo = '{default: 8'd100};   // 4 mV per clock
    mode = MODE_REF1_TO_REF2;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    frame_spread(MODE_RESET_TO_REF1, s0);
    frame_spread(MODE_REF1_TO_REF2, s1);
    $display("spread of readings: %0d from the reset release, %0d between the references",
             s0, s1);
    checks++;
    // reset levels 3080..3320 mV against taps 3000 / 3250 mV: 20..80 mV to fall
    if (s0 < 10) begin failures++; $display("mode 0 should show the offsets"); end
    checks++;
    if (s1 > 2) begin failures++; $display("mode 1 should not show the offsets"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
