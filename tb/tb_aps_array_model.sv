// tb_aps_array_model: checks the pixel array model: reset level on the selected
// pixel, linear discharge at photo * 40 uV per clock, the floor, and that only
// the selected pixel drives the output.
module tb_aps_array_model;
  logic clk = 0, pix_reset = 1;
  logic [4:0] row_sel, col_sel;
  logic [7:0] photo [25];
  logic [15:0] vout_mv;
  int checks = 0, failures = 0;
  int ncyc = 0;   // clocks since the reset was released

  always @(posedge clk) ncyc <= pix_reset ? 0 : ncyc + 1;

  // expected output of pixel i (photo = 10 i) after ncyc clocks of discharge
  function automatic int expect_mv(input int i);
    int uv = 3200000 - 400 * i * ncyc;
    if (uv < 200000) uv = 200000;
    return uv / 1000;
  endfunction

  aps_array_model dut (.clk, .pix_reset, .row_sel, .col_sel, .photo, .vout_mv);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int r, input int c, input int expect_mv);
    @(negedge clk);
    row_sel = 5'(1) << r;
    col_sel = 5'(1) << c;
    #1;
    checks++;
    if (int'(vout_mv) != expect_mv) begin
      failures++;
      $display("pixel %0d,%0d: %0d mV, expected %0d", r, c, vout_mv, expect_mv);
    end
  endtask

  // sample pixel i between clock edges and compare with the expected voltage
  task automatic check_discharge(input int i);
    @(negedge clk);
    row_sel = 5'(1) << (i / 5);
    col_sel = 5'(1) << (i % 5);
    #1;
    checks++;
    if (int'(vout_mv) != expect_mv(i)) begin
      failures++;
      $display("pixel %0d: %0d mV, expected %0d", i, vout_mv, expect_mv(i));
    end
  endtask

  initial begin
    for (int i = 0; i < 25; i++) photo[i] = 8'(10 * i);
    row_sel = '0; col_sel = '0;
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < 25; i++) check(i / 5, i % 5, 3200);
    row_sel = '0; col_sel = '0;
    #1;
    checks++;
    if (vout_mv != 0) failures++;
    pix_reset = 0;
    repeat (100) @(posedge clk);
    #1;
    // the clock keeps running while the pixels are read, so the expected
    // voltage follows the clocks counted since the release
    for (int i = 0; i < 25; i++) check_discharge(i);
    repeat (2000) @(posedge clk);
    #1;
    check(4, 4, 200);          // 240 * 40 uV * 2100 clocks reaches the floor
    check(0, 0, 3200);         // dark pixel holds
    pix_reset = 1;
    @(posedge clk);
    #1;
    check(4, 4, 3200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
