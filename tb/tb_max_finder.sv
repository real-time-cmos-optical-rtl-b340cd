// tb_max_finder: random frames (with deliberate ties) checked against a
// reference search for the first brightest pixel.
module tb_max_finder;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [10:0] light, max_level;
  logic [4:0] idx, max_idx;
  int checks = 0, failures = 0;

  max_finder #(.LIGHT_W(11), .IDX_W(5)) dut (
    .clk, .rst_n, .en, .first, .light, .idx, .max_level, .max_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [25];
    int best, besti;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      for (int p = 0; p < 25; p++)
        lv[p] = (f % 3 == 0) ? $urandom_range(0, 7) : $urandom_range(0, 2047);
      best = -1; besti = 0;
      for (int p = 0; p < 25; p++)
        if (lv[p] > best) begin best = lv[p]; besti = p; end
      for (int p = 0; p < 25; p++) begin
        en = 1; first = (p == 0); light = 11'(lv[p]); idx = 5'(p);
        @(posedge clk);
        #1;
        en = ($urandom_range(0, 1) == 0) ? 0 : 0;
      end
      checks++;
      if (int'(max_level) != best || int'(max_idx) != besti) begin
        failures++;
        $display("frame %0d: %0d@%0d expected %0d@%0d", f, max_level, max_idx, best, besti);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
