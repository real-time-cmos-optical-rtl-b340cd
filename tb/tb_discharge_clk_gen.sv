// tb_discharge_clk_gen: checks that each discharge clock select gives one tick
// every 2**sel clocks, evenly spaced, and that clear restarts the prescaler.
module tb_discharge_clk_gen;
  logic clk = 0, rst_n = 0, clear = 1, tick;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  discharge_clk_gen dut (.clk, .rst_n, .clear, .sel, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, last, gap;
    sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      clear = 1;
      @(posedge clk);
      #1 clear = 0;
      n = 0; last = -1;
      for (int c = 0; c < 256; c++) begin
        @(negedge clk);
        if (tick) begin
          if (last >= 0) begin
            gap = c - last;
            checks++;
            if (gap != (1 << s)) begin
              failures++;
              $display("sel=%0d gap %0d", s, gap);
            end
          end else begin
            // first tick 2**sel clocks after clear is released
            checks++;
            if (c != (1 << s) - 1) begin
              failures++;
              $display("sel=%0d first tick at %0d", s, c);
            end
          end
          last = c;
          n++;
        end
      end
      checks++;
      if (n != 256 >> s) begin
        failures++;
        $display("sel=%0d ticks %0d", s, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
