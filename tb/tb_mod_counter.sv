// tb_mod_counter: checks the modulo-5 position counter against a reference
// count under random enables and clears, including the wrap output.
module tb_mod_counter;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, wrap;
  logic [2:0] count;
  int checks = 0, failures = 0;
  int ref_count = 0;
  int wraps = 0;

  mod_counter #(.MOD(5), .W(3)) dut (.clk, .rst_n, .clear, .en, .count, .wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      en = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 40) == 0);
      #1;
      checks++;
      if (int'(count) != ref_count || wrap != (en && ref_count == 4)) begin
        failures++;
        $display("cycle %0d count %0d ref %0d wrap %0b", i, count, ref_count, wrap);
      end
      if (wrap) wraps++;
      @(posedge clk);
      if (clear) ref_count = en ? 1 : 0;
      else if (en) ref_count = (ref_count + 1) % 5;
      #1;
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
