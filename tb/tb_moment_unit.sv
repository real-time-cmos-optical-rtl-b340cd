// tb_moment_unit: feeds random frames of weights and light levels and checks
// the accumulated first moment after every pixel against a reference sum.
module tb_moment_unit;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [2:0] weight;
  logic [10:0] light;
  logic [17:0] acc;
  int checks = 0, failures = 0;
  int ref_acc = 0;

  moment_unit #(.WEIGHT_W(3), .LIGHT_W(11), .ACC_W(18)) dut (
    .clk, .rst_n, .en, .first, .weight, .light, .acc);

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
    for (int f = 0; f < 8; f++) begin
      for (int p = 0; p < 25; p++) begin
        en = 1;
        first = (p == 0);
        weight = 3'(p % 5);
        light = (f == 0) ? 11'd2047 : 11'($urandom_range(0, 2047));
        @(posedge clk);
        ref_acc = first ? int'(weight) * int'(light) : ref_acc + int'(weight) * int'(light);
        #1;
        en = 0;
        checks++;
        if (int'(acc) != ref_acc) begin
          failures++;
          $display("frame %0d pixel %0d: %0d expected %0d", f, p, acc, ref_acc);
        end
        // idle clocks between pixels must not change the moment
        if (p % 7 == 3) begin
          repeat (3) @(posedge clk);
          #1;
          checks++;
          if (int'(acc) != ref_acc) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
