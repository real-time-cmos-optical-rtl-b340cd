// tb_seq_divider: random and corner divisions checked against integer
// division saturated to 7 bits, with the latency of one clock per dividend bit.
module tb_seq_divider;
  logic clk = 0, rst_n = 0, start = 0;
  logic [21:0] dividend;
  logic [15:0] divisor;
  logic busy, done, div_zero;
  logic [6:0] quotient;
  int checks = 0, failures = 0;

  seq_divider #(.N_W(22), .D_W(16), .Q_W(7)) dut (
    .clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient, .div_zero);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input longint a, input longint b);
    longint q;
    int lat;
    dividend = 22'(a); divisor = 16'(b); start = 1;
    @(posedge clk);
    #1 start = 0;
    lat = 0;
    while (!done) begin
      @(posedge clk);
      #1 lat++;
    end
    q = (b == 0) ? 0 : (a / b > 127 ? 127 : a / b);
    checks++;
    if (int'(quotient) != int'(q) || div_zero != (b == 0) || lat != 22) begin
      failures++;
      $display("%0d / %0d = %0d (dz %0b, %0d clocks), expected %0d", a, b, quotient,
               div_zero, lat, q);
    end
  endtask

  initial begin
    longint b;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    divide(0, 5);
    divide(64 * 100, 100);
    divide(4194303, 65535);
    divide(4194303, 1);
    divide(1000, 0);
    divide(127 * 3, 3);
    divide(128 * 3, 3);
    for (int i = 0; i < 200; i++) begin
      b = longint'($urandom_range(1, 65535));
      // mostly dividends giving quotients in range
      divide(longint'($urandom_range(0, 64)) * b + longint'($urandom_range(0, 32'(b - 1))), b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
