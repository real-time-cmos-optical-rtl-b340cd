// tb_uart_rx: drives 8N1 frames onto rxd from the testbench at two baud
// divisors and checks the received bytes, a frame with a bad stop bit and a
// glitch that must not start a frame.
module tb_uart_rx;
  logic clk = 0, rst_n = 0, rxd = 1, valid, frame_err;
  logic [15:0] baud_div;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx dut (.clk, .rst_n, .baud_div, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic [7:0] b, input logic stop, input int div);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (div) @(negedge clk);
    end
    rxd = 1;
    repeat (div) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int v0, e0;
    baud_div = 16'd278;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      baud_div = (i % 3 == 0) ? 16'd17 : 16'd278;
      b = (i == 0) ? 8'hA5 : 8'($urandom);
      v0 = nvalid;
      drive(b, 1'b1, int'(baud_div));
      checks++;
      if (nvalid != v0 + 1 || last != b) begin
        failures++;
        $display("sent %h got %h (%0d frames)", b, last, nvalid - v0);
      end
    end
    // bad stop bit
    v0 = nvalid; e0 = nerr;
    drive(8'h3C, 1'b0, 278);
    repeat (300) @(negedge clk);
    checks++;
    if (nvalid != v0 || nerr != e0 + 1) begin failures++; $display("stop bit error missed"); end
    // a short glitch is not a start bit
    v0 = nvalid;
    rxd = 0; repeat (20) @(negedge clk); rxd = 1;
    repeat (3000) @(negedge clk);
    checks++;
    if (nvalid != v0) begin failures++; $display("glitch taken as a frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
