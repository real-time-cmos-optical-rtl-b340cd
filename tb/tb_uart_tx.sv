// tb_uart_tx: sends random bytes at two baud divisors and decodes the line
// with an independent receiver that checks the start bit, each data bit and
// the stop bit at the middle of its bit time, and the ready handshake.
module tb_uart_tx;
  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [15:0] baud_div;
  logic [7:0] data;
  int checks = 0, failures = 0;

  uart_tx dut (.clk, .rst_n, .baud_div, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(input logic [7:0] b, input int div);
    logic [7:0] got;
    int len;
    baud_div = 16'(div);
    @(negedge clk);
    data = b; valid = 1;
    @(negedge clk);
    valid = 0;
    checks++;
    if (ready) begin failures++; $display("ready high during a frame"); end
    // txd went low at the clock edge just passed; sample mid-bit
    repeat (div / 2 - 1) @(negedge clk);
    checks++;
    if (txd !== 1'b0) begin failures++; $display("no start bit"); end
    for (int i = 0; i < 8; i++) begin
      repeat (div) @(negedge clk);
      got[i] = txd;
    end
    repeat (div) @(negedge clk);
    checks++;
    if (txd !== 1'b1) begin failures++; $display("no stop bit"); end
    checks++;
    if (got != b) begin failures++; $display("sent %h got %h", b, got); end
    len = 0;
    while (!ready) begin @(negedge clk); len++; end
    checks++;
    if (len > div) begin failures++; $display("frame too long"); end
  endtask

  initial begin
    baud_div = 16'd278;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (txd !== 1'b1 || !ready) failures++;
    send_and_check(8'h55, 278);
    send_and_check(8'h00, 278);
    send_and_check(8'hFF, 278);
    for (int i = 0; i < 20; i++) send_and_check(8'($urandom), (i % 2 == 1) ? 278 : 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
