// tb_tx_formatter: for each transmit selection, presents a frame result and
// checks the byte sequence handed to a transmitter model that accepts a byte
// every few clocks; also checks read-back, the test pixel capture and that a
// result arriving mid-packet is dropped.
module tb_tx_formatter;
  import sh_pkg::*;
  logic clk = 0, rst_n = 0;
  tx_sel_e tx_sel;
  logic [4:0] test_pixel;
  logic readback_req = 0;
  logic [7:0] readback_byte;
  logic [10:0] light;
  logic light_valid = 0;
  logic [4:0] light_idx;
  logic cent_valid = 0;
  logic [6:0] cent_x, cent_y;
  logic [17:0] dividend_x, dividend_y;
  logic [15:0] divisor;
  logic [10:0] max_level;
  logic [4:0] max_idx;
  logic [7:0] byte_data;
  logic byte_valid, byte_ready, dropped;
  int checks = 0, failures = 0;
  logic [7:0] got [$];
  int ndrop = 0;
  int slow = 0;

  tx_formatter dut (.clk, .rst_n, .tx_sel, .test_pixel, .readback_req, .readback_byte,
    .light, .light_valid, .light_idx, .cent_valid, .cent_x, .cent_y, .dividend_x,
    .dividend_y, .divisor, .max_level, .max_idx, .byte_data, .byte_valid, .byte_ready,
    .dropped);

  always #5 clk = ~clk;

  // transmitter model: ready one clock in four
  always @(posedge clk) begin
    slow <= (slow + 1) % 4;
    if (byte_valid && byte_ready) got.push_back(byte_data);
    if (dropped) ndrop++;
  end
  assign byte_ready = (slow == 3);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic result();
    @(negedge clk);
    cent_valid = 1;
    @(negedge clk);
    cent_valid = 0;
  endtask

  task automatic expect_bytes(input logic [7:0] e [], input string what);
    repeat (60) @(negedge clk);
    checks++;
    if (got.size() != e.size()) begin
      failures++;
      $display("%s: %0d bytes, expected %0d", what, got.size(), e.size());
    end else begin
      foreach (e[i]) if (got[i] != e[i]) begin
        failures++;
        $display("%s byte %0d: %h expected %h", what, i, got[i], e[i]);
      end
    end
    got.delete();
  endtask

  initial begin
    logic [7:0] e [];
    cent_x = 7'd37; cent_y = 7'd101;
    dividend_x = 18'h2ABCD; dividend_y = 18'h1F00E; divisor = 16'hBEEF;
    max_level = 11'h5A3; max_idx = 5'd19;
    readback_byte = 8'h9C;
    test_pixel = 5'd7; tx_sel = TX_CENTROID;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // pixel stream: pixel 7 carries 0x3C5
    for (int p = 0; p < 25; p++) begin
      @(negedge clk);
      light = (p == 7) ? 11'h3C5 : 11'(p); light_idx = 5'(p); light_valid = 1;
    end
    @(negedge clk) light_valid = 0;

    result();
    e = '{8'h25, 8'hE5};
    expect_bytes(e, "centroid");
    tx_sel = TX_MAXIMUM;
    result();
    e = '{8'h9D, 8'hA3};
    expect_bytes(e, "maximum");
    tx_sel = TX_DIVIDE;
    result();
    e = '{8'h02, 8'hAB, 8'hCD, 8'h01, 8'hF0, 8'h0E, 8'hBE, 8'hEF};
    expect_bytes(e, "divide");
    tx_sel = TX_PIXEL;
    result();
    e = '{8'h3B, 8'hC5};
    expect_bytes(e, "pixel");
    // read-back request while idle
    @(negedge clk) readback_req = 1;
    @(negedge clk) readback_req = 0;
    e = '{8'h9C};
    expect_bytes(e, "readback");
    // a second result during a packet is dropped; a read-back waits
    tx_sel = TX_DIVIDE;
    result();
    repeat (3) @(negedge clk);
    cent_x = 7'd1;
    result();
    @(negedge clk) readback_req = 1;
    @(negedge clk) readback_req = 0;
    e = '{8'h02, 8'hAB, 8'hCD, 8'h01, 8'hF0, 8'h0E, 8'hBE, 8'hEF, 8'h9C};
    expect_bytes(e, "drop");
    checks++;
    if (ndrop != 1) begin failures++; $display("%0d drops", ndrop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
