// tb_config_regs: writes every register through command bytes and checks the
// register fields, the ignored commands, the read-back request and byte.
module tb_config_regs;
  import sh_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, readback_req;
  logic [7:0] rx_data, readback_byte;
  sensor_cfg_t cfg;
  int checks = 0, failures = 0;
  int nreq = 0;

  config_regs dut (.clk, .rst_n, .rx_data, .rx_valid, .cfg, .readback_req, .readback_byte);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && readback_req) nreq++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(input logic [7:0] b);
    @(negedge clk);
    rx_data = b; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask

  task automatic expect_cfg(input int dsel, input int mode, input int txs, input int pix);
    checks++;
    if (int'(cfg.dclk_sel) != dsel || int'(cfg.mode) != mode || int'(cfg.tx_sel) != txs ||
        int'(cfg.test_pixel) != pix) begin
      failures++;
      $display("cfg %0d %0d %0d %0d expected %0d %0d %0d %0d", cfg.dclk_sel, cfg.mode,
               cfg.tx_sel, cfg.test_pixel, dsel, mode, txs, pix);
    end
  endtask

  initial begin
    rx_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_cfg(0, 1, 0, 0);
    for (int d = 0; d < 4; d++)
      for (int m = 0; m < 3; m++) begin
        cmd(8'({2'd0, 2'b00, 2'(m), 2'(d)}));
        expect_cfg(d, m, 0, 0);
      end
    cmd(8'b00_00_11_01);              // mode 3 does not exist: ignored
    expect_cfg(3, 2, 0, 0);
    for (int t = 0; t < 4; t++) begin
      cmd(8'({2'd1, 4'b0, 2'(t)}));
      expect_cfg(3, 2, t, 0);
    end
    cmd(8'({2'd2, 1'b0, 5'd17}));
    expect_cfg(3, 2, 3, 17);
    cmd(8'({2'd2, 1'b0, 5'd25}));     // no pixel 25: ignored
    expect_cfg(3, 2, 3, 17);
    cmd(8'hC0);
    @(negedge clk);
    checks++;
    if (nreq != 1 || readback_byte != {2'd3, 2'd2, 2'd3, 2'b00}) begin
      failures++;
      $display("readback %0d requests, byte %h", nreq, readback_byte);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
