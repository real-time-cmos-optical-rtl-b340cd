// config_regs: the mode registers of the sensor, written one command byte at a
// time from the serial receiver.
//
// The source design selects one of four discharge clock rates with two mode
// register bits, has three conversion modes, can send test values instead of
// the centroids, and lets the mode states be read over the serial link. The
// command format is this design's own:
//   bits 7:6 = 0 : bits 1:0 discharge clock select, bits 3:2 conversion mode
//                  (0, 1, 2; a command with mode 3 is ignored)
//   bits 7:6 = 1 : bits 1:0 what is sent each frame (tx_sel_e)
//   bits 7:6 = 2 : bits 4:0 the pixel sent in TX_PIXEL (0..24; larger ignored)
//   bits 7:6 = 3 : read back: readback_req pulses and readback_byte
//                  = {tx_sel, mode, dclk_sel, 2'b00} is sent
// Timing: registers update on the clock after rx_valid; reset loads CFG_RESET
// (fastest discharge clock, mode 1, centroids, pixel 0).
module config_regs
  import sh_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output sensor_cfg_t cfg,
  output logic        readback_req,
  output logic [7:0]  readback_byte
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= CFG_RESET;
      readback_req <= 1'b0;
    end else begin
      readback_req <= 1'b0;
      if (rx_valid) begin
        unique case (rx_data[7:6])
          2'd0: if (rx_data[3:2] != 2'd3) begin
                  cfg.dclk_sel <= rx_data[1:0];
                  cfg.mode     <= conv_mode_e'(rx_data[3:2]);
                end
          2'd1: cfg.tx_sel <= tx_sel_e'(rx_data[1:0]);
          2'd2: if (rx_data[4:0] < PIX_IDX_W'(NUM_PIXELS))
                  cfg.test_pixel <= rx_data[4:0];
          default: readback_req <= 1'b1;
        endcase
      end
    end
  end

  assign readback_byte = {cfg.tx_sel, cfg.mode, cfg.dclk_sel, 2'b00};

endmodule
