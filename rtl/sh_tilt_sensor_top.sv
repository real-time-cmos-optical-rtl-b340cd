// sh_tilt_sensor_top: one tilt sensor of a Shack-Hartmann wavefront sensor on
// a single chip: a 5 x 5 active pixel array behind one lenslet, its converter,
// a centroid processor and an RS-232 link.
//
// The light spot focused by the lenslet falls on the 5 x 5 pixels; its
// centroid, measured against a reference position, gives the local wavefront
// tilt. The adc_controller resets the pixels, calibrates the two reference
// generators and times each pixel's discharge between comparator crossings,
// producing an 11-bit light level per pixel, 25 per frame, plus one idle
// period. The centroid_processor turns a frame into 7-bit x and y centroids,
// the brightest pixel, and the dividends and divisor. tx_formatter and
// uart_tx send what config_regs selects; uart_rx writes config_regs.
//
// The pixel array, the reference generators and the comparators are analogue
// in silicon and are behavioural models here (aps_array_model,
// ref_voltage_gen_model, comparator_model), so this top simulates but is not
// synthesizable as a whole; everything from adc_controller onwards is. photo
// stands for the light on each pixel (row-major) and drives the pixel model.
//
// Ports: clk is the 32 MHz system clock of the source design and rst_n an
// asynchronous active-low reset. baud_div sets the serial bit time in clocks
// (278 for 115200 baud). ext_en hands pixel reset and row/column addressing to
// the ext_* pins. The frame results and the digitised pixel stream are also
// brought out as ports for observation.
module sh_tilt_sensor_top
  import sh_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           photo [NUM_PIXELS],
  input  logic [15:0]          baud_div,
  input  logic                 rxd,
  output logic                 txd,
  input  logic                 ext_en,
  input  logic                 ext_reset,
  input  logic [POS_W-1:0]     ext_row,
  input  logic [POS_W-1:0]     ext_col,
  output logic [LIGHT_W-1:0]   light,
  output logic                 light_valid,
  output logic [PIX_IDX_W-1:0] light_idx,
  output logic                 light_sat,
  output logic                 frame_end,
  output logic [CENT_W-1:0]    cent_x,
  output logic [CENT_W-1:0]    cent_y,
  output logic                 cent_valid,
  output logic                 div_zero,
  output logic [LIGHT_W-1:0]   max_level,
  output logic [PIX_IDX_W-1:0] max_idx,
  output logic                 tx_dropped,
  output logic                 rx_frame_err
);

  // analogue front end
  logic                  pix_reset;
  logic [ARRAY_N-1:0]    row_sel, col_sel;
  logic [REF_LEVELS-1:0] vref1_sel, vref2_sel;
  logic [15:0]           vout_mv, vref1_mv, vref2_mv;
  logic                  comp1, comp2;

  aps_array_model u_pixels (
    .clk, .pix_reset, .row_sel, .col_sel, .photo, .vout_mv
  );
  ref_voltage_gen_model u_vref1 (.sel(vref1_sel), .vref_mv(vref1_mv));
  ref_voltage_gen_model u_vref2 (.sel(vref2_sel), .vref_mv(vref2_mv));
  comparator_model u_comp1 (.vpix_mv(vout_mv), .vref_mv(vref1_mv), .above(comp1));
  comparator_model u_comp2 (.vpix_mv(vout_mv), .vref_mv(vref2_mv), .above(comp2));

  // mode registers and serial receiver
  sensor_cfg_t cfg;
  logic [7:0]  rx_data, readback_byte;
  logic        rx_valid, readback_req;

  uart_rx u_rx (
    .clk, .rst_n, .baud_div, .rxd, .data(rx_data), .valid(rx_valid),
    .frame_err(rx_frame_err)
  );
  config_regs u_cfg (
    .clk, .rst_n, .rx_data, .rx_valid, .cfg, .readback_req, .readback_byte
  );

  // converter
  adc_controller u_adc (
    .clk, .rst_n, .mode(cfg.mode), .dclk_sel(cfg.dclk_sel), .comp1, .comp2,
    .pix_reset, .row_sel, .col_sel, .vref1_sel, .vref2_sel,
    .light, .light_valid, .light_idx, .light_sat, .frame_end,
    .ext_en, .ext_reset, .ext_row, .ext_col
  );

  // centroid processor
  logic [MOMENT_W-1:0] dividend_x, dividend_y;
  logic [SUM_W-1:0]    divisor;

  centroid_processor u_cp (
    .clk, .rst_n, .light, .light_valid, .light_idx,
    .cent_x, .cent_y, .cent_valid, .div_zero,
    .dividend_x, .dividend_y, .divisor, .max_level, .max_idx
  );

  // serial transmitter
  logic [7:0] byte_data;
  logic       byte_valid, byte_ready;

  tx_formatter u_fmt (
    .clk, .rst_n, .tx_sel(cfg.tx_sel), .test_pixel(cfg.test_pixel),
    .readback_req, .readback_byte,
    .light, .light_valid, .light_idx,
    .cent_valid, .cent_x, .cent_y, .dividend_x, .dividend_y, .divisor,
    .max_level, .max_idx,
    .byte_data, .byte_valid, .byte_ready, .dropped(tx_dropped)
  );
  uart_tx u_tx (
    .clk, .rst_n, .baud_div, .data(byte_data), .valid(byte_valid),
    .ready(byte_ready), .txd
  );

endmodule
