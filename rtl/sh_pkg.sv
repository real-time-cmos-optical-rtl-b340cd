// sh_pkg: constants and types shared by the Shack-Hartmann tilt sensor.
//
// The tilt sensor is a 5 x 5 pixel array whose pixels are digitised one at a
// time by timing their discharge, then reduced to an x and a y centroid.
// The array size, the 8-bit discharge counter, the 11-bit digitised light bus,
// the 7-bit centroids, the twelve reference levels (1.00 V to 3.75 V in
// 0.25 V steps), the four discharge clock rates and the three conversion
// modes follow the source design. The encodings of the modes and of the
// transmit selection are this design's own.
package sh_pkg;

  localparam int unsigned ARRAY_N     = 5;                  // pixels per side
  localparam int unsigned NUM_PIXELS  = ARRAY_N * ARRAY_N;  // 25
  localparam int unsigned PIX_IDX_W   = 5;                  // pixel index width
  localparam int unsigned POS_W       = 3;                  // row / column width
  localparam int unsigned COUNT_W     = 8;                  // discharge counter
  localparam int unsigned LIGHT_W     = 11;                 // digitised light bus
  localparam int unsigned CENT_W      = 7;                  // centroid outputs
  localparam int unsigned CENT_FRAC   = 4;                  // fraction bits of a centroid
  localparam int unsigned REF_LEVELS  = 12;                 // reference taps
  localparam int unsigned REF_IDX_W   = 4;
  localparam int unsigned REF_MIN_MV  = 1000;               // tap 0
  localparam int unsigned REF_STEP_MV = 250;                // tap spacing
  localparam int unsigned SUM_W       = 16;                 // sum of 25 light levels
  localparam int unsigned MOMENT_W    = 18;                 // sum of weight * light

  // Conversion modes (register encoding chosen here).
  typedef enum logic [1:0] {
    MODE_RESET_TO_REF1 = 2'd0,  // count from reset release to the Vref1 crossing
    MODE_REF1_TO_REF2  = 2'd1,  // count from the Vref1 crossing to the Vref2 crossing
    MODE_TWO_CYCLE     = 2'd2   // mode 2, then a second cycle with a lowered Vref2
  } conv_mode_e;

  // What the serial link sends once per frame.
  typedef enum logic [1:0] {
    TX_CENTROID = 2'd0,         // x and y centroids
    TX_MAXIMUM  = 2'd1,         // maximum light level and its position
    TX_DIVIDE   = 2'd2,         // x-dividend, y-dividend and divisor
    TX_PIXEL    = 2'd3          // light level of one chosen pixel
  } tx_sel_e;

  // Mode registers, written over the serial receiver.
  typedef struct packed {
    logic [1:0]           dclk_sel;   // discharge clock = clk / 2**dclk_sel
    conv_mode_e           mode;
    tx_sel_e              tx_sel;
    logic [PIX_IDX_W-1:0] test_pixel; // pixel sent in TX_PIXEL
  } sensor_cfg_t;

  localparam sensor_cfg_t CFG_RESET = '{dclk_sel: 2'd0, mode: MODE_REF1_TO_REF2,
                                        tx_sel: TX_CENTROID, test_pixel: '0};

endpackage
