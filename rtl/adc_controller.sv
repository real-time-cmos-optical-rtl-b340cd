// adc_controller: the digital part of the single-slope, time-to-threshold
// converter that digitises the 5 x 5 pixel array one pixel at a time.
//
// How it works. A pixel period starts with a global pixel reset held for
// RESET_CYCLES clocks (256 = 8 us at 32 MHz, as in the source design). During
// the reset the references are calibrated against the reset level of the
// selected pixel: Vref1 starts at tap 11 (3.75 V) and Vref2 at tap 10
// (3.50 V); every SETTLE_CYCLES clocks both step down one tap together until
// both comparators report the pixel above its reference. When the reset is
// released the pixel discharges, and an 8-bit counter clocked by the
// programmable discharge clock (discharge_clk_gen, clk / 2**dclk_sel) times it:
//   mode 0  from the reset release to the Vref1 crossing;
//   mode 1  from the Vref1 crossing to the Vref2 crossing, which removes any
//           pixel-to-pixel spread of the reset level;
//   mode 2  two cycles per pixel: a mode-1 reading, then, if that reading was
//           short (below BRIGHT_LIMIT) and the references allow it, a second
//           reset and reading with Vref2 lowered to MODE3_STEPS taps below
//           Vref1, which gives a bright pixel MODE3_STEPS times the counts.
// The discharge time T is expressed in system clocks of a MODE3_STEPS-tap
// swing in mode 2, in system clocks of the one-tap swing otherwise; the
// digitised light level is 2047 - T, so brighter pixels give larger values,
// and a pixel whose counter overflows (too dark) reads 0.
// After the 25 pixels, in row-major order, a 26th period holds the pixels in
// reset with no reading; frame_end pulses as it begins. That is when the
// centroid processor divides.
//
// Interface. comp1/comp2 are the comparator outputs, high while the selected
// pixel is above Vref1/Vref2. vref1_sel/vref2_sel are one-hot tap selects for
// the two reference generators; row_sel/col_sel are one-hot row and column
// selects. light_valid pulses for one clock with light, light_idx (5*row+col)
// and light_sat (counter overflow). With ext_en high the pixel reset and the
// row/column address come from the ext_* pins and the sequencer waits at the
// start of pixel 0.
//
// From the source design: the 5 x 5 array, global reset for 8 us, the 8-bit
// counter, four discharge clock rates, the twelve 0.25 V taps from 1 V to
// 3.75 V, the 3.75 V / 3.5 V calibration start, the three modes, 26 pixel
// periods per frame and external control of reset and addressing. This
// design's own: the calibration step timing, the inversion of time into
// light level, the scaling to 11 bits, the mode-2 threshold and swing, and the
// handling of a pixel that never crosses.
module adc_controller
  import sh_pkg::*;
#(
  parameter int unsigned RESET_CYCLES  = 256,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned BRIGHT_LIMIT  = 64,
  parameter int unsigned MODE3_STEPS   = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // mode registers
  input  conv_mode_e            mode,
  input  logic [1:0]            dclk_sel,
  // comparators
  input  logic                  comp1,
  input  logic                  comp2,
  // analogue front-end controls
  output logic                  pix_reset,
  output logic [ARRAY_N-1:0]    row_sel,
  output logic [ARRAY_N-1:0]    col_sel,
  output logic [REF_LEVELS-1:0] vref1_sel,
  output logic [REF_LEVELS-1:0] vref2_sel,
  // digitised light
  output logic [LIGHT_W-1:0]    light,
  output logic                  light_valid,
  output logic [PIX_IDX_W-1:0]  light_idx,
  output logic                  light_sat,
  output logic                  frame_end,
  // external control of reset and addressing
  input  logic                  ext_en,
  input  logic                  ext_reset,
  input  logic [POS_W-1:0]      ext_row,
  input  logic [POS_W-1:0]      ext_col
);

  localparam int unsigned CYC_W   = $clog2(RESET_CYCLES + 1);
  localparam int unsigned SET_W   = $clog2(SETTLE_CYCLES + 1);
  localparam int unsigned T_W     = COUNT_W + 3 + $clog2(MODE3_STEPS + 1);
  localparam logic [COUNT_W-1:0] T_MAX = '1;
  localparam logic [LIGHT_W-1:0] L_MAX = '1;

  typedef enum logic [2:0] {
    ST_RESET,    // pixel reset and reference calibration
    ST_WAIT1,    // waiting for the Vref1 crossing (modes 1 and 2)
    ST_COUNT,    // counting discharge clock ticks
    ST_DONE,     // reading complete
    ST_IDLE26    // 26th period of the frame
  } state_e;

  state_e                 state;
  logic [CYC_W-1:0]       cyc;
  logic [SET_W-1:0]       settle;
  logic                   cal_active;
  logic [REF_IDX_W-1:0]   idx1, idx2;
  logic [COUNT_W-1:0]     tcount, guard;
  logic                   sat;
  logic                   second;        // second cycle of mode 2
  logic [POS_W-1:0]       row, col;
  logic                   dclk_clear, tick;
  logic                   start_cross, stop_cross;

  discharge_clk_gen u_dclk (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (dclk_clear),
    .sel   (dclk_sel),
    .tick  (tick)
  );

  // The prescaler restarts at the start of every timed interval.
  assign dclk_clear  = (state == ST_RESET) || (state == ST_WAIT1 && !comp1);
  assign stop_cross  = (mode == MODE_RESET_TO_REF1) ? !comp1 : !comp2;
  assign start_cross = !comp1;

  // Discharge time and light level of the finished count.
  logic [T_W-1:0] t_scaled;
  logic           use_second;
  always_comb begin
    t_scaled = T_W'(tcount) << dclk_sel;
    if (mode == MODE_TWO_CYCLE && !second)
      t_scaled = t_scaled * T_W'(MODE3_STEPS);
  end
  assign use_second = (mode == MODE_TWO_CYCLE) && !second && !sat &&
                      (tcount < COUNT_W'(BRIGHT_LIMIT)) &&
                      (idx1 >= REF_IDX_W'(MODE3_STEPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_RESET;
      cyc         <= '0;
      settle      <= '0;
      cal_active  <= 1'b1;
      idx1        <= REF_IDX_W'(REF_LEVELS - 1);
      idx2        <= REF_IDX_W'(REF_LEVELS - 2);
      tcount      <= '0;
      guard       <= '0;
      sat         <= 1'b0;
      second      <= 1'b0;
      row         <= '0;
      col         <= '0;
      light       <= '0;
      light_valid <= 1'b0;
      light_idx   <= '0;
      light_sat   <= 1'b0;
      frame_end   <= 1'b0;
    end else if (ext_en) begin
      state       <= ST_RESET;
      cyc         <= '0;
      settle      <= '0;
      cal_active  <= 1'b1;
      idx1        <= REF_IDX_W'(REF_LEVELS - 1);
      idx2        <= REF_IDX_W'(REF_LEVELS - 2);
      second      <= 1'b0;
      row         <= '0;
      col         <= '0;
      light_valid <= 1'b0;
      frame_end   <= 1'b0;
    end else begin
      light_valid <= 1'b0;
      frame_end   <= 1'b0;
      unique case (state)
        ST_RESET: begin
          cyc <= cyc + 1'b1;
          // calibration: step both references down until both are below
          // the reset level (skipped in the second cycle of mode 2)
          if (cal_active) begin
            if (settle == SET_W'(SETTLE_CYCLES - 1)) begin
              settle <= '0;
              if (!(comp1 && comp2) && idx2 != '0) begin
                idx1 <= idx1 - 1'b1;
                idx2 <= idx2 - 1'b1;
              end else begin
                cal_active <= 1'b0;
              end
            end else begin
              settle <= settle + 1'b1;
            end
          end
          if (cyc == CYC_W'(RESET_CYCLES - 1)) begin
            cyc        <= '0;
            settle     <= '0;
            cal_active <= 1'b0;
            tcount     <= '0;
            guard      <= '0;
            sat        <= 1'b0;
            state      <= (mode == MODE_RESET_TO_REF1) ? ST_COUNT : ST_WAIT1;
          end
        end
        ST_WAIT1: begin
          if (start_cross) begin
            state <= ST_COUNT;
          end else if (tick) begin
            if (guard == T_MAX) begin
              sat    <= 1'b1;
              tcount <= T_MAX;
              state  <= ST_DONE;
            end else begin
              guard <= guard + 1'b1;
            end
          end
        end
        ST_COUNT: begin
          if (stop_cross) begin
            state <= ST_DONE;
          end else if (tick) begin
            if (tcount == T_MAX) begin
              sat   <= 1'b1;
              state <= ST_DONE;
            end else begin
              tcount <= tcount + 1'b1;
            end
          end
        end
        ST_DONE: begin
          if (use_second) begin
            // second cycle of mode 2: same pixel, Vref2 lowered
            second <= 1'b1;
            idx2   <= idx1 - REF_IDX_W'(MODE3_STEPS);
            state  <= ST_RESET;
          end else begin
            light_valid <= 1'b1;
            light_idx   <= PIX_IDX_W'(row * ARRAY_N + col);
            light_sat   <= sat;
            if (sat || t_scaled >= T_W'(L_MAX)) light <= '0;
            else                                light <= L_MAX - LIGHT_W'(t_scaled);
            second     <= 1'b0;
            cal_active <= 1'b1;
            idx1       <= REF_IDX_W'(REF_LEVELS - 1);
            idx2       <= REF_IDX_W'(REF_LEVELS - 2);
            if (col == POS_W'(ARRAY_N - 1)) begin
              col <= '0;
              if (row == POS_W'(ARRAY_N - 1)) begin
                row   <= '0;
                state <= ST_IDLE26;
                frame_end <= 1'b1;
              end else begin
                row   <= row + 1'b1;
                state <= ST_RESET;
              end
            end else begin
              col   <= col + 1'b1;
              state <= ST_RESET;
            end
          end
        end
        ST_IDLE26: begin
          cyc <= cyc + 1'b1;
          if (cyc == CYC_W'(RESET_CYCLES - 1)) begin
            cyc   <= '0;
            state <= ST_RESET;
          end
        end
        default: state <= ST_RESET;
      endcase
    end
  end

  // Outputs to the analogue front end.
  always_comb begin
    row_sel   = '0;
    col_sel   = '0;
    vref1_sel = '0;
    vref2_sel = '0;
    vref1_sel[idx1] = 1'b1;
    vref2_sel[idx2] = 1'b1;
    if (ext_en) begin
      pix_reset = ext_reset;
      if (ext_row < POS_W'(ARRAY_N)) row_sel[ext_row] = 1'b1;
      if (ext_col < POS_W'(ARRAY_N)) col_sel[ext_col] = 1'b1;
    end else begin
      pix_reset = (state == ST_RESET) || (state == ST_IDLE26);
      row_sel[row] = 1'b1;
      col_sel[col] = 1'b1;
    end
  end

endmodule
