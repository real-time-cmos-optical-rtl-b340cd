// uart_rx: RS-232 receiver through which the mode registers are written.
//
// Receives 8N1 frames (start bit, eight data bits LSB first, stop bit) at a bit
// time of baud_div clocks, the same divisor as the transmitter. rxd passes
// through a two-flop synchroniser; a falling edge starts a frame, each bit is
// sampled in its middle, and a start bit that is not still low at its middle is
// taken as a glitch and ignored. The source design gives only that the chip has
// an on-chip RS-232 receiver; the rest is this design's choice.
//
// Interface: valid pulses for one clock with data when a frame ends with a good
// stop bit; frame_err pulses instead when the stop bit is low.
module uart_rx #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] baud_div,
  input  logic             rxd,
  output logic [7:0]       data,
  output logic             valid,
  output logic             frame_err
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e        state;
  logic [1:0]       sync;
  logic [DIV_W-1:0] cnt;
  logic [2:0]       bitn;
  logic             rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= RX_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE:
          if (!rx) begin
            state <= RX_START;
            cnt   <= '0;
          end
        RX_START:
          if (cnt == (baud_div >> 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rx ? RX_IDLE : RX_DATA;
          end else cnt <= cnt + 1'b1;
        RX_DATA:
          if (cnt == baud_div - 1'b1) begin
            cnt  <= '0;
            data <= {rx, data[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= RX_STOP;
          end else cnt <= cnt + 1'b1;
        RX_STOP:
          if (cnt == baud_div - 1'b1) begin
            cnt       <= '0;
            state     <= RX_IDLE;
            valid     <= rx;
            frame_err <= !rx;
          end else cnt <= cnt + 1'b1;
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
