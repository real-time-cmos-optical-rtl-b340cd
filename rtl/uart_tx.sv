// uart_tx: RS-232 transmitter of the sensor's results.
//
// Sends each byte as one start bit (0), eight data bits least significant
// first and one stop bit (1): the usual 8N1 frame. The bit time is baud_div
// clocks, so the baud rate is adjustable at run time; at the 32 MHz system
// clock, 115200 baud (the highest rate of the source design) is baud_div = 278.
// The frame format and the divisor are this design's choice; the source design
// gives only "RS-232 format" and the rate.
//
// Interface: valid/ready handshake. A byte is taken on a clock with valid and
// ready both high; ready is low while a frame is on the line. txd idles high.
module uart_tx #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] baud_div,
  input  logic [7:0]       data,
  input  logic             valid,
  output logic             ready,
  output logic             txd
);

  logic [9:0]       shreg;    // stop, data[7:0], start; LSB goes out first
  logic [3:0]       nbits;    // bits still to send
  logic [DIV_W-1:0] bitcnt;

  assign ready = (nbits == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '1;
      nbits  <= '0;
      bitcnt <= '0;
      txd    <= 1'b1;
    end else if (ready) begin
      if (valid) begin
        shreg  <= {1'b1, data, 1'b0};
        nbits  <= 4'd10;
        bitcnt <= '0;
        txd    <= 1'b0;
      end
    end else if (bitcnt == baud_div - 1'b1) begin
      bitcnt <= '0;
      shreg  <= {1'b1, shreg[9:1]};
      nbits  <= nbits - 1'b1;
      txd    <= (nbits == 4'd1) ? 1'b1 : shreg[1];
    end else begin
      bitcnt <= bitcnt + 1'b1;
    end
  end

endmodule
