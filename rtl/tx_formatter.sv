// tx_formatter: chooses what the serial link sends once per frame and cuts it
// into bytes for the transmitter.
//
// Normally the x and y centroids are sent; for testing, the source design can
// instead send the maximum light level and its position, the x-dividend,
// y-dividend and divisor, or the light level of one pixel, and the mode
// register states can be read back. The byte layouts are this design's own:
//   TX_CENTROID  {0, cent_x}, {1, cent_y}          (bit 7 tells x from y)
//   TX_MAXIMUM   {max_idx, max_level[10:8]}, max_level[7:0]
//   TX_DIVIDE    dividend_x as 3 bytes, dividend_y as 3 bytes, divisor as
//                2 bytes, each most significant byte first
//   TX_PIXEL     {test_pixel, level[10:8]}, level[7:0]
//   read back    readback_byte alone
//
// Timing: the values are captured on cent_valid and sent over the following
// clocks through a valid/ready byte stream. At 115200 baud a byte takes about
// 87 us, longer than a frame, so a result that arrives while the previous
// packet is still going out is dropped (dropped pulses) rather than queued. A
// read-back request is remembered and sent once the link is free. The level of
// the test pixel is captured from the pixel stream as it passes.
module tx_formatter
  import sh_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  tx_sel_e              tx_sel,
  input  logic [PIX_IDX_W-1:0] test_pixel,
  input  logic                 readback_req,
  input  logic [7:0]           readback_byte,
  // pixel stream
  input  logic [LIGHT_W-1:0]   light,
  input  logic                 light_valid,
  input  logic [PIX_IDX_W-1:0] light_idx,
  // frame results
  input  logic                 cent_valid,
  input  logic [CENT_W-1:0]    cent_x,
  input  logic [CENT_W-1:0]    cent_y,
  input  logic [MOMENT_W-1:0]  dividend_x,
  input  logic [MOMENT_W-1:0]  dividend_y,
  input  logic [SUM_W-1:0]     divisor,
  input  logic [LIGHT_W-1:0]   max_level,
  input  logic [PIX_IDX_W-1:0] max_idx,
  // byte stream to the transmitter
  output logic [7:0]           byte_data,
  output logic                 byte_valid,
  input  logic                 byte_ready,
  output logic                 dropped
);

  localparam int unsigned MAX_BYTES = 8;

  logic [7:0]           pkt [MAX_BYTES];
  logic [3:0]           len, pos;
  logic                 rb_pending;
  logic [LIGHT_W-1:0]   pix_level;
  logic                 busy;
  logic [23:0]          dx, dy;

  assign busy       = (pos != len);
  assign byte_valid = busy;
  assign byte_data  = pkt[pos[2:0]];
  assign dx         = 24'(dividend_x);
  assign dy         = 24'(dividend_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_BYTES; i++) pkt[i] <= '0;
      len        <= '0;
      pos        <= '0;
      rb_pending <= 1'b0;
      pix_level  <= '0;
      dropped    <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (light_valid && light_idx == test_pixel) pix_level <= light;
      if (readback_req) rb_pending <= 1'b1;

      if (busy) begin
        if (byte_ready) pos <= pos + 1'b1;
        if (cent_valid) dropped <= 1'b1;
      end else if (cent_valid) begin
        pos <= '0;
        unique case (tx_sel)
          TX_CENTROID: begin
            pkt[0] <= {1'b0, cent_x};
            pkt[1] <= {1'b1, cent_y};
            len    <= 4'd2;
          end
          TX_MAXIMUM: begin
            pkt[0] <= {max_idx, max_level[10:8]};
            pkt[1] <= max_level[7:0];
            len    <= 4'd2;
          end
          TX_DIVIDE: begin
            pkt[0] <= dx[23:16];
            pkt[1] <= dx[15:8];
            pkt[2] <= dx[7:0];
            pkt[3] <= dy[23:16];
            pkt[4] <= dy[15:8];
            pkt[5] <= dy[7:0];
            pkt[6] <= divisor[15:8];
            pkt[7] <= divisor[7:0];
            len    <= 4'd8;
          end
          default: begin
            pkt[0] <= {test_pixel, pix_level[10:8]};
            pkt[1] <= pix_level[7:0];
            len    <= 4'd2;
          end
        endcase
      end else if (rb_pending || readback_req) begin
        rb_pending <= 1'b0;
        pkt[0]     <= readback_byte;
        pos        <= '0;
        len        <= 4'd1;
      end
    end
  end

endmodule
