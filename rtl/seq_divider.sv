// seq_divider: the divider of the centroid processor, dividing a first moment
// by the sum of the light levels.
//
// It is a restoring divider that produces one quotient bit per clock, most
// significant first: the partial remainder is shifted left by one dividend bit
// and the divisor subtracted when it fits. The source design divides only once
// per frame, so a serial divider, small and slow, is enough; the algorithm is
// this design's choice.
//
// Timing: start (one clock, while not busy) loads dividend and divisor; busy
// stays high for N_W clocks and done pulses on the clock after the last one,
// with the quotient saturated to Q_W bits. A zero divisor (a dark frame) gives
// quotient 0 and raises div_zero.
module seq_divider #(
  parameter int unsigned N_W = 22,
  parameter int unsigned D_W = 16,
  parameter int unsigned Q_W = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] dividend,
  input  logic [D_W-1:0] divisor,
  output logic           busy,
  output logic           done,
  output logic [Q_W-1:0] quotient,
  output logic           div_zero
);

  localparam int unsigned CNT_W = $clog2(N_W + 1);

  logic [D_W-1:0]   rem;
  logic [N_W-1:0]   quo;
  logic [D_W-1:0]   dvs;
  logic [CNT_W-1:0] cnt;
  logic [D_W:0]     rem_sh;
  logic             fits;
  logic [D_W:0]     rem_nx;

  assign rem_sh = {rem, quo[N_W-1]};
  assign rem_nx = fits ? rem_sh - {1'b0, dvs} : rem_sh;
  assign fits   = rem_sh >= {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem      <= '0;
      quo      <= '0;
      dvs      <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
      div_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          quo  <= dividend;
          dvs  <= divisor;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        rem <= rem_nx[D_W-1:0];  // below the divisor, so fits D_W bits
        quo <= {quo[N_W-2:0], fits};
        cnt <= cnt + 1'b1;
        if (cnt == CNT_W'(N_W - 1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          div_zero <= (dvs == '0);
          if (dvs == '0)
            quotient <= '0;
          else if ({quo[N_W-2:0], fits} > N_W'({Q_W{1'b1}}))
            quotient <= '1;
          else
            quotient <= Q_W'({quo[N_W-2:0], fits});
        end
      end
    end
  end

endmodule
