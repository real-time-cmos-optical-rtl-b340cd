// discharge_clk_gen: the programmable discharge clock.
//
// The discharge counter of the converter advances on this clock. Dim pixels
// discharge slowly, so a slower discharge clock keeps their discharge time
// inside the 8-bit counter; bright pixels use a fast one for resolution. The
// source design offers four rates chosen by two mode-register bits; this
// design makes them clk/1, clk/2, clk/4 and clk/8 (sel = 0..3).
//
// The clock is produced as a one-cycle enable, tick, in the clk domain: tick is
// high on one clk cycle in every 2**sel. clear restarts the prescaler so that
// the first tick comes 2**sel cycles after clear is released (the next cycle
// when sel = 0).
module discharge_clk_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [1:0] sel,
  output logic       tick
);

  logic [2:0] presc;
  logic [2:0] mask;

  always_comb begin
    unique case (sel)
      2'd0: mask = 3'b000;
      2'd1: mask = 3'b001;
      2'd2: mask = 3'b011;
      default: mask = 3'b111;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      presc <= '0;
    else if (clear)  presc <= '0;
    else             presc <= (presc + 3'd1) & mask;
  end

  assign tick = !clear && ((presc & mask) == mask);

endmodule
