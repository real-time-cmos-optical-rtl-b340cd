// comparator_model: behavioural model of one of the two voltage comparators
// between the pixel output and a reference voltage. It is not synthesizable
// logic: in silicon it is an analogue comparator with its own bias.
//
// above is high while the pixel voltage is above the reference, so it falls
// when the discharging pixel crosses the reference. The model is ideal:
// no offset, no hysteresis, no delay. Inputs are integers in millivolts.
module comparator_model (
  input  logic [15:0] vpix_mv,
  input  logic [15:0] vref_mv,
  output logic        above
);

  assign above = vpix_mv > vref_mv;

endmodule
