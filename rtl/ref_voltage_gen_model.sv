// ref_voltage_gen_model: behavioural model of one reference voltage generator.
// It is not synthesizable logic: in silicon it is a chain of active resistors
// dividing the supply, with a transmission gate on each tap.
//
// The twelve taps run from 1.00 V (tap 0) to 3.75 V (tap 11) in 0.25 V steps,
// as in the source design; the one-hot select closes the gate of one tap.
// With no tap selected the output floats; the model then reads 0 V. If more
// than one bit is set (which the controller never does) the highest tap wins.
// The output is an integer in millivolts and follows the select at once.
module ref_voltage_gen_model
  import sh_pkg::*;
(
  input  logic [REF_LEVELS-1:0] sel,
  output logic [15:0]           vref_mv
);

  always_comb begin
    vref_mv = '0;
    for (int k = 0; k < REF_LEVELS; k++)
      if (sel[k]) vref_mv = 16'(REF_MIN_MV + k * REF_STEP_MV);
  end

endmodule
