// tb_ref_voltage_gen_model: checks every tap of the reference generator model
// (1.00 V + 0.25 V per tap) and the no-tap case.
module tb_ref_voltage_gen_model;
  logic [11:0] sel;
  logic [15:0] vref_mv;
  int checks = 0, failures = 0;

  ref_voltage_gen_model dut (.sel, .vref_mv);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int expect_mv [12] = '{1000, 1250, 1500, 1750, 2000, 2250, 2500, 2750,
                           3000, 3250, 3500, 3750};
    for (int k = 0; k < 12; k++) begin
      sel = 12'(1) << k;
      #1;
      checks++;
      if (vref_mv != 16'(expect_mv[k])) begin
        failures++;
        $display("tap %0d: %0d mV", k, vref_mv);
      end
    end
    sel = '0;
    #1;
    checks++;
    if (vref_mv != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
