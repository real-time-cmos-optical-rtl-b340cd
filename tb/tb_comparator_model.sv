// tb_comparator_model: checks the comparator model on random voltage pairs and
// on equal inputs (pixel not above the reference).
module tb_comparator_model;
  logic [15:0] vpix_mv, vref_mv;
  logic above;
  int checks = 0, failures = 0;

  comparator_model dut (.vpix_mv, .vref_mv, .above);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      vpix_mv = 16'($urandom_range(0, 5000));
      vref_mv = (i % 4 == 0) ? vpix_mv : 16'($urandom_range(1000, 3750));
      #1;
      checks++;
      if (above !== (int'(vpix_mv) > int'(vref_mv))) begin
        failures++;
        $display("%0d vs %0d -> %0b", vpix_mv, vref_mv, above);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
