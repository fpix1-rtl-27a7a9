// tb_fpix1_adc_enc: exhaustive test of the flash-ADC encoder: each of the
// eight 3-bit codes is compared with the position of its highest set bit.
module tb_fpix1_adc_enc;
  logic [2:0] therm;
  logic [1:0] adc;
  int checks = 0, failures = 0;
  int exp_v;

  fpix1_adc_enc dut (.therm(therm), .adc(adc));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      therm = 3'(t);
      exp_v = 0;
      for (int b = 0; b < 3; b++) if ((t & (1 << b)) != 0) exp_v = b + 1;
      #1;
      checks++;
      if (int'(adc) != exp_v) begin
        failures++;
        $display("therm=%b adc=%0d expected %0d", therm, adc, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
