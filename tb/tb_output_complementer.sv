// tb_output_complementer -- exhaustive check of the sign stage.
//
// For every 14-bit magnitude and both values of MSB1 the 15-bit signed
// sample must be +mag or -mag.
module tb_output_complementer;

  logic               msb1;
  logic [13:0]        mag;
  logic signed [14:0] sample;
  int                 checks = 0, failures = 0;

  output_complementer dut (.msb1_i(msb1), .mag_i(mag), .sample_o(sample));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 16384; v++) begin
        msb1 = 1'(s);
        mag  = 14'(v);
        #1;
        checks++;
        if (int'(sample) != (s == 1 ? -v : v)) begin
          failures++;
          if (failures < 10) $display("msb1=%0d mag=%0d: sample=%0d", s, v, sample);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
