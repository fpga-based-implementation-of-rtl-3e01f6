// tb_slope_rom -- checks every word of the slope ROM.
//
// The 32 words are compared with the hand-rounded 6-bit slope codes of the
// reference package; their sum must also fit the 11-bit integrator.
module tb_slope_rom;
  import tb_ref_pkg::*;

  logic [4:0] addr;
  logic [5:0] m;
  int         checks = 0, failures = 0;
  int         total = 0;

  slope_rom dut (.addr_i(addr), .m_o(m));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a);
      #1;
      checks++;
      total += int'(m);
      if (int'(m) != REF_SLOPE[a]) begin
        failures++;
        $display("addr %0d: m=%0d expected %0d", a, m, REF_SLOPE[a]);
      end
    end
    checks++;
    if (total >= 2048) begin failures++; $display("slope sum %0d exceeds 11 bits", total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
