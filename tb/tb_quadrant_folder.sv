// tb_quadrant_folder -- exhaustive check of the quadrant folding.
//
// All 2^15 phases are applied; the expected address and offset come from the
// reference fold (13 low bits inverted in quadrants 1 and 3), and MSB1/MSB2
// must be the two phase MSBs.
module tb_quadrant_folder;
  import tb_ref_pkg::*;

  logic [14:0] phase;
  logic        msb1, msb2;
  logic [4:0]  addr;
  logic [7:0]  x;
  int          checks = 0, failures = 0;

  quadrant_folder dut (.phase_i(phase), .msb1_o(msb1), .msb2_o(msb2), .addr_o(addr), .x_o(x));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 32768; p++) begin
      int u;
      phase = 15'(p);
      #1;
      u = ref_fold(p);
      checks++;
      if (addr != 5'(u / 256) || x != 8'(u % 256) || msb1 != (p >= 16384) ||
          msb2 != ((p / 8192) % 2 == 1)) begin
        failures++;
        if (failures < 10)
          $display("phase %0d: addr=%0d x=%0d msb=%b%b expected u=%0d", p, addr, x, msb1, msb2, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
