// tb_multiply_add -- exhaustive slope x offset check of the multiply-add.
//
// Every slope code (64) and every offset (256) is combined with several
// segment start values (0, the top-of-quadrant sum 1287, the largest 11-bit
// value 2047, whose sums wrap, and random ones); the magnitude must equal
// floor((256 c + m x + 16) / 32) mod 2^14, computed here with integers.
module tb_multiply_add;

  logic [5:0]  m;
  logic [7:0]  x;
  logic [10:0] c;
  logic [13:0] mag;
  int          checks = 0, failures = 0;

  multiply_add dut (.m_i(m), .x_i(x), .c_i(c), .mag_o(mag));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++) begin
      int cv;
      cv = (k == 0) ? 0 : (k == 1) ? 1287 : (k == 2) ? 2047 : $urandom_range(2047);
      for (int mi = 0; mi < 64; mi++) begin
        for (int xi = 0; xi < 256; xi++) begin
          int expv;
          m = 6'(mi);
          x = 8'(xi);
          c = 11'(cv);
          #1;
          expv = ((256 * cv + mi * xi + 16) / 32) % 16384;
          checks++;
          if (int'(mag) != expv) begin
            failures++;
            if (failures < 10) $display("c=%0d m=%0d x=%0d: mag=%0d expected %0d", cv, mi, xi, mag, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
