// tb_segment_comparator -- checks the segment-transition detector.
//
// The address takes a random walk of steps -1, 0 and +1.  After every change
// en_o must equal (address != address of the previous clock), which checks
// the one-clock delay element as well as the comparison.
module tb_segment_comparator;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [4:0] addr = '0;
  logic       en;
  logic [4:0] prev_addr = '0;
  int         checks = 0, failures = 0, n_en = 0;

  segment_comparator dut (.clk, .rst_n, .addr_i(addr), .en_o(en));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      prev_addr = addr;
      #1;
      case ($urandom_range(2))
        0: if (addr != 5'd31) addr = addr + 5'd1;
        1: if (addr != 5'd0)  addr = addr - 5'd1;
        default: ;
      endcase
      #1;
      checks++;
      if (en != (addr != prev_addr)) begin
        failures++;
        $display("cycle %0d: en=%b addr %0d->%0d", i, en, prev_addr, addr);
      end
      if (en) n_en++;
    end
    checks++;
    if (n_en == 0) begin failures++; $display("no transition seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
