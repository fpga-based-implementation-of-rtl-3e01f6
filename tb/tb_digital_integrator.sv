// tb_digital_integrator -- checks that the integrator tracks c_a.
//
// The segment address takes a random walk (up, down or stay, with runs in
// one direction); the testbench plays the comparator and the ROM itself:
// en = address changed, down = the step went down, m = reference slope of
// the current address.  In every cycle c_o must equal the reference prefix
// sum m_0 + ... + m_{a-1} of the current address a, including the first
// cycle of a new segment.
module tb_digital_integrator;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0, down = 1'b0;
  logic [5:0]  m;
  logic [10:0] c;
  int          addr = 0, prev = 0, dir = 1;
  int          checks = 0, failures = 0, n_up = 0, n_down = 0;

  digital_integrator dut (.clk, .rst_n, .en_i(en), .down_i(down), .m_i(m), .c_o(c));

  always #5 clk = ~clk;

  assign m = 6'(REF_SLOPE[addr]);

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      prev = addr;
      if ($urandom_range(15) == 0) dir = -dir;
      if ($urandom_range(3) != 0) begin
        addr = addr + dir;
        if (addr > 31) addr = 31;
        if (addr < 0)  addr = 0;
      end
      en   = (addr != prev);
      down = (addr < prev);
      if (en && !down) n_up++;
      if (en && down)  n_down++;
      #1;
      checks++;
      if (int'(c) != ref_prefix(addr)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: addr %0d->%0d c=%0d expected %0d", i, prev, addr,
                                    c, ref_prefix(addr));
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin failures++; $display("missing direction"); end
    $display("up steps %0d, down steps %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
