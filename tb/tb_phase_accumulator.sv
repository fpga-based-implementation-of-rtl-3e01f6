// tb_phase_accumulator -- checks the M-bit phase accumulator.
//
// Random FIW values (changed now and then) are applied; a 24-bit model of the
// phase is advanced on every clock and its 15 MSBs are compared with phase_o
// after each edge, so the one-cycle update latency and the modulo-2^M wrap
// are both checked.  Also checks that reset clears the phase.
module tb_phase_accumulator;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [23:0] fiw = '0;
  logic [14:0] phase;
  int          checks = 0, failures = 0;
  logic [23:0] model = '0;
  int          wraps = 0;

  phase_accumulator dut (.clk, .rst_n, .fiw, .phase_o(phase));

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
    #1;
    checks++;
    if (phase !== 15'd0) begin failures++; $display("reset: phase=%0d", phase); end
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      if (i % 500 == 0) fiw = 24'($urandom());
      @(posedge clk);
      if (model + fiw < model) wraps++;
      model = model + fiw;
      #1;
      checks++;
      if (phase !== model[23:9]) begin
        failures++;
        $display("cycle %0d: phase=%h expected %h", i, phase, model[23:9]);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
