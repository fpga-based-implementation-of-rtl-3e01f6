// tb_ddfs_top -- end-to-end test of the DDFS at its default sizes.
//
// A 24-bit phase model runs beside the design.  After every clock edge the
// 15-bit sample must equal the reference sample of the model phase (integer
// slope interpolation from tb_ref_pkg), lie within TOL LSBs of the ideal
// 63/64 * 32768/pi * sin(theta) (the rounding of the 6-bit slopes adds up
// along the quadrant to about 33 LSB at most), and seg_en_o must flag exactly the cycles in which
// the folded segment address changed.
//
// Runs, all at default parameters:
//   1. FIW = 2^17, the largest step the integrator can follow (one segment
//      per clock): two full periods of 128 clocks; the second period must
//      repeat the first sample for sample (output frequency fclk/128).
//   2. FIW = 4065: one full period of ceil(2^24 / 4065) = 4128 clocks.
//   3. random FIW in [1, 2^17], changed every 2000 clocks, 40000 clocks.
//   4. a reset in mid-wave, after which the phase and the integrator must
//      restart from zero.
// Counted mechanisms, each of which must occur: rising and falling segment
// transitions (integrator add and subtract), entries into each of the four
// quadrants (fold on/off, sign on/off), negative samples, FIW changes and
// the mid-wave reset.
module tb_ddfs_top;
  import tb_ref_pkg::*;

  localparam real TOL = 36.0;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic [23:0]        fiw = '0;
  logic signed [14:0] sample;
  logic               seg_en;

  logic [23:0] model = '0;
  int          checks = 0, failures = 0;
  int          n_up = 0, n_down = 0, n_neg = 0, n_fiw = 0, n_reset = 0;
  int          n_quad [4] = '{0, 0, 0, 0};
  int          prev_u = 0, prev_q = 0;
  real         worst_err = 0.0;
  int          period [128];

  ddfs_top dut (.clk, .rst_n, .fiw_i(fiw), .sample_o(sample), .seg_en_o(seg_en));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check the current cycle against the model.
  task automatic check_cycle();
    int  p15 = int'(model[23:9]);
    int  u   = ref_fold(p15);
    int  q   = p15 / 8192;
    real err = real'(sample) - ideal_sample(p15);
    if (err < 0.0) err = -err;
    if (err > worst_err) worst_err = err;
    checks++;
    if (int'(sample) != ref_sample(p15)) begin
      failures++;
      if (failures < 10) $display("phase %0d: sample=%0d expected %0d", p15, sample, ref_sample(p15));
    end
    checks++;
    if (err > TOL) begin
      failures++;
      if (failures < 10) $display("phase %0d: sample=%0d off the sine by %f", p15, sample, err);
    end
    checks++;
    if (seg_en != (u / 256 != prev_u / 256)) begin
      failures++;
      if (failures < 10) $display("phase %0d: seg_en=%b", p15, seg_en);
    end
    if (u / 256 > prev_u / 256) n_up++;
    if (u / 256 < prev_u / 256) n_down++;
    if (q != prev_q) n_quad[q]++;
    if (sample < 0) n_neg++;
    prev_u = u;
    prev_q = q;
  endtask

  task automatic step();
    @(posedge clk);
    model = model + fiw;
    #1;
    check_cycle();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check_cycle();
    rst_n = 1'b1;

    // 1. largest step, two periods
    fiw = 24'(1 << 17);
    n_fiw++;
    for (int i = 0; i < 256; i++) begin
      step();
      if (i < 128) period[i] = int'(sample);
      else begin
        checks++;
        if (int'(sample) != period[i - 128]) begin
          failures++;
          $display("period check: clock %0d sample %0d vs %0d", i, sample, period[i - 128]);
        end
      end
    end

    // 2. FIW = 4065, one full period
    fiw = 24'd4065;
    n_fiw++;
    for (int i = 0; i < 4128; i++) step();

    // 3. random frequencies
    for (int i = 0; i < 40000; i++) begin
      if (i % 2000 == 0) begin
        fiw = 24'($urandom_range(1 << 17, 1));
        n_fiw++;
      end
      step();
    end

    // 4. reset in mid-wave
    @(negedge clk);
    rst_n = 1'b0;
    model = '0;
    #1;
    prev_u = ref_fold(int'(model[23:9]));
    prev_q = 0;
    check_cycle();
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    fiw = 24'd100000;
    n_fiw++;
    for (int i = 0; i < 2000; i++) step();

    checks++;
    if (n_up == 0 || n_down == 0 || n_neg == 0 || n_fiw == 0 || n_reset == 0 ||
        n_quad[0] == 0 || n_quad[1] == 0 || n_quad[2] == 0 || n_quad[3] == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("rising steps %0d, falling steps %0d, quadrant entries %0d/%0d/%0d/%0d",
             n_up, n_down, n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    $display("negative samples %0d, FIW changes %0d, resets %0d, worst error %f LSB",
             n_neg, n_fiw, n_reset, worst_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
