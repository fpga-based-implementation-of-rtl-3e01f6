// tb_ddfs_sfdr -- spectral-purity run of the DDFS at its default sizes.
//
// FIW = 2^9 advances the 15-bit phase word by one step per clock, so one
// sine period is exactly 32768 clocks and every phase value is visited once.
// All samples of one period are captured (each also checked against the
// reference model) and their discrete Fourier transform is evaluated at
// harmonics 1 .. KMAX of the output frequency with a cosine table.
//
// Checks:
//   * the waveform repeats after exactly 32768 clocks (Fout = fclk * FIW / 2^24);
//   * every sample equals the reference model;
//   * DC and all even harmonics are zero (half-wave antisymmetry from the
//     quadrant folding and the output sign stage);
//   * the spurious-free dynamic range, fundamental against the largest other
//     harmonic up to KMAX, is at least SFDR_MIN dBc.  For the 6-bit slopes of
//     this design the worst spur is the third harmonic at about -69.6 dBc.
// The levels at harmonics 4s-1 = 127 and 4s+1 = 129, where the segmentation
// itself puts its largest spurs, are printed.
module tb_ddfs_sfdr;
  import tb_ref_pkg::*;

  localparam int  NS       = 32768;
  localparam int  KMAX     = 1024;
  localparam real SFDR_MIN = 69.0;
  localparam real TWO_PI   = 6.28318530717959;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic [23:0]        fiw = 24'(1 << 9);
  logic signed [14:0] sample;
  logic               seg_en;

  int  checks = 0, failures = 0;
  int  wave [NS];
  real cos_t [NS];
  real sin_t [NS];

  ddfs_top dut (.clk, .rst_n, .fiw_i(fiw), .sample_o(sample), .seg_en_o(seg_en));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real harmonic(int k);
    real re = 0.0, im = 0.0;
    int  idx = 0;
    for (int n = 0; n < NS; n++) begin
      re += real'(wave[n]) * cos_t[idx];
      im += real'(wave[n]) * sin_t[idx];
      idx = (idx + k) % NS;
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    real fund, worst, h, sfdr;
    int  worst_k;
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(TWO_PI * real'(n) / real'(NS));
      sin_t[n] = $sin(TWO_PI * real'(n) / real'(NS));
    end
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // sample n belongs to phase word n; phase 0 is the reset state
    for (int n = 0; n <= NS; n++) begin
      if (n < NS) begin
        wave[n] = int'(sample);
        checks++;
        if (wave[n] != ref_sample(n)) begin
          failures++;
          if (failures < 10) $display("phase %0d: sample %0d expected %0d", n, wave[n], ref_sample(n));
        end
      end else begin
        checks++;
        if (int'(sample) != wave[0]) begin
          failures++;
          $display("period is not %0d clocks", NS);
        end
      end
      @(posedge clk);
      #1;
    end

    fund    = harmonic(1);
    worst   = 0.0;
    worst_k = 0;
    for (int k = 0; k <= KMAX; k++) begin
      if (k == 1) continue;
      h = harmonic(k);
      if (k % 2 == 0) begin
        checks++;
        if (h > 1.0e-6 * fund) begin
          failures++;
          $display("even harmonic %0d not zero: %e", k, h / fund);
        end
      end else if (h > worst) begin
        worst   = h;
        worst_k = k;
      end
    end
    sfdr = 20.0 * $log10(fund / worst);
    $display("SFDR %0.2f dBc, worst spur at harmonic %0d", sfdr, worst_k);
    $display("harmonic 127: %0.2f dBc, harmonic 129: %0.2f dBc",
             20.0 * $log10(harmonic(127) / fund), 20.0 * $log10(harmonic(129) / fund));
    checks++;
    if (sfdr < SFDR_MIN) begin
      failures++;
      $display("SFDR below %0.1f dBc", SFDR_MIN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
