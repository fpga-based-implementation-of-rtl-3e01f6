// tb_ddfs_wordlength -- slope word-length sweep, N = 4 .. 8.
//
// Five copies of the DDFS run side by side with N = 4, 5, 6, 7, 8 slope bits
// (integrator width D = N + 5, other sizes at their defaults).  With
// FIW = 2^9 each covers one full period in 32768 clocks.  Every sample is
// compared with a reference built here from the real optimal slopes:
// codes floor((2^N - 1) m_i + 0.5), magnitude
// floor((256 c + m x + 2^(S-1)) / 2^S) with S = N - 1.  The spurious-free
// dynamic range of each copy (largest odd harmonic up to 1023) is printed
// and must reach the level expected for that word length:
//   N:        4     5     6     7     8
//   SFDR >=  63.0  58.5  69.0  78.0  74.0 dBc
// The sweep shows the trade-off of slope precision against ROM width; with
// independently rounded slopes the result does not grow steadily with N,
// because the rounding errors add up along the running sum.
module tb_ddfs_wordlength;

  localparam int  NS     = 32768;
  localparam int  NW     = 5;
  localparam real TWO_PI = 6.28318530717959;
  localparam real SFDR_MIN [NW] = '{63.0, 58.5, 69.0, 78.0, 74.0};

  localparam real M_REAL [32] = '{
    0.99977007, 0.99751977, 0.99244191, 0.98540874, 0.97578671, 0.96387676,
    0.94960230, 0.93321163, 0.91415493, 0.89334866, 0.87016184, 0.84493828,
    0.81766366, 0.78842327, 0.75728244, 0.72431753, 0.68960760, 0.65323637,
    0.61529142, 0.57586419, 0.53504965, 0.49294613, 0.44965506, 0.40528070,
    0.35993011, 0.31371196, 0.26673977, 0.21911842, 0.17099434, 0.12236189,
    0.07380440, 0.02365137
  };

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [23:0] fiw = 24'(1 << 9);
  int          checks = 0, failures = 0;
  int          smp [NW];
  int          wave [NW][NS];
  real         cos_t [NS];
  real         sin_t [NS];

  for (genvar w = 0; w < NW; w++) begin : g_dut
    localparam int unsigned NB = 4 + w;
    logic signed [14:0] sample;
    logic               seg_en;
    ddfs_top #(.N(NB), .D(NB + 5)) dut (.clk, .rst_n, .fiw_i(fiw), .sample_o(sample), .seg_en_o(seg_en));
    assign smp[w] = int'(sample);
  end

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sample(int n, int phase15);
    int scale = (1 << n) - 1;
    int s     = n - 1;
    int u     = phase15 % 8192;
    int a, x, c, q, mag;
    if ((phase15 / 8192) % 2 == 1) u = 8191 - u;
    a = u / 256;
    x = u % 256;
    c = 0;
    for (int j = 0; j < a; j++) c += int'($floor(real'(scale) * M_REAL[j] + 0.5));
    q   = int'($floor(real'(scale) * M_REAL[a] + 0.5));
    mag = ((256 * c + q * x + (1 << (s - 1))) >> s) % 16384;
    return (phase15 >= 16384) ? -mag : mag;
  endfunction

  function automatic real harmonic(int w, int k);
    real re = 0.0, im = 0.0;
    int  idx = 0;
    for (int n = 0; n < NS; n++) begin
      re += real'(wave[w][n]) * cos_t[idx];
      im += real'(wave[w][n]) * sin_t[idx];
      idx = (idx + k) % NS;
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(TWO_PI * real'(n) / real'(NS));
      sin_t[n] = $sin(TWO_PI * real'(n) / real'(NS));
    end
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int n = 0; n < NS; n++) begin
      for (int w = 0; w < NW; w++) begin
        wave[w][n] = smp[w];
        checks++;
        if (smp[w] != ref_sample(4 + w, n)) begin
          failures++;
          if (failures < 10) $display("N=%0d phase %0d: sample %0d expected %0d", 4 + w, n, smp[w],
                                      ref_sample(4 + w, n));
        end
      end
      @(posedge clk);
      #1;
    end
    for (int w = 0; w < NW; w++) begin
      real fund, worst, h, sfdr;
      int  worst_k;
      fund    = harmonic(w, 1);
      worst   = 0.0;
      worst_k = 0;
      for (int k = 3; k < 1024; k += 2) begin
        h = harmonic(w, k);
        if (h > worst) begin
          worst   = h;
          worst_k = k;
        end
      end
      sfdr = 20.0 * $log10(fund / worst);
      $display("N=%0d: SFDR %0.2f dBc, worst spur at harmonic %0d", 4 + w, sfdr, worst_k);
      checks++;
      if (sfdr < SFDR_MIN[w]) begin
        failures++;
        $display("N=%0d: SFDR below %0.1f dBc", 4 + w, SFDR_MIN[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
