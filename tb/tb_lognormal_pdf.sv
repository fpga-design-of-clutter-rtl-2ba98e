// tb_lognormal_pdf: distribution of the generated clutter amplitude.
//
// Runs the complete generator (default size, N = 1024) for 8 frames with an
// all-pass filter spectrum, sigma_c = 0.5, ln mu_c = ln 2 and no added noise,
// and compares the 8192 amplitudes with the lognormal law they must follow:
//  * histogram of z against the lognormal density, 24 bins of width 0.25 on
//    [0, 6) plus a tail bin, expected counts from the normal CDF of ln z;
//    chi-square below 50;
//  * sample mean against E[z] = exp(mu + sigma^2/2) within 3 %;
//  * sample variance against exp(2mu + 2sigma^2) - exp(2mu + sigma^2)
//    within 12 %.
module tb_lognormal_pdf;
  import clutter_pkg::*;

  localparam int  N      = 1024;
  localparam int  FRAMES = 8;
  localparam int  NBINS  = 25;
  localparam real SIG    = 0.5;
  localparam real MU     = 0.6931471805599453;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        run = 1'b0;
  logic [15:0] sigma_c = 16'd2048, ln_mu_c = 16'd2839, noise_gain = 16'd0;
  logic        coef_we = 1'b0;
  logic [9:0]  coef_addr = '0;
  coef_t       coef_data = '0;
  logic        out_valid, out_last, out_sat;
  logic signed [31:0] out_clutter, out_amp;

  clutter_generator dut (.clk, .rst_n, .run, .sigma_c, .ln_mu_c, .noise_gain,
    .coef_we, .coef_addr, .coef_data, .out_valid, .out_last, .out_clutter, .out_amp, .out_sat);

  initial begin : watchdog
    repeat (FRAMES * 7300 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  hist [NBINS];
  int  nout = 0, nframes = 0;
  real s1 = 0.0, s2 = 0.0;

  always @(posedge clk) if (rst_n && out_valid) begin
    real z;
    int  b;
    z = real'(out_amp) / 65536.0;
    b = int'($floor(z / 0.25));
    if (b > NBINS - 1) b = NBINS - 1;
    hist[b]++;
    s1 += z; s2 += z * z;
    nout++;
    if (out_last) nframes++;
  end

  function automatic real phi_cdf(real x);
    real a, h, s;
    int  m;
    a = -8.0;
    if (x <= a) return 0.0;
    m = 2000;
    h = (x - a) / m;
    s = 0.0;
    for (int i = 0; i <= m; i++) begin
      real t;
      t = a + i * h;
      s += $exp(-t * t / 2.0) * ((i == 0 || i == m) ? 1.0 : ((i % 2) ? 4.0 : 2.0));
    end
    return s * h / 3.0 / $sqrt(2.0 * 3.141592653589793);
  endfunction

  // lognormal CDF
  function automatic real ln_cdf(real z);
    if (z <= 0.0) return 0.0;
    return phi_cdf(($ln(z) - MU) / SIG);
  endfunction

  initial begin
    real chi2, mean, var_, em, ev;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      coef_we <= 1'b1; coef_addr <= 10'(k); coef_data <= '{re: 16'sd4096, im: 16'sd0};
      @(posedge clk);
    end
    coef_we <= 1'b0;
    run <= 1'b1;
    while (nframes < FRAMES) @(posedge clk);
    run <= 1'b0;

    chi2 = 0.0;
    for (int i = 0; i < NBINS; i++) begin
      real e;
      e = nout * (((i == NBINS - 1) ? 1.0 : ln_cdf((i + 1) * 0.25)) - ln_cdf(i * 0.25));
      if (e > 0.5) chi2 += (hist[i] - e) * (hist[i] - e) / e;
    end
    mean = s1 / nout;
    var_ = s2 / nout - mean * mean;
    em = $exp(MU + SIG * SIG / 2.0);
    ev = $exp(2.0 * MU + 2.0 * SIG * SIG) - $exp(2.0 * MU + SIG * SIG);
    $display("samples %0d: mean %f (law %f) variance %f (law %f) chi-square %f", nout, mean, em, var_, ev, chi2);
    checks++; if (nout < FRAMES * N) failures++;
    checks++; if (chi2 > 50.0) failures++;
    checks++; if (mean > 1.03 * em || mean < 0.97 * em) failures++;
    checks++; if (var_ > 1.12 * ev || var_ < 0.88 * ev) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
