// tb_gauss_pdf: distribution of the Gaussian noise source.
//
// Runs the first two stages of the generator (two Tausworthe generators with
// the top level's taps and seeds, feeding box_muller) for 32768 requests,
// i.e. 65536 samples from both outputs, and compares their histogram with
// the N(0,1) density: 32 bins of width 0.25 on [-4, 4] plus two tail bins,
// expected counts from the normal CDF (integrated numerically here). The
// chi-square statistic must stay below 70 (33 degrees of freedom), and the
// mean, variance and kurtosis must be near 0, 1 and 3.
module tb_gauss_pdf;
  import clutter_pkg::*;

  localparam int NREQ  = 32768;
  localparam int NBINS = 34;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        issue = 1'b0;
  logic [15:0] r1, r2;
  logic        gv;
  gauss_t      x1, x2;

  tausworthe_prng #(.P(31), .Q(3), .L(16), .SEED(31'h2545_F491)) u_p1 (.clk, .rst_n, .en(issue), .rnd(r1));
  tausworthe_prng #(.P(31), .Q(6), .L(16), .SEED(31'h1B87_3593)) u_p2 (.clk, .rst_n, .en(issue), .rnd(r2));
  box_muller u_bm (.clk, .rst_n, .in_valid(issue), .r1, .r2, .out_valid(gv), .x1, .x2);

  int  hist [NBINS];
  int  nsamp = 0;
  real s1 = 0.0, s2 = 0.0, s4 = 0.0;

  initial begin : watchdog
    repeat (NREQ + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bin_of(real x);
    if (x < -4.0) return 0;
    if (x >= 4.0) return NBINS - 1;
    return 1 + int'($floor((x + 4.0) / 0.25));
  endfunction

  // standard normal CDF by Simpson integration of the density from -8
  function automatic real phi_cdf(real x);
    real a, h, s;
    int  m;
    a = -8.0;
    if (x <= a) return 0.0;
    m = 2000;
    h = (x - a) / m;
    s = 0.0;
    for (int i = 0; i <= m; i++) begin
      real t, f;
      t = a + i * h;
      f = $exp(-t * t / 2.0) / $sqrt(2.0 * 3.141592653589793);
      s += f * ((i == 0 || i == m) ? 1.0 : ((i % 2) ? 4.0 : 2.0));
    end
    return s * h / 3.0;
  endfunction

  always @(posedge clk) if (rst_n && gv) begin
    real a, b;
    a = real'(x1) / 4096.0; b = real'(x2) / 4096.0;
    hist[bin_of(a)]++; hist[bin_of(b)]++;
    s1 += a + b; s2 += a * a + b * b; s4 += a * a * a * a + b * b * b * b;
    nsamp += 2;
  end

  initial begin
    real chi2, mean, var_, kurt;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    issue <= 1'b1;
    repeat (NREQ) @(posedge clk);
    issue <= 1'b0;
    repeat (BM_LATENCY + 5) @(posedge clk);

    chi2 = 0.0;
    for (int i = 0; i < NBINS; i++) begin
      real lo, hi, e;
      lo = (i == 0) ? -100.0 : -4.0 + (i - 1) * 0.25;
      hi = (i == NBINS - 1) ? 100.0 : -4.0 + i * 0.25;
      e = nsamp * (((i == NBINS - 1) ? 1.0 : phi_cdf(hi)) - ((i == 0) ? 0.0 : phi_cdf(lo)));
      if (e > 0.5) chi2 += (hist[i] - e) * (hist[i] - e) / e;
    end
    mean = s1 / nsamp;
    var_ = s2 / nsamp - mean * mean;
    kurt = (s4 / nsamp) / (var_ * var_);
    $display("samples %0d: mean %f variance %f kurtosis %f chi-square %f", nsamp, mean, var_, kurt, chi2);
    checks++; if (nsamp != 2 * NREQ) failures++;
    checks++; if (chi2 > 70.0) failures++;
    checks++; if (mean > 0.02 || mean < -0.02) failures++;
    checks++; if (var_ > 1.03 || var_ < 0.97) failures++;
    checks++; if (kurt > 3.15 || kurt < 2.85) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
