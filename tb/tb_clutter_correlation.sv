// tb_clutter_correlation: programming a wanted clutter correlation.
//
// The ZMNL changes correlation: if ln z has correlation rho(m) at lag m, the
// lognormal amplitude z has
//     s(m) = (exp(sigma_c^2 rho(m)) - 1) / (exp(sigma_c^2) - 1)
// so a host that wants s(m) must program the filter for
//     rho(m) = ln(1 + s(m) (exp(sigma_c^2) - 1)) / sigma_c^2.
// This test does exactly that with the complete generator at its default
// size (N = 1024):
//  * target s(m) = exp(-m^2 / (2 L^2)), L = 6 samples, circular in the frame,
//    sigma_c = 1, ln mu_c = 0, no added noise;
//  * rho(m) from the formula above; |H(k)|^2 = DFT of rho (negative values
//    clipped to 0), H(k) = sqrt of that, real and even, so (1/N) sum |H|^2 =
//    rho(0) = 1 and the filtered noise has unit variance;
//  * clipping the spectrum and rounding H(k) change the correlation slightly,
//    so the test recomputes what the programmed H really gives:
//    rho_h(m) = sum |H(k)|^2 cos(2 pi k m / N) / sum |H(k)|^2, and
//    s_h(m) from rho_h(m) by the first formula;
//  * 64 frames are generated; the circular autocorrelation of z and of ln z
//    within each frame, averaged over frames, must follow s_h(m) within 0.08
//    and rho_h(m) within 0.05 for lags 1..20, and s_h(m) must stay within
//    0.03 of the wanted s(m).
// The tolerances allow for the spread of correlation estimates from 64
// frames of strongly correlated, heavy-tailed samples (about 0.06 for z with
// this seed). Programming H for s(m) directly (ignoring the ZMNL) would make
// s(m) too small by up to 0.12 on top of that spread.
module tb_clutter_correlation;
  import clutter_pkg::*;

  localparam int  N      = 1024;
  localparam int  FRAMES = 64;
  localparam int  LAGS   = 20;
  localparam real L      = 6.0;
  localparam real SIG    = 1.0;
  localparam real TOL_S  = 0.08;
  localparam real TOL_R  = 0.05;
  localparam real TOL_H  = 0.03;
  localparam real PI     = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        run = 1'b0;
  logic [15:0] sigma_c = 16'd4096, ln_mu_c = 16'd0, noise_gain = 16'd0;
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
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ targets
  function automatic real s_target(int m);
    int d;
    d = (m <= N / 2) ? m : N - m;
    return $exp(-real'(d * d) / (2.0 * L * L));
  endfunction

  function automatic real rho_of_s(real s);
    return $ln(1.0 + s * ($exp(SIG * SIG) - 1.0)) / (SIG * SIG);
  endfunction

  // ------------------------------------------------------------ capture
  real zs [FRAMES][N];
  int  nout = 0, nframes = 0, n_sat = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (nframes < FRAMES) zs[nframes][nout % N] = real'(out_amp) / 65536.0;
    nout++;
    if (out_sat) n_sat++;
    if (out_last) nframes++;
  end

  // circular autocorrelation coefficient at lags 0..LAGS, averaged over frames
  function automatic void autocorr(input bit use_log, output real r [LAGS+1]);
    real m, v, a, b;
    int  cnt;
    m = 0.0; v = 0.0; cnt = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        a = use_log ? $ln(zs[f][n]) : zs[f][n];
        m += a; cnt++;
      end
    m = m / cnt;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        a = (use_log ? $ln(zs[f][n]) : zs[f][n]) - m;
        v += a * a;
      end
    v = v / cnt;
    for (int k = 0; k <= LAGS; k++) begin
      real acc;
      acc = 0.0;
      for (int f = 0; f < FRAMES; f++)
        for (int n = 0; n < N; n++) begin
          a = (use_log ? $ln(zs[f][n]) : zs[f][n]) - m;
          b = (use_log ? $ln(zs[f][(n + k) % N]) : zs[f][(n + k) % N]) - m;
          acc += a * b;
        end
      r[k] = acc / cnt / v;
    end
  endfunction

  initial begin
    real rho [N];
    real hsq [N];
    real rz [LAGS+1], rl [LAGS+1], rho_h [LAGS+1], s_h [LAGS+1];
    real hmax, worst_s, worst_r;

    for (int m = 0; m < N; m++) rho[m] = rho_of_s(s_target(m));

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // H(k) = sqrt(DFT(rho)(k)); rho is real and even, so the DFT is a cosine sum
    hmax = 0.0;
    for (int k = 0; k < N; k++) begin
      real p, h;
      p = 0.0;
      for (int m = 0; m < N; m++) p += rho[m] * $cos(2.0 * PI * real'((k * m) % N) / N);
      h = (p > 0.0) ? $sqrt(p) : 0.0;
      if (h > hmax) hmax = h;
      coef_we   <= 1'b1;
      coef_addr <= 10'(k);
      coef_data <= '{re: 16'($rtoi(h * 4096.0 + 0.5)), im: 16'sd0};
      hsq[k] = real'($rtoi(h * 4096.0 + 0.5)) / 4096.0;
      hsq[k] = hsq[k] * hsq[k];
      @(posedge clk);
    end
    coef_we <= 1'b0;
    $display("largest |H(k)| %f", hmax);
    for (int m = 0; m <= LAGS; m++) begin
      real num, den;
      num = 0.0; den = 0.0;
      for (int k = 0; k < N; k++) begin
        num += hsq[k] * $cos(2.0 * PI * real'((k * m) % N) / N);
        den += hsq[k];
      end
      rho_h[m] = num / den;
      s_h[m] = ($exp(SIG * SIG * rho_h[m]) - 1.0) / ($exp(SIG * SIG) - 1.0);
    end

    run <= 1'b1;
    while (nframes < FRAMES) @(posedge clk);
    run <= 1'b0;

    autocorr(1'b0, rz);
    autocorr(1'b1, rl);
    worst_s = 0.0; worst_r = 0.0;
    for (int k = 1; k <= LAGS; k++) begin
      real es, er;
      es = rz[k] - s_h[k];
      er = rl[k] - rho_h[k];
      if (es < 0.0) es = -es;
      if (er < 0.0) er = -er;
      if (es > worst_s) worst_s = es;
      if (er > worst_r) worst_r = er;
      if (k % 4 == 0)
        $display("lag %2d: s %f (programmed %f, wanted %f)  rho %f (programmed %f, wanted %f)",
                 k, rz[k], s_h[k], s_target(k), rl[k], rho_h[k], rho[k]);
      checks++;
      if (es > TOL_S) begin
        failures++; $display("lag %0d: s = %f, programmed %f", k, rz[k], s_h[k]);
      end
      checks++;
      if (er > TOL_R) begin
        failures++; $display("lag %0d: rho = %f, programmed %f", k, rl[k], rho_h[k]);
      end
      checks++;
      if (s_h[k] - s_target(k) > TOL_H || s_target(k) - s_h[k] > TOL_H) begin
        failures++; $display("lag %0d: programmed s %f, wanted %f", k, s_h[k], s_target(k));
      end
    end
    $display("largest error: s %f, rho %f; saturated samples %0d", worst_s, worst_r, n_sat);
    checks++; if (nframes < FRAMES) failures++;
    checks++; if (n_sat != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
