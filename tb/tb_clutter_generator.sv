// tb_clutter_generator: end-to-end test of the clutter generator at its
// default size (N = 1024, no parameter overrides).
//
// A reference model computes, independently of the RTL, the uniform words of
// both Tausworthe generators (bit by bit from the feedback recurrence) and the
// Box-Muller samples x1, x2 in real arithmetic. Three phases follow:
//  A  H(k) = 1 for all bins, sigma_c = 0.5, ln mu_c = 0, noise gain 0.25,
//     2 frames: with an all-pass filter u = x1, so every output must equal
//     exp(0.5 x1) + 0.25 x2; the mean of the amplitude must match
//     mu_c exp(sigma_c^2 / 2) and the lag-1 correlation of ln z must be ~0.
//  B  low-pass H(k) = sqrt(N/63) on the 63 bins |k| <= 31, 4 frames:
//     ln z / sigma_c must have variance ~1 and lag-1 correlation > 0.9.
//  C  H = 1 again, sigma_c = 4, 1 frame: large samples saturate and each
//     output must still match the model.
// Mechanisms counted (each must happen): coefficient writes, frames out,
// FFT/IFFT overlap (forward FFT loading while the IFFT is busy), noise
// addition, amplitude saturation. Unload stalls (forward FFT done while the
// IFFT is still busy) are only reported: with back-to-back frames the forward
// FFT always finishes BM_LATENCY clocks after the IFFT has drained.
module tb_clutter_generator;
  import clutter_pkg::*;

  localparam int N = 1024;
  localparam real PI = 3.141592653589793;
  // Back-to-back frames: forward FFT unload (N), request and load of the
  // next frame (N + BM_LATENCY), forward FFT butterflies (N/2 log2 N).
  localparam int FRAME_PERIOD = 2 * N + BM_LATENCY + N / 2 * $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        run = 1'b0;
  logic [15:0] sigma_c = 16'd2048, ln_mu_c = 16'd0, noise_gain = 16'd1024;
  logic        coef_we = 1'b0;
  logic [9:0]  coef_addr = '0;
  coef_t       coef_data = '0;
  logic        out_valid, out_last, out_sat;
  logic signed [31:0] out_clutter, out_amp;

  clutter_generator dut (.clk, .rst_n, .run, .sigma_c, .ln_mu_c, .noise_gain,
    .coef_we, .coef_addr, .coef_data, .out_valid, .out_last, .out_clutter, .out_amp, .out_sat);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- reference model
  // Feedback shift register a(n+31) = a(n+q) xor a(n); the 31-bit word holds
  // the oldest bit in its LSB and the generator shows bits 30..15.
  class taus_model;
    bit w [31];
    int q;
    function new(logic [30:0] seed, int qq);
      for (int i = 0; i < 31; i++) w[i] = seed[i];
      q = qq;
    endfunction
    function logic [15:0] peek();
      logic [15:0] r;
      for (int i = 0; i < 16; i++) r[i] = w[15 + i];
      return r;
    endfunction
    function void step();
      bit s [62];
      for (int i = 0; i < 31; i++) s[i] = w[i];
      for (int n = 0; n < 31; n++) s[n + 31] = s[n + q] ^ s[n];
      for (int i = 0; i < 31; i++) w[i] = s[31 + i];
    endfunction
  endclass

  taus_model g1, g2;
  real mx1 [$], mx2 [$];

  function automatic void model_next();
    logic [15:0] a, b;
    real u1, u2, rr;
    a = g1.peek(); b = g2.peek();
    g1.step(); g2.step();
    u1 = (real'(a) + 1.0) / 65536.0;
    u2 = real'(b) / 65536.0;
    rr = $sqrt(-2.0 * $ln(u1));
    mx1.push_back(rr * $cos(2.0 * PI * u2));
    mx2.push_back(rr * $sin(2.0 * PI * u2));
  endfunction

  // ---------------------------------------------------- mechanism counters
  int n_issue = 0, n_out = 0, n_frames = 0, n_coef = 0, n_overlap = 0;
  int n_stall = 0, n_noise = 0, n_sat = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.issue) n_issue++;
    if (coef_we) n_coef++;
    if (dut.fwd_in_ready && dut.g_valid && !dut.inv_in_ready && !dut.u_valid) n_overlap++;
    if (dut.fwd_out_valid && !dut.fwd_out_ready) n_stall++;
  end

  // ---------------------------------------------------- output checking
  int   phase = 0;
  int   cyc = 0;
  int   last_t [$];   // clock of each out_last
  always @(posedge clk) cyc <= cyc + 1;
  real  lz [$];     // ln(amp) samples of the current phase
  real  zsum = 0.0;
  always @(posedge clk) if (rst_n && out_valid) begin
    real x1, x2, z, c, ga, gc, maxz;
    maxz = 2147483647.0 / 65536.0;
    x1 = mx1.pop_front(); x2 = mx2.pop_front();
    ga = real'(out_amp) / 65536.0; gc = real'(out_clutter) / 65536.0;
    n_out++;
    if (out_last) begin
      n_frames++;
      last_t.push_back(cyc);
    end
    if (out_sat) n_sat++;
    if (noise_gain != 0 && gc != ga) n_noise++;
    if (ga > 0.0) lz.push_back($ln(ga));
    zsum += ga;
    if (phase != 2) begin
      real s, g, tol;
      s = real'(sigma_c) / 4096.0; g = real'(noise_gain) / 4096.0;
      z = $exp(s * x1 + real'(signed'(ln_mu_c)) / 4096.0);
      if (z > maxz) z = maxz;
      c = z + g * x2;
      if (c > maxz) c = maxz;
      tol = 0.002 * z + 0.002;
      checks++;
      if (ga - z > tol || z - ga > tol || gc - c > tol + 0.002 || c - gc > tol + 0.002) begin
        failures++;
        if (failures < 10) $display("sample %0d: amp %f clutter %f, expected %f %f", n_out, ga, gc, z, c);
      end
    end
  end

  // ---------------------------------------------------- sequencing
  task automatic write_coefs(input bit lowpass);
    real c;
    c = $sqrt(real'(N) / 63.0);
    for (int k = 0; k < N; k++) begin
      coef_we <= 1'b1;
      coef_addr <= 10'(k);
      if (!lowpass) coef_data <= '{re: 16'sd4096, im: 16'sd0};
      else if (k <= 31 || k >= N - 31) coef_data <= '{re: 16'($rtoi(c * 4096.0 + 0.5)), im: 16'sd0};
      else coef_data <= '0;
      @(posedge clk);
    end
    coef_we <= 1'b0;
  endtask

  int out_target = 0;
  task automatic run_frames(input int nf);
    int cnt;
    out_target += nf * N;
    for (int i = 0; i < nf * N; i++) model_next();
    // issue is sampled between clock edges; run drops right after the edge
    // that takes the last request of the last frame
    @(negedge clk);
    run = 1'b1;
    cnt = 0;
    forever begin
      #1;
      if (dut.issue) cnt++;
      if (cnt == nf * N) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 run = 1'b0;
    while (n_out < out_target) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  function automatic real lag1(input real m);
    real num, den;
    num = 0.0; den = 0.0;
    for (int i = 0; i < lz.size(); i++) begin
      den += (lz[i] - m) * (lz[i] - m);
      if (i > 0) num += (lz[i] - m) * (lz[i-1] - m);
    end
    return num / den;
  endfunction

  function automatic real mean_lz();
    real s;
    s = 0.0;
    foreach (lz[i]) s += lz[i];
    return s / lz.size();
  endfunction

  initial begin
    real m, v, r, ez;
    g1 = new(31'h2545_F491, 3);
    g2 = new(31'h1B87_3593, 6);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Phase A: all-pass filter, per-sample model check
    write_coefs(1'b0);
    lz.delete(); zsum = 0.0;
    run_frames(2);
    ez = $exp(0.5 * 0.5 / 2.0);
    m = zsum / (2.0 * N);
    r = lag1(mean_lz());
    $display("phase A: mean amplitude %f (expected %f), lag-1 correlation %f", m, ez, r);
    $display("frame period %0d clocks", last_t[1] - last_t[0]);
    checks++;
    if (last_t[1] - last_t[0] != FRAME_PERIOD) begin
      failures++; $display("frame period %0d, expected %0d", last_t[1] - last_t[0], FRAME_PERIOD);
    end
    checks++; if (m > 1.03 * ez || m < 0.97 * ez) failures++;
    checks++; if (r > 0.1 || r < -0.1) failures++;

    // Phase B: low-pass filter, correlation statistics
    phase = 2;
    noise_gain <= 16'd0;
    write_coefs(1'b1);
    lz.delete();
    run_frames(4);
    m = mean_lz();
    v = 0.0;
    foreach (lz[i]) v += (lz[i] - m) * (lz[i] - m);
    v = v / lz.size() / 0.25;
    r = lag1(m);
    $display("phase B: var(ln z)/sigma^2 %f, lag-1 correlation %f", v, r);
    checks++; if (v > 1.3 || v < 0.7) failures++;
    checks++; if (r < 0.9) failures++;

    // Phase C: all-pass filter, sigma_c = 4 drives the amplitude into saturation
    phase = 3;
    sigma_c <= 16'd16384;
    noise_gain <= 16'd512;
    write_coefs(1'b0);
    run_frames(1);

    $display("mechanisms: coef writes %0d, frames %0d, FFT/IFFT overlap %0d, unload stalls %0d, noise %0d, saturations %0d",
             n_coef, n_frames, n_overlap, n_stall, n_noise, n_sat);
    checks++; if (n_coef == 0) failures++;
    checks++; if (n_frames != 7) failures++;
    checks++; if (n_overlap == 0) begin failures++; $display("no FFT/IFFT overlap"); end
    checks++; if (n_noise == 0) failures++;
    checks++; if (n_sat == 0) begin failures++; $display("no saturation"); end
    checks++; if (mx1.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
