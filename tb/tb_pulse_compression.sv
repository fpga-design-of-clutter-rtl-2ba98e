// tb_pulse_compression: the FFT - spectrum multiply - IFFT chain used as a
// matched filter on a radar echo.
//
// The filter stages of the clutter generator are the same structure as a
// frequency-domain matched filter: y = IFFT{ FFT(s) . H } with H the
// conjugate spectrum of the stored replica. This test builds that chain from
// the RTL blocks at N = 1024: a 64-sample linear-FM chirp is the replica,
// H(k) = conj(DFT(replica)(k)) / 10 is loaded into spectral_filter, and the
// input is the echo of four point scatterers (delays 100, 300, 520, 800;
// amplitudes 0.5, 1.0, 0.8, 0.3). Every output sample is compared with the
// same computation done in real arithmetic with the quantised H (within
// 2^-9), and the four largest local maxima of |y| must sit exactly at the
// four delays, i.e. the scatterers are resolved.
module tb_pulse_compression;
  import clutter_pkg::*;

  localparam int  N   = 1024;
  localparam int  L   = 64;
  localparam real SC  = 1048576.0;
  localparam real TWOPI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  f_iv = 1'b0, f_ir, f_ov, f_or, s_ov, i_ir, i_ov;
  cplx_t f_id = '0, f_od, s_od, i_od;
  logic  coef_we = 1'b0;
  logic [9:0] coef_addr = '0;
  coef_t coef_data = '0;

  fft #(.N(N), .INVERSE(1'b0), .SCALE(1'b1)) u_fwd (.clk, .rst_n, .in_valid(f_iv), .in_ready(f_ir), .in_data(f_id),
    .out_valid(f_ov), .out_ready(f_or), .out_data(f_od), .out_last());
  spectral_filter #(.N(N)) u_mul (.clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(f_ov), .in_ready(f_or), .in_data(f_od), .out_valid(s_ov), .out_ready(i_ir), .out_data(s_od));
  fft #(.N(N), .INVERSE(1'b1), .SCALE(1'b0)) u_inv (.clk, .rst_n, .in_valid(s_ov), .in_ready(i_ir), .in_data(s_od),
    .out_valid(i_ov), .out_ready(1'b1), .out_data(i_od), .out_last());

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rep_r [L], rep_i [L];
  real hq_r [N], hq_i [N];
  real e_r [N], e_i [N];       // echo
  real y_r [N], y_i [N];       // expected output
  real g_mag [N];              // RTL output magnitude
  int  delays [4] = '{100, 300, 520, 800};
  real amps   [4] = '{0.5, 1.0, 0.8, 0.3};
  int  nout = 0;

  always @(posedge clk) if (rst_n && i_ov) begin
    real gr, gi;
    gr = real'(i_od.re) / SC; gi = real'(i_od.im) / SC;
    g_mag[nout] = $sqrt(gr * gr + gi * gi);
    checks++;
    if (gr - y_r[nout] > 1.0 / 512 || y_r[nout] - gr > 1.0 / 512 ||
        gi - y_i[nout] > 1.0 / 512 || y_i[nout] - gi > 1.0 / 512) begin
      failures++;
      if (failures < 10) $display("sample %0d: got %f %f expected %f %f", nout, gr, gi, y_r[nout], y_i[nout]);
    end
    nout++;
  end

  initial begin
    real xr [N], xi [N];
    // replica: linear FM chirp, phase pi * n^2 / L (bandwidth-time product L/2)
    for (int n = 0; n < L; n++) begin
      rep_r[n] = $cos(3.141592653589793 * n * n / (2.0 * L));
      rep_i[n] = $sin(3.141592653589793 * n * n / (2.0 * L));
    end
    // H(k) = conj(DFT(replica)) / 10, quantised to the coefficient format
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < L; n++) begin
        real a;
        a = -TWOPI * k * n / N;
        sr += rep_r[n] * $cos(a) - rep_i[n] * $sin(a);
        si += rep_r[n] * $sin(a) + rep_i[n] * $cos(a);
      end
      hq_r[k] = real'($rtoi(sr / 10.0 * 4096.0)) / 4096.0;
      hq_i[k] = real'($rtoi(-si / 10.0 * 4096.0)) / 4096.0;
    end
    // echo: delayed, scaled copies of the replica
    for (int n = 0; n < N; n++) begin e_r[n] = 0.0; e_i[n] = 0.0; end
    for (int s = 0; s < 4; s++)
      for (int n = 0; n < L; n++) begin
        e_r[(delays[s] + n) % N] += amps[s] * rep_r[n];
        e_i[(delays[s] + n) % N] += amps[s] * rep_i[n];
      end
    // expected: IDFT( DFT(echo)/N * Hq )
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = -TWOPI * real'((k * n) % N) / N;
        sr += e_r[n] * $cos(a) - e_i[n] * $sin(a);
        si += e_r[n] * $sin(a) + e_i[n] * $cos(a);
      end
      xr[k] = (sr * hq_r[k] - si * hq_i[k]) / N;
      xi[k] = (sr * hq_i[k] + si * hq_r[k]) / N;
    end
    for (int m = 0; m < N; m++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int k = 0; k < N; k++) begin
        real a;
        a = TWOPI * real'((k * m) % N) / N;
        sr += xr[k] * $cos(a) - xi[k] * $sin(a);
        si += xr[k] * $sin(a) + xi[k] * $cos(a);
      end
      y_r[m] = sr; y_i[m] = si;
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      coef_we <= 1'b1; coef_addr <= 10'(k);
      coef_data <= '{re: 16'($rtoi(hq_r[k] * 4096.0)), im: 16'($rtoi(hq_i[k] * 4096.0))};
      @(posedge clk);
    end
    coef_we <= 1'b0;
    for (int n = 0; n < N; n++) begin
      f_iv <= 1'b1;
      f_id <= '{re: DW'($rtoi(e_r[n] * SC)), im: DW'($rtoi(e_i[n] * SC))};
      @(posedge clk);
    end
    f_iv <= 1'b0;
    while (nout < N) @(posedge clk);

    // the four largest local maxima must be the scatterers
    begin
      int  pk [4];
      real pv [4];
      for (int j = 0; j < 4; j++) begin pk[j] = -1; pv[j] = -1.0; end
      for (int m = 0; m < N; m++) begin
        real v;
        v = g_mag[m];
        if (v >= g_mag[(m + N - 1) % N] && v >= g_mag[(m + 1) % N]) begin
          for (int j = 0; j < 4; j++) if (v > pv[j]) begin
            for (int t = 3; t > j; t--) begin pv[t] = pv[t-1]; pk[t] = pk[t-1]; end
            pv[j] = v; pk[j] = m;
            break;
          end
        end
      end
      $display("peaks at %0d %0d %0d %0d (magnitudes %f %f %f %f)", pk[0], pk[1], pk[2], pk[3], pv[0], pv[1], pv[2], pv[3]);
      for (int s = 0; s < 4; s++) begin
        bit found;
        found = 0;
        for (int j = 0; j < 4; j++) if (pk[j] == delays[s]) found = 1;
        checks++;
        if (!found) begin failures++; $display("scatterer at %0d not resolved", delays[s]); end
        checks++;
        if (g_mag[delays[s]] < 0.95 * amps[s] * L / 10.0 || g_mag[delays[s]] > 1.05 * amps[s] * L / 10.0) begin
          failures++; $display("peak %0d magnitude %f expected %f", delays[s], g_mag[delays[s]], amps[s] * L / 10.0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
