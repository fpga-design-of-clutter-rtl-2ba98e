// tb_zmnl: checks the lognormal amplitude transform.
//
// Random u, v, sigma_c, ln(mu_c) and noise gain are applied one per clock;
// the expected outputs exp(sigma_c*u + ln mu_c) and that value plus
// gain*v are computed in real arithmetic (with the same clamp and
// saturation limits) and compared within 0.1 % + 2^-14. Directed samples
// drive w beyond the clamp to exercise saturation and underflow. The first
// result must appear ZMNL_LATENCY clocks after the first input.
module tb_zmnl;
  import clutter_pkg::*;

  localparam int NSAMP = 3000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nsat = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic iv = 1'b0;
  gauss_t u = '0, v = '0;
  logic [15:0] sigma = '0, ln_mu = '0, gain = '0;
  logic ov, sat;
  logic signed [31:0] amp, clutter;

  zmnl dut (.clk, .rst_n, .in_valid(iv), .u, .v, .sigma, .ln_mu, .noise_gain(gain),
            .out_valid(ov), .amp, .clutter, .sat);

  real ea [$], ec [$];
  bit  es [$];
  int  first_in = -1, first_out = -1, nout = 0;

  initial begin : watchdog
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real w, z, c, maxz;
    maxz = 2147483647.0 / 65536.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      gauss_t a, b;
      logic [15:0] s, l, g;
      a = gauss_t'($urandom_range(0, 65535));
      b = gauss_t'($urandom_range(0, 65535));
      s = 16'($urandom_range(0, 8192));      // sigma up to 2
      l = 16'($urandom_range(0, 16383) - 8192); // ln mu in [-2, 2)
      g = (n % 3 == 0) ? 16'($urandom_range(0, 4096)) : 16'd0;
      if (n == 10) begin a = 16'sh7FFF; s = 16'hFFFF; l = 16'h7FFF; end  // huge -> saturate
      if (n == 11) begin a = 16'sh8000; s = 16'hFFFF; l = 16'h8000; end  // tiny -> 0
      w = real'(s) / 4096.0 * real'(a) / 4096.0 + real'(signed'(l)) / 4096.0;
      if (w > 24.0) w = 24.0;
      if (w < -24.0) w = -24.0;
      z = $exp(w);
      es.push_back(z > maxz);
      if (z > maxz) z = maxz;
      c = z + real'(g) / 4096.0 * real'(b) / 4096.0;
      if (c > maxz) c = maxz;
      ea.push_back(z); ec.push_back(c);
      u <= a; v <= b; sigma <= s; ln_mu <= l; gain <= g; iv <= 1'b1;
      if (first_in < 0) first_in = cyc + 1;
      @(posedge clk);
    end
    iv <= 1'b0;
    repeat (ZMNL_LATENCY + 5) @(posedge clk);
    checks++;
    if (nout != NSAMP) begin failures++; $display("%0d outputs, expected %0d", nout, NSAMP); end
    checks++;
    if (first_out - first_in != ZMNL_LATENCY) begin
      failures++; $display("latency %0d expected %0d", first_out - first_in, ZMNL_LATENCY);
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ov) begin
      real xa, xc, ga, gc, tol;
      bit  xs;
      if (first_out < 0) first_out = cyc;
      xa = ea.pop_front(); xc = ec.pop_front(); xs = es.pop_front();
      ga = real'(amp) / 65536.0; gc = real'(clutter) / 65536.0;
      tol = 0.001 * xa + 1.0 / 16384.0;
      if (sat) nsat++;
      nout++;
      checks++;
      if (ga - xa > tol || xa - ga > tol || gc - xc > tol + 0.001 || xc - gc > tol + 0.001 || sat != xs) begin
        failures++;
        if (failures < 10) $display("sample %0d: amp %f clutter %f sat %0d, expected %f %f %0d", nout, ga, gc, sat, xa, xc, xs);
      end
    end
  end
endmodule
