// tb_fft: checks the FFT / IFFT against a direct DFT in real arithmetic.
//
// Three instances are exercised: a 64-point forward transform (scaled by
// 1/N), a 64-point inverse transform (unscaled) and a 1024-point forward
// transform. Each gets two frames of random complex samples; every output
// bin is compared with (1/N) sum x(n) exp(-j 2 pi k n / N) or
// sum X(n) exp(+j 2 pi k n / N) within 2^-12. out_ready is dropped at random
// to exercise back-pressure during unload, and the clocks from the last
// accepted input to the first output must equal N/2 * log2(N).
module tb_fft;
  import clutter_pkg::*;

  localparam real SC  = 1048576.0;  // 2^20
  localparam real TOL = 1.0 / 4096.0;
  localparam real TWOPI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- three DUTs
  logic  iv [3], ir [3], ov [3], ordy [3], ol [3];
  cplx_t id [3], od [3];

  fft #(.N(64),   .INVERSE(1'b0), .SCALE(1'b1)) u_f64  (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_data(id[0]),
    .out_valid(ov[0]), .out_ready(ordy[0]), .out_data(od[0]), .out_last(ol[0]));
  fft #(.N(64),   .INVERSE(1'b1), .SCALE(1'b0)) u_i64  (.clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .in_data(id[1]),
    .out_valid(ov[1]), .out_ready(ordy[1]), .out_data(od[1]), .out_last(ol[1]));
  fft #(.N(1024), .INVERSE(1'b0), .SCALE(1'b1)) u_f1k  (.clk, .rst_n, .in_valid(iv[2]), .in_ready(ir[2]), .in_data(id[2]),
    .out_valid(ov[2]), .out_ready(ordy[2]), .out_data(od[2]), .out_last(ol[2]));

  task automatic run_frame(input int d, input int n, input bit inv, input real amp);
    real xr [], xi [];
    int  t_last, t_first, k;
    xr = new[n]; xi = new[n];
    for (int i = 0; i < n; i++) begin
      xr[i] = amp * (($urandom() / 4294967296.0) * 2.0 - 1.0);
      xi[i] = amp * (($urandom() / 4294967296.0) * 2.0 - 1.0);
    end
    // load
    for (int i = 0; i < n; i++) begin
      id[d] <= '{re: DW'($rtoi(xr[i] * SC)), im: DW'($rtoi(xi[i] * SC))};
      iv[d] <= 1'b1;
      @(posedge clk);
      while (!ir[d]) @(posedge clk);
    end
    t_last = cyc;
    iv[d] <= 1'b0;
    // unload with random back-pressure
    k = 0;
    t_first = -1;
    while (k < n) begin
      ordy[d] <= ($urandom() % 4) != 0;
      @(posedge clk);
      if (ov[d] && t_first < 0) t_first = cyc - 1;  // ov is sampled before this edge: it rose at the previous one
      if (ov[d] && ordy[d]) begin
        real er, ei, gr, gi;
        er = 0.0; ei = 0.0;
        for (int m = 0; m < n; m++) begin
          real ang;
          ang = (inv ? 1.0 : -1.0) * TWOPI * real'(k) * real'(m) / real'(n);
          er += xr[m] * $cos(ang) - xi[m] * $sin(ang);
          ei += xr[m] * $sin(ang) + xi[m] * $cos(ang);
        end
        if (!inv) begin er = er / n; ei = ei / n; end
        gr = real'(od[d].re) / SC; gi = real'(od[d].im) / SC;
        checks++;
        if (gr - er > TOL || er - gr > TOL || gi - ei > TOL || ei - gi > TOL ||
            ol[d] != (k == n - 1)) begin
          failures++;
          if (failures < 10) $display("dut %0d bin %0d: got %f %f expected %f %f", d, k, gr, gi, er, ei);
        end
        k++;
      end
    end
    ordy[d] <= 1'b0;
    checks++;
    if (t_first - t_last != n / 2 * $clog2(n)) begin
      failures++;
      $display("dut %0d: latency %0d, expected %0d", d, t_first - t_last, n / 2 * $clog2(n));
    end
  endtask

  initial begin
    for (int d = 0; d < 3; d++) begin iv[d] = 1'b0; ordy[d] = 1'b0; id[d] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    repeat (2) run_frame(0, 64, 1'b0, 4.0);
    repeat (2) run_frame(1, 64, 1'b1, 0.5);
    run_frame(2, 1024, 1'b0, 4.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
