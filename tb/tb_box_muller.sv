// tb_box_muller: checks the Box-Muller Gaussian generator.
//
// Random 16-bit uniform pairs (plus the two extreme values of r1) are fed one
// per clock. For each pair the expected samples are computed in real
// arithmetic, sqrt(-2 ln u1) * cos/sin(2 pi u2) with u1 = (r1+1)/2^16 and
// u2 = r2/2^16, and the outputs must match within 4 LSB (2^-10). The first
// result must arrive BM_LATENCY clocks after the first request, and over all
// samples the mean must be within 0.05 of 0 and the variance within 0.08 of 1.
module tb_box_muller;
  import clutter_pkg::*;

  localparam int NSAMP = 4000;
  localparam real LSB = 1.0 / 4096.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv = 1'b0;
  logic [15:0] r1 = '0, r2 = '0;
  logic        ov;
  gauss_t      x1, x2;

  box_muller dut (.clk, .rst_n, .in_valid(iv), .r1, .r2, .out_valid(ov), .x1, .x2);

  real e1 [$], e2 [$];
  int  cyc = 0, first_in = -1, first_out = -1, nout = 0;
  real sum = 0.0, sum2 = 0.0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u1, u2, rr;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      logic [15:0] a, b;
      a = 16'($urandom()); b = 16'($urandom());
      if (n == 0) a = 16'h0000;
      if (n == 1) a = 16'hFFFF;
      u1 = (real'(a) + 1.0) / 65536.0;
      u2 = real'(b) / 65536.0;
      rr = $sqrt(-2.0 * $ln(u1));
      e1.push_back(rr * $cos(2.0 * 3.141592653589793 * u2));
      e2.push_back(rr * $sin(2.0 * 3.141592653589793 * u2));
      r1 <= a; r2 <= b; iv <= 1'b1;
      if (first_in < 0) first_in = cyc + 1;
      @(posedge clk);
    end
    iv <= 1'b0;
    repeat (BM_LATENCY + 5) @(posedge clk);
    checks++;
    if (nout != NSAMP) begin failures++; $display("got %0d samples, expected %0d", nout, NSAMP); end
    checks++;
    if (first_out - first_in != BM_LATENCY) begin
      failures++; $display("latency %0d, expected %0d", first_out - first_in, BM_LATENCY);
    end
    begin
      real mean, var_;
      mean = sum / (2.0 * nout);
      var_ = sum2 / (2.0 * nout) - mean * mean;
      $display("mean %f variance %f", mean, var_);
      checks++;
      if (mean > 0.05 || mean < -0.05 || var_ > 1.08 || var_ < 0.92) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ov) begin
      real a, b, g1, g2;
      if (first_out < 0) first_out = cyc;
      a = e1.pop_front(); b = e2.pop_front();
      g1 = real'(x1) * LSB; g2 = real'(x2) * LSB;
      sum += g1 + g2; sum2 += g1 * g1 + g2 * g2;
      nout++;
      checks++;
      if (g1 - a > 4.0 * LSB || a - g1 > 4.0 * LSB || g2 - b > 4.0 * LSB || b - g2 > 4.0 * LSB) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %f %f expected %f %f", nout, g1, g2, a, b);
      end
    end
  end
endmodule
