// tb_spectral_filter: checks the spectrum multiplier and its coefficient
// memory.
//
// A 16-bin instance gets random coefficients H(k), then three frames of
// random bins are pushed with random gaps while out_ready toggles at random.
// Every output must equal X(k) * H(k) for the bin number k the sample had in
// its frame (rounded, within 2 LSB, saturated at +/-8). A bin accepted with out_ready high must
// appear on the very next clock (latency one).
module tb_spectral_filter;
  import clutter_pkg::*;

  localparam int N = 16;
  localparam int NFRAMES = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic coef_we = 1'b0;
  logic [$clog2(N)-1:0] coef_addr = '0;
  coef_t coef_data = '0;
  logic iv = 1'b0, ir, ov, ordy = 1'b0;
  cplx_t id = '0, od;

  spectral_filter #(.N(N)) dut (.clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(ordy), .out_data(od));

  real hr [N], hi [N];
  real er [$], ei [$];

  // the product saturates at the limits of the 24-bit data format
  function automatic real clamp(real x);
    if (x > 8.0 - 1.0 / 1048576.0) return 8.0 - 1.0 / 1048576.0;
    if (x < -8.0) return -8.0;
    return x;
  endfunction
  int  nout = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) ordy <= ($urandom() % 3) != 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < N; k++) begin
      logic signed [15:0] a, b;
      a = 16'($urandom()); b = 16'($urandom());
      hr[k] = real'(a) / 4096.0; hi[k] = real'(b) / 4096.0;
      coef_we <= 1'b1; coef_addr <= 4'(k); coef_data <= '{re: a, im: b};
      @(posedge clk);
    end
    coef_we <= 1'b0;
    for (int n = 0; n < N * NFRAMES; n++) begin
      logic signed [DW-1:0] a, b;
      real xr, xi;
      a = DW'($urandom_range(0, 2097151) - 1048576);   // |x| < 1
      b = DW'($urandom_range(0, 2097151) - 1048576);
      xr = real'(a) / 1048576.0; xi = real'(b) / 1048576.0;
      er.push_back(xr * hr[n % N] - xi * hi[n % N]);
      ei.push_back(xr * hi[n % N] + xi * hr[n % N]);
      while ($urandom() % 4 == 0) begin iv <= 1'b0; @(posedge clk); end
      iv <= 1'b1; id <= '{re: a, im: b};
      @(posedge clk);
      while (!ir) @(posedge clk);
    end
    iv <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != N * NFRAMES) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: a bin accepted when the output register is free shows next clock
  logic acc_q = 1'b0;
  always @(posedge clk) begin
    if (acc_q) begin
      checks++;
      if (!ov) begin failures++; $display("accepted bin not visible next clock"); end
    end
    acc_q <= iv && ir && rst_n;
    if (rst_n && ov && ordy) begin
      real gr, gi, xr, xi;
      xr = clamp(er.pop_front()); xi = clamp(ei.pop_front());
      gr = real'(od.re) / 1048576.0; gi = real'(od.im) / 1048576.0;
      nout++;
      checks++;
      if (gr - xr > 2e-6 || xr - gr > 2e-6 || gi - xi > 2e-6 || xi - gi > 2e-6) begin
        failures++;
        if (failures < 10) $display("bin %0d: got %f %f expected %f %f", nout, gr, gi, xr, xi);
      end
    end
  end
endmodule
