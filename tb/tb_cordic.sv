// tb_cordic: checks the four CORDIC modes against real-valued math.
//
// Four instances (circular/hyperbolic x rotation/vectoring) are fed a new
// random operand every clock. A scoreboard queue per instance holds the
// expected results computed with $cos, $sin, $cosh, $sinh, atan and atanh
// (through $atan and $ln); every output is compared within 2^-20. The tag
// must come out with its own sample, and the first result must appear
// exactly STEPS clocks after the first input.
module tb_cordic;
  import clutter_pkg::*;

  localparam int    NSAMP = 300;
  localparam real   SC    = 268435456.0;  // 2^28
  localparam real   TOL   = 1.0 / 1048576.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic   iv;
  cword_t ix [4], iy [4], iz [4];
  logic [15:0] itag;
  logic   ov [4];
  cword_t ox [4], oy [4], oz [4];
  logic [15:0] otag [4];

  cordic #(.MODE(CIRC_ROT), .TAG_W(16)) u_cr (.clk, .rst_n, .in_valid(iv), .in_x(ix[0]), .in_y(iy[0]), .in_z(iz[0]),
    .in_tag(itag), .out_valid(ov[0]), .out_x(ox[0]), .out_y(oy[0]), .out_z(oz[0]), .out_tag(otag[0]));
  cordic #(.MODE(CIRC_VEC), .TAG_W(16)) u_cv (.clk, .rst_n, .in_valid(iv), .in_x(ix[1]), .in_y(iy[1]), .in_z(iz[1]),
    .in_tag(itag), .out_valid(ov[1]), .out_x(ox[1]), .out_y(oy[1]), .out_z(oz[1]), .out_tag(otag[1]));
  cordic #(.MODE(HYP_ROT), .TAG_W(16)) u_hr (.clk, .rst_n, .in_valid(iv), .in_x(ix[2]), .in_y(iy[2]), .in_z(iz[2]),
    .in_tag(itag), .out_valid(ov[2]), .out_x(ox[2]), .out_y(oy[2]), .out_z(oz[2]), .out_tag(otag[2]));
  cordic #(.MODE(HYP_VEC), .TAG_W(16)) u_hv (.clk, .rst_n, .in_valid(iv), .in_x(ix[3]), .in_y(iy[3]), .in_z(iz[3]),
    .in_tag(itag), .out_valid(ov[3]), .out_x(ox[3]), .out_y(oy[3]), .out_z(oz[3]), .out_tag(otag[3]));

  real  ea [4][$];
  real  eb [4][$];
  int   et [4][$];
  int   first_in, first_out;

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * ($urandom() / 4294967296.0);
  endfunction

  function automatic real atanh_r(real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Drive
  initial begin
    real a, x, y;
    iv = 1'b0; itag = '0;
    for (int m = 0; m < 4; m++) begin ix[m] = '0; iy[m] = '0; iz[m] = '0; end
    first_in = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      // circular rotation
      a = rnd(-1.5707, 1.5707);
      ix[0] <= INV_KC; iy[0] <= '0; iz[0] <= cword_t'($rtoi(a * SC));
      ea[0].push_back($cos(a)); eb[0].push_back($sin(a));
      // circular vectoring
      x = rnd(0.1, 2.0); y = rnd(-2.0, 2.0);
      ix[1] <= cword_t'($rtoi(x * SC)); iy[1] <= cword_t'($rtoi(y * SC)); iz[1] <= '0;
      ea[1].push_back($atan(y / x)); eb[1].push_back(0.0);
      // hyperbolic rotation
      a = rnd(-1.1, 1.1);
      ix[2] <= INV_KH; iy[2] <= '0; iz[2] <= cword_t'($rtoi(a * SC));
      ea[2].push_back($cosh(a)); eb[2].push_back($sinh(a));
      // hyperbolic vectoring, ln(m) = 2 atanh((m-1)/(m+1))
      x = rnd(0.5, 1.0);
      ix[3] <= cword_t'($rtoi((x + 1.0) * SC)); iy[3] <= cword_t'($rtoi((x - 1.0) * SC)); iz[3] <= '0;
      ea[3].push_back($ln(x) / 2.0); eb[3].push_back(0.0);
      for (int m = 0; m < 4; m++) et[m].push_back(n);
      itag <= 16'(n);
      iv <= 1'b1;
      if (first_in < 0) first_in = cyc + 1;  // sampled at the next edge
      @(posedge clk);
    end
    iv <= 1'b0;
    repeat (CORDIC_STEPS + 5) @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (ea[m].size() != 0) begin failures++; $display("mode %0d: %0d results missing", m, ea[m].size()); end
    end
    checks++;
    if (first_out - first_in != CORDIC_STEPS) begin
      failures++; $display("latency %0d, expected %0d", first_out - first_in, CORDIC_STEPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check
  initial first_out = -1;
  always @(posedge clk) begin
    for (int m = 0; m < 4; m++) begin
      if (rst_n && ov[m]) begin
        real ga, gb, xa, xb;
        int  t;
        if (m == 0 && first_out < 0) first_out = cyc;
        xa = ea[m].pop_front(); xb = eb[m].pop_front(); t = et[m].pop_front();
        if (m == 0 || m == 2) begin ga = ox[m] / SC; gb = oy[m] / SC; end
        else                  begin ga = oz[m] / SC; gb = 0.0;       end
        checks++;
        if ((ga - xa) > TOL || (xa - ga) > TOL || (gb - xb) > TOL || (xb - gb) > TOL ||
            otag[m] != 16'(t)) begin
          failures++;
          if (failures < 10) $display("mode %0d sample %0d: got %f %f tag %0d, expected %f %f", m, t, ga, gb, otag[m], xa, xb);
        end
      end
    end
  end
endmodule
