// zmnl: zero-memory nonlinear amplitude transform (stage 6).
//
// Maps a correlated Gaussian sample u ~ N(0,1) to a lognormal clutter
// amplitude, following the scheme of the source design:
//     w = sigma_c * u + ln(mu_c),    z = exp(w)
// so that ln z ~ N(ln mu_c, sigma_c^2) and E[z] = mu_c * exp(sigma_c^2 / 2).
// The output also adds a second, independent Gaussian sample v scaled by
// noise_gain, out = z + noise_gain * v. The source design feeds a second
// Gaussian stream into this stage and speaks of adding other interference;
// treating v as additive receiver noise is this design's reading.
//
// exp is computed with range reduction and a hyperbolic CORDIC:
//   k = round(w / ln 2), r = w - k ln 2 (|r| <= 0.35),
//   e^r = cosh r + sinh r (CORDIC), z = e^r * 2^k (shift).
// w is clamped to [-24, 24]; z saturates at 2^15 - 2^-16 and underflows to 0.
//
// Formats: u, v 16-bit signed with 12 fraction bits; sigma_c and noise_gain
// 16-bit unsigned with 12 fraction bits; ln_mu 16-bit signed with 12
// fraction bits; amp (z) and clutter (z + gain*v) 32-bit signed with 16
// fraction bits. One sample per clock, fixed latency ZMNL_LATENCY = 33
// clocks, no back-pressure.
module zmnl
  import clutter_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  gauss_t      u,
  input  gauss_t      v,
  input  logic [15:0] sigma,
  input  logic [15:0] ln_mu,
  input  logic [15:0] noise_gain,
  output logic        out_valid,
  output logic signed [31:0] amp,
  output logic signed [31:0] clutter,
  output logic        sat
);

  localparam logic signed [39:0] WMAX = 40'sd24 <<< 24;

  // ---------------------------------------------------------------- stage 1
  logic signed [39:0] w_full;
  logic signed [39:0] n_full;
  logic signed [31:0] w_cl;

  always_comb begin
    w_full = 40'(signed'({1'b0, sigma})) * 40'(u) + (40'(signed'(ln_mu)) <<< 12);
    n_full = 40'(signed'({1'b0, noise_gain})) * 40'(v);
    if (w_full > WMAX)       w_cl = 32'(WMAX);
    else if (w_full < -WMAX) w_cl = 32'(-WMAX);
    else                     w_cl = w_full[31:0];
  end

  logic               s1_valid;
  logic signed [31:0] s1_w;     // 24 fraction bits
  logic signed [31:0] s1_n;     // 16 fraction bits

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
    s1_w <= w_cl;
    s1_n <= 32'(n_full >>> 8);
  end

  // ---------------------------------------------------------------- stage 2
  logic signed [63:0] kp;
  logic signed [6:0]  k;
  cword_t             r;

  always_comb begin
    kp = 64'(s1_w) * 64'(INV_LN2);                 // 52 fraction bits
    k  = 7'((kp + (64'sd1 <<< 51)) >>> 52);
    r  = cword_t'((64'(s1_w) <<< 4) - 64'(k) * 64'(LN2));
  end

  logic               s2_valid;
  logic signed [6:0]  s2_k;
  cword_t             s2_r;
  logic signed [31:0] s2_n;

  always_ff @(posedge clk) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
    s2_k <= k;
    s2_r <= r;
    s2_n <= s1_n;
  end

  // ---------------------------------------------------------------- CORDIC
  logic        c_valid;
  cword_t      c_x, c_y;
  logic [38:0] c_tag;

  cordic #(.MODE(HYP_ROT), .TAG_W(39)) u_exp (
    .clk, .rst_n, .in_valid(s2_valid), .in_x(INV_KH), .in_y('0), .in_z(s2_r),
    .in_tag({s2_k, s2_n}), .out_valid(c_valid), .out_x(c_x), .out_y(c_y), .out_z(),
    .out_tag(c_tag));

  // ---------------------------------------------------------------- stage 3
  logic signed [6:0]  ck;
  logic signed [31:0] cn;
  logic signed [63:0] e, z;
  logic signed [63:0] tot;
  logic               zsat;
  int                 sh;

  localparam logic signed [63:0] MAXV = 64'sd2147483647;
  localparam logic signed [63:0] MINV = -64'sd2147483648;

  always_comb begin
    ck   = signed'(c_tag[38:32]);
    cn   = signed'(c_tag[31:0]);
    e    = 64'(c_x) + 64'(c_y);          // e^r, 28 fraction bits
    sh   = int'(ck) - 12;                // to 16 fraction bits, times 2^k
    if (sh >= 0) z = e <<< sh;
    else         z = e >>> (-sh);
    zsat = (z > MAXV);
    if (zsat) z = MAXV;
    tot  = z + 64'(cn);
    if (tot > MAXV)      tot = MAXV;
    else if (tot < MINV) tot = MINV;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c_valid;
    amp     <= z[31:0];
    clutter <= tot[31:0];
    sat     <= zsat;
  end

endmodule
