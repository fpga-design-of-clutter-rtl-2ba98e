// box_muller: Gaussian noise generator (stage 2 of the clutter generator).
//
// Turns a 32-bit uniform word, split into two 16-bit uniforms r1 and r2, into
// two independent zero-mean, unit-variance Gaussian samples with the
// Box-Muller transform, as the source design prescribes:
//     x1 = sqrt(-2 ln u1) * cos(2 pi u2)
//     x2 = sqrt(-2 ln u1) * sin(2 pi u2)
// The uniforms are u1 = (r1 + 1) / 2^16, which lies in (0, 1] so that the
// logarithm stays finite, and u2 = r2 / 2^16.
//
// How it works (the arithmetic is this design's own; the source design uses
// a vendor CORDIC core without giving its configuration):
//  * ln u1: u1 is normalised to m * 2^E with m in [0.5, 1) by a leading-one
//    search; ln m = 2 atanh((m-1)/(m+1)) comes from a hyperbolic vectoring
//    CORDIC, and ln u1 = ln m + E ln 2.
//  * cos/sin: the top two bits of r2 select the quadrant, the other 14 bits
//    give an angle in [0, pi/2) for a circular rotation CORDIC; the quadrant
//    then swaps and negates the pair.
//  * sqrt: exact digit-by-digit integer square root of -2 ln u1.
//  * a final multiply and round gives the 16-bit samples (12 fraction bits).
//
// Interface: one request (in_valid with r1, r2) per clock may enter; the two
// samples leave with out_valid exactly BM_LATENCY = 34 clocks later. There is no
// back-pressure: the caller issues only as many requests as it can absorb.
module box_muller
  import clutter_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] r1,
  input  logic [15:0] r2,
  output logic        out_valid,
  output gauss_t      x1,
  output gauss_t      x2
);

  // ---------------------------------------------------------------- stage A
  // Normalise u1, form the CORDIC operands.
  logic [16:0]       v;
  int                lead;
  logic signed [5:0] expo;
  cword_t            m28;
  logic [63:0]       phi_full;

  always_comb begin
    v    = {1'b0, r1} + 17'd1;
    lead = 0;
    for (int i = 0; i < 17; i++) if (v[i]) lead = i;
    expo = 6'(lead + 1 - 16);
    m28  = cword_t'({15'd0, v} << (28 - (lead + 1)));
    phi_full = 64'(r2[13:0]) * 64'(TWO_PI);
  end

  logic              a_valid;
  cword_t            a_lnx, a_lny, a_phi;
  logic signed [5:0] a_expo;
  logic [1:0]        a_quad;

  always_ff @(posedge clk) begin
    if (!rst_n) a_valid <= 1'b0;
    else        a_valid <= in_valid;
    a_lnx  <= m28 + (cword_t'(1) <<< CF);
    a_lny  <= m28 - (cword_t'(1) <<< CF);
    a_phi  <= cword_t'(phi_full >> 16);
    a_expo <= expo;
    a_quad <= r2[15:14];
  end

  // ---------------------------------------------------------- CORDIC cores
  logic              ln_valid, sc_valid;
  cword_t            ln_z, sc_x, sc_y;
  logic [5:0]        ln_tag;
  logic [1:0]        sc_tag;

  cordic #(.MODE(HYP_VEC), .TAG_W(6)) u_ln (
    .clk, .rst_n, .in_valid(a_valid), .in_x(a_lnx), .in_y(a_lny), .in_z('0),
    .in_tag(a_expo), .out_valid(ln_valid), .out_x(), .out_y(), .out_z(ln_z), .out_tag(ln_tag));

  cordic #(.MODE(CIRC_ROT), .TAG_W(2)) u_sc (
    .clk, .rst_n, .in_valid(a_valid), .in_x(INV_KC), .in_y('0), .in_z(a_phi),
    .in_tag(a_quad), .out_valid(sc_valid), .out_x(sc_x), .out_y(sc_y), .out_z(), .out_tag(sc_tag));

  // ---------------------------------------------------------------- stage B
  // s = -2 ln u1 = -4 z - 2 E ln2 (28 fraction bits); quadrant fold.
  logic signed [39:0] s_calc;
  cword_t             cq, sq;

  always_comb begin
    s_calc = -(40'(ln_z) <<< 2) - 40'(signed'(ln_tag)) * 40'(LN2) * 40'sd2;
    unique case (sc_tag)
      2'd0: begin cq =  sc_x; sq =  sc_y; end
      2'd1: begin cq = -sc_y; sq =  sc_x; end
      2'd2: begin cq = -sc_x; sq = -sc_y; end
      default: begin cq = sc_y; sq = -sc_x; end
    endcase
  end

  logic        b_valid;
  logic [35:0] b_s;
  cword_t      b_c, b_sn;

  always_ff @(posedge clk) begin
    if (!rst_n) b_valid <= 1'b0;
    else        b_valid <= ln_valid && sc_valid;
    b_s  <= s_calc[39] ? '0 : s_calc[35:0];
    b_c  <= cq;
    b_sn <= sq;
  end

  // ---------------------------------------------------------------- stage C
  // Integer square root: sqrt(s * 2^28) = sqrt(s) * 2^14.
  function automatic logic [17:0] isqrt36(input logic [35:0] a);
    logic [37:0] rem;
    logic [17:0] root;
    logic [37:0] trial;
    rem  = '0;
    root = '0;
    for (int i = 17; i >= 0; i--) begin
      rem   = {rem[35:0], a[2*i+1 -: 2]};
      trial = {18'd0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[16:0], 1'b1};
      end else begin
        root = {root[16:0], 1'b0};
      end
    end
    return root;
  endfunction

  logic        c_valid;
  logic [17:0] c_r;
  cword_t      c_c, c_sn;

  always_ff @(posedge clk) begin
    if (!rst_n) c_valid <= 1'b0;
    else        c_valid <= b_valid;
    c_r  <= isqrt36(b_s);
    c_c  <= b_c;
    c_sn <= b_sn;
  end

  // ---------------------------------------------------------------- stage D
  // r (14 fraction bits) * cos (28 fraction bits) -> 12 fraction bits.
  function automatic gauss_t to_gauss(input logic [17:0] r, input cword_t c);
    logic signed [51:0] p;
    logic signed [51:0] q;
    p = 52'(signed'({1'b0, r})) * 52'(c);
    q = (p + 52'sd536870912) >>> 30;
    if (q > 52'sd32767)       return gauss_t'(16'sh7FFF);
    else if (q < -52'sd32768) return gauss_t'(16'sh8000);
    else                      return gauss_t'(q[15:0]);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c_valid;
    x1 <= to_gauss(c_r, c_c);
    x2 <= to_gauss(c_r, c_sn);
  end

endmodule
