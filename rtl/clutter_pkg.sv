// clutter_pkg: number formats, shared types and constants of the lognormal
// clutter generator.
//
// Every stage of the generator works in two's complement fixed point. The
// formats below are this design's choice; the source design only states that
// the uniform word is 32 bits and that each Gaussian sample is 16 bits.
//
//   Gaussian sample (box_muller out, zmnl in)  16 bit signed, 12 fraction bits
//   Spectral data (fft, spectral_filter)       24 bit signed, 20 fraction bits
//   Filter spectrum H(k)                        16 bit signed, 12 fraction bits
//   CORDIC datapath (x, y, z)                   32 bit signed, 28 fraction bits
//   Clutter output                              32 bit signed, 16 fraction bits
//
// The CORDIC angle tables hold atan(2^-i) and atanh(2^-i) scaled by 2^28 and
// rounded to the nearest integer.
package clutter_pkg;

  // Gaussian samples: 3 integer bits cover the +/-4.71 reach of a
  // Box-Muller transform fed by 16-bit uniforms.
  localparam int GW = 16;
  localparam int GF = 12;
  typedef logic signed [GW-1:0] gauss_t;

  // FFT / IFFT data path.
  localparam int DW = 24;
  localparam int DF = 20;
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Filter spectrum coefficients.
  localparam int HW = 16;
  localparam int HF = 12;
  typedef struct packed {
    logic signed [HW-1:0] re;
    logic signed [HW-1:0] im;
  } coef_t;

  // CORDIC datapath.
  localparam int CW = 32;
  localparam int CF = 28;
  typedef logic signed [CW-1:0] cword_t;

  // CORDIC operating modes.
  typedef enum logic [1:0] {
    CIRC_ROT = 2'd0,  // rotate (x,y) by z            -> cos/sin
    CIRC_VEC = 2'd1,  // rotate (x,y) onto the x axis -> atan(y/x)
    HYP_ROT  = 2'd2,  // hyperbolic rotation          -> cosh/sinh, exp
    HYP_VEC  = 2'd3   // hyperbolic vectoring         -> atanh(y/x), ln
  } cordic_mode_e;

  // Number of micro-rotations of every CORDIC instance (hyperbolic mode
  // repeats the shifts 4 and 13, so 30 steps reach shift 28).
  localparam int CORDIC_STEPS = 30;

  // Clocks from a box_muller request to its two Gaussian samples.
  localparam int BM_LATENCY = CORDIC_STEPS + 4;

  // Clocks from a zmnl input to its clutter sample.
  localparam int ZMNL_LATENCY = CORDIC_STEPS + 3;

  // Constants in the CORDIC format (value * 2^28).
  localparam cword_t INV_KC   = 32'sd163008219;  // 1 / prod sqrt(1 + 2^-2i)
  localparam cword_t INV_KH   = 32'sd324135026;  // 1 / prod sqrt(1 - 2^-2i), 30 steps
  localparam cword_t LN2      = 32'sd186065279;  // ln 2
  localparam cword_t INV_LN2  = 32'sd387270501;  // 1 / ln 2
  localparam cword_t TWO_PI   = 32'sd1686629713; // 2 pi

  function automatic cword_t atan_tab(input int i);
    cword_t t [32] = '{
      32'sd210828714, 32'sd124459457, 32'sd65760959, 32'sd33381290,
      32'sd16755422, 32'sd8385879, 32'sd4193963, 32'sd2097109,
      32'sd1048571, 32'sd524287, 32'sd262144, 32'sd131072,
      32'sd65536, 32'sd32768, 32'sd16384, 32'sd8192,
      32'sd4096, 32'sd2048, 32'sd1024, 32'sd512,
      32'sd256, 32'sd128, 32'sd64, 32'sd32,
      32'sd16, 32'sd8, 32'sd4, 32'sd2,
      32'sd1, 32'sd0, 32'sd0, 32'sd0};
    return t[i[4:0]];
  endfunction

  function automatic cword_t atanh_tab(input int i);
    cword_t t [32] = '{
      32'sd0, 32'sd147453245, 32'sd68561855, 32'sd33730852,
      32'sd16799113, 32'sd8391340, 32'sd4194645, 32'sd2097195,
      32'sd1048581, 32'sd524289, 32'sd262144, 32'sd131072,
      32'sd65536, 32'sd32768, 32'sd16384, 32'sd8192,
      32'sd4096, 32'sd2048, 32'sd1024, 32'sd512,
      32'sd256, 32'sd128, 32'sd64, 32'sd32,
      32'sd16, 32'sd8, 32'sd4, 32'sd2,
      32'sd1, 32'sd0, 32'sd0, 32'sd0};
    return t[i[4:0]];
  endfunction

  // Shift applied in CORDIC step `step` (0-based). Circular mode uses
  // 0,1,2,...; hyperbolic mode starts at 1 and repeats 4 and 13 so that the
  // iteration converges.
  function automatic int cordic_shift(input bit hyperbolic, input int step);
    int s;
    if (!hyperbolic) return step;
    s = step + 1;
    if (step >= 4) s = s - 1;
    if (step >= 14) s = s - 1;
    return s;
  endfunction

endpackage
