// cordic: pipelined CORDIC engine in circular or hyperbolic, rotation or
// vectoring mode.
//
// The generator needs four transcendental functions: ln and sin/cos for the
// Box-Muller transform and exp for the zero-memory nonlinearity. All of them
// come from this one shift-and-add engine, as in the source design, which
// computes them with a CORDIC core. Each of the STEPS micro-rotations is one
// pipeline stage:
//   circular:    x' = x - d*(y>>s),  y' = y + d*(x>>s),  z' = z - d*atan(2^-s)
//   hyperbolic:  x' = x + d*(y>>s),  y' = y + d*(x>>s),  z' = z - d*atanh(2^-s)
// with d = sign(z) in rotation mode and d = -sign(y) in vectoring mode.
// Hyperbolic mode uses the shifts 1,2,3,4,4,5,...,13,13,14,... for
// convergence. Results carry the CORDIC gain (1.6468 circular, 0.8282
// hyperbolic for 30 steps); callers pre-scale x by the inverse gain.
//
//   CIRC_ROT: x0=1/Kc, y0=0, z0=a (|a| <= pi/2)  -> x=cos a, y=sin a
//   HYP_ROT:  x0=1/Kh, y0=0, z0=a (|a| <= 1.11)  -> x=cosh a, y=sinh a
//   HYP_VEC:  z = z0 + atanh(y0/x0)              (|y0/x0| <= 0.80)
//   CIRC_VEC: z = z0 + atan(y0/x0)               (x0 > 0)
//
// Interface: x, y, z are in the shared 32-bit format with 28 fraction bits.
// A sample presented with in_valid appears at the outputs with out_valid
// exactly STEPS clocks later; one sample can enter every clock. `in_tag`
// (TAG_W bits) travels alongside unchanged so that callers can carry side
// information through the pipeline. There is no back-pressure. The pipeline
// structure, step count and number formats are this design's choice.
module cordic
  import clutter_pkg::*;
#(
  parameter cordic_mode_e MODE  = CIRC_ROT,
  parameter int           STEPS = CORDIC_STEPS,
  parameter int           TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cword_t           in_x,
  input  cword_t           in_y,
  input  cword_t           in_z,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output cword_t           out_x,
  output cword_t           out_y,
  output cword_t           out_z,
  output logic [TAG_W-1:0] out_tag
);

  localparam bit HYP = (MODE == HYP_ROT) || (MODE == HYP_VEC);
  localparam bit VEC = (MODE == CIRC_VEC) || (MODE == HYP_VEC);

  // Pipeline registers: index i holds the state entering step i.
  cword_t           px [STEPS+1];
  cword_t           py [STEPS+1];
  cword_t           pz [STEPS+1];
  logic [TAG_W-1:0] pt [STEPS+1];
  logic             pv [STEPS+1];

  always_comb begin
    px[0] = in_x;
    py[0] = in_y;
    pz[0] = in_z;
    pt[0] = in_tag;
    pv[0] = in_valid;
  end

  for (genvar i = 0; i < STEPS; i++) begin : g_step
    localparam int     SH  = cordic_shift(HYP, i);
    localparam cword_t ANG = HYP ? atanh_tab(SH) : atan_tab(SH);

    logic   pos;      // d = +1
    cword_t xs, ys;
    cword_t nx, ny, nz;

    always_comb begin
      pos = VEC ? py[i][CW-1] : !pz[i][CW-1];
      xs  = px[i] >>> SH;
      ys  = py[i] >>> SH;
      if (HYP) nx = pos ? px[i] + ys : px[i] - ys;
      else     nx = pos ? px[i] - ys : px[i] + ys;
      ny = pos ? py[i] + xs : py[i] - xs;
      nz = pos ? pz[i] - ANG : pz[i] + ANG;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) pv[i+1] <= 1'b0;
      else        pv[i+1] <= pv[i];
      px[i+1] <= nx;
      py[i+1] <= ny;
      pz[i+1] <= nz;
      pt[i+1] <= pt[i];
    end
  end

  assign out_valid = pv[STEPS];
  assign out_x     = px[STEPS];
  assign out_y     = py[STEPS];
  assign out_z     = pz[STEPS];
  assign out_tag   = pt[STEPS];

endmodule
