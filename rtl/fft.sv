// fft: N-point radix-2 FFT / IFFT with a frame memory (stages 3 and 5).
//
// The clutter generator colours white Gaussian noise in the frequency
// domain: the noise frame is transformed, multiplied by the filter spectrum
// and transformed back. The source design names the FFT and IFFT stages but
// not their architecture; this module is the simplest complete one, used
// twice (INVERSE = 0 and 1).
//
// Operation, one frame at a time:
//  LOAD    in_ready is high; N samples are accepted on in_valid and written
//          to the frame memory at bit-reversed addresses.
//  CALC    in-place decimation-in-time butterflies, one per clock, stage by
//          stage: N/2 * log2(N) clocks. Butterfly (i0, i1 = i0 + 2^s) with
//          twiddle W = exp(-/+ j 2 pi k / N), k = (i0 mod 2^s) * N / 2^(s+1):
//              a' = a + b W,  b' = a - b W
//          With SCALE = 1 both results are halved (rounded) in every stage,
//          so the forward transform carries a 1/N factor and its words stay
//          near the input range; with SCALE = 0 the words can grow by N.
//          Either way a sum that leaves the 24-bit range saturates.
//  UNLOAD  bins 0..N-1 leave in natural order with out_valid/out_ready;
//          out_last marks bin N-1. The module then returns to LOAD.
// The twiddle table (N/2 entries of cos and sin, 16 fraction bits) is
// computed when the design is elaborated.
//
// Timing: from the clock that accepts the N-th input to the first out_valid
// is exactly N/2 * log2(N) clocks. Data are cplx_t (24-bit parts, 20
// fraction bits). N must be a power of two.
module fft
  import clutter_pkg::*;
#(
  parameter int N       = 1024,
  parameter bit INVERSE = 1'b0,
  parameter bit SCALE   = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last
);

  localparam int LOGN = $clog2(N);
  localparam int TWW  = 18;
  localparam int TWF  = 16;

  typedef logic signed [TWW-1:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  function automatic tw_tab_t gen_cos();
    tw_tab_t t;
    for (int k = 0; k < N/2; k++)
      t[k] = tw_t'($rtoi($floor($cos(6.283185307179586 * k / N) * 65536.0 + 0.5)));
    return t;
  endfunction

  function automatic tw_tab_t gen_sin();
    tw_tab_t t;
    for (int k = 0; k < N/2; k++)
      t[k] = tw_t'($rtoi($floor($sin(6.283185307179586 * k / N) * 65536.0 + 0.5)));
    return t;
  endfunction

  localparam tw_tab_t COS_TAB = gen_cos();
  localparam tw_tab_t SIN_TAB = gen_sin();

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] a);
    for (int i = 0; i < LOGN; i++) bitrev[i] = a[LOGN-1-i];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_UNLOAD} state_e;
  state_e state;

  cplx_t mem [N];

  logic [LOGN-1:0]         cnt;    // load / unload position
  logic [$clog2(LOGN)-1:0] stg;    // butterfly stage
  logic [LOGN-2:0]         bf;     // butterfly within the stage

  // ------------------------------------------------------------ butterfly
  logic [LOGN-1:0] i0, i1, half, lowmask;
  logic [LOGN-2:0] tk;
  tw_t             wr, wi;
  cplx_t           a, b;
  logic signed [DW+TWW:0] pr, pi;
  logic signed [DW+2:0]   tr, ti;
  logic signed [DW+3:0]   sr0, si0, sr1, si1;
  cplx_t           y0, y1;

  function automatic logic signed [DW-1:0] sat(input logic signed [DW+3:0] v);
    if (v > (DW+4)'((1 <<< (DW-1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (v < -(DW+4)'(1 <<< (DW-1)))       return {1'b1, {(DW-1){1'b0}}};
    return v[DW-1:0];
  endfunction

  function automatic logic signed [DW+3:0] fin(input logic signed [DW+3:0] v);
    return SCALE ? ((v + 1) >>> 1) : v;
  endfunction

  always_comb begin
    half    = LOGN'(1) << stg;
    lowmask = half - 1'b1;
    i0      = ((LOGN'(bf) & ~lowmask) << 1) | (LOGN'(bf) & lowmask);
    i1      = i0 | half;
    tk      = (LOGN-1)'((LOGN'(bf) & lowmask) << (LOGN - 1 - int'(stg)));
    wr      = COS_TAB[tk];
    wi      = INVERSE ? SIN_TAB[tk] : -SIN_TAB[tk];
    a       = mem[i0];
    b       = mem[i1];
    pr      = (DW+TWW+1)'(b.re) * (DW+TWW+1)'(wr) - (DW+TWW+1)'(b.im) * (DW+TWW+1)'(wi);
    pi      = (DW+TWW+1)'(b.re) * (DW+TWW+1)'(wi) + (DW+TWW+1)'(b.im) * (DW+TWW+1)'(wr);
    tr      = (DW+3)'((pr + (DW+TWW+1)'(1 <<< (TWF-1))) >>> TWF);
    ti      = (DW+3)'((pi + (DW+TWW+1)'(1 <<< (TWF-1))) >>> TWF);
    sr0     = (DW+4)'(a.re) + (DW+4)'(tr);
    si0     = (DW+4)'(a.im) + (DW+4)'(ti);
    sr1     = (DW+4)'(a.re) - (DW+4)'(tr);
    si1     = (DW+4)'(a.im) - (DW+4)'(ti);
    y0      = '{re: sat(fin(sr0)), im: sat(fin(si0))};
    y1      = '{re: sat(fin(sr1)), im: sat(fin(si1))};
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stg   <= '0;
      bf    <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_CALC;
            stg   <= '0;
            bf    <= '0;
          end
        end
        S_CALC: begin
          bf <= bf + 1'b1;
          if (bf == (LOGN-1)'(N/2 - 1)) begin
            stg <= stg + 1'b1;
            if (int'(stg) == LOGN - 1) begin
              state <= S_UNLOAD;
              cnt   <= '0;
            end
          end
        end
        S_UNLOAD: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem[bitrev(cnt)] <= in_data;
    end else if (state == S_CALC) begin
      mem[i0] <= y0;
      mem[i1] <= y1;
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_data  = mem[cnt];
  assign out_last  = (state == S_UNLOAD) && (cnt == LOGN'(N - 1));

endmodule
