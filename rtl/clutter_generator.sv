// clutter_generator: correlated lognormal radar clutter generator.
//
// Produces a stream of clutter amplitudes whose logarithm is Gaussian with
// programmable mean ln(mu_c) and spread sigma_c, and whose correlation from
// sample to sample is set by a filter spectrum loaded by the host. It is the
// six-stage chain of the source design:
//   1  two 31-bit Tausworthe generators give a 32-bit uniform word per sample
//   2  Box-Muller turns it into two independent N(0,1) samples x1, x2
//   3  x1 is collected into N-sample frames and Fourier transformed
//   4  the filter spectrum H(k) is held in a coefficient memory
//   5  each bin is multiplied by H(k) and the frame is inverse transformed,
//      giving correlated Gaussian samples u
//   6  the zero-memory nonlinearity forms exp(sigma_c*u + ln mu_c) and adds
//      noise_gain * x2
// x2 waits in a FIFO while its partner x1 goes through the FFT path.
//
// Flow control: while `run` is high a frame of N uniform words is requested
// whenever the forward FFT is loading and the x2 FIFO holds at most one
// frame. The forward FFT of the next frame overlaps the IFFT and output of
// the current one; the spectrum multiplier stalls the forward FFT unload
// while the IFFT is busy. Output samples leave one per clock in bursts of N
// (`out_valid`, `out_last` on the last sample of a frame); there is no
// output back-pressure.
//
// Formats: sigma_c and noise_gain unsigned, ln_mu_c signed, all with 12
// fraction bits; coef_data is H(k) with 12 fraction bits; out_clutter and
// out_amp are signed with 16 fraction bits. out_amp is the pure lognormal
// amplitude, out_clutter adds the noise term, out_sat flags a saturated
// amplitude. The frame length N and all number formats are this design's
// choice; the stage structure follows the source design.
module clutter_generator
  import clutter_pkg::*;
#(
  parameter int          N     = 1024,
  parameter int          Q1    = 3,
  parameter int          Q2    = 6,
  parameter logic [30:0] SEED1 = 31'h2545_F491,
  parameter logic [30:0] SEED2 = 31'h1B87_3593
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic [15:0]          sigma_c,
  input  logic [15:0]          ln_mu_c,
  input  logic [15:0]          noise_gain,
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  coef_t                coef_data,
  output logic                 out_valid,
  output logic                 out_last,
  output logic signed [31:0]   out_clutter,
  output logic signed [31:0]   out_amp,
  output logic                 out_sat
);

  localparam int LOGN = $clog2(N);

  // ------------------------------------------------------- stage 1: PRNG
  logic        issue;
  logic [15:0] r1, r2;

  tausworthe_prng #(.P(31), .Q(Q1), .L(16), .SEED(SEED1)) u_prng1 (
    .clk, .rst_n, .en(issue), .rnd(r1));
  tausworthe_prng #(.P(31), .Q(Q2), .L(16), .SEED(SEED2)) u_prng2 (
    .clk, .rst_n, .en(issue), .rnd(r2));

  // --------------------------------------------------- stage 2: Gaussian
  logic   g_valid;
  gauss_t x1, x2;

  box_muller u_gauss (.clk, .rst_n, .in_valid(issue), .r1, .r2,
                      .out_valid(g_valid), .x1, .x2);

  // ----------------------------------------------------- frame requests
  logic [LOGN:0] issued, loaded;
  logic [LOGN+1:0] fifo_count;
  logic          fwd_in_ready;

  assign issue = run && fwd_in_ready && (issued < (LOGN+1)'(N)) &&
                 (issued != '0 || fifo_count <= (LOGN+2)'(N));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issued <= '0;
      loaded <= '0;
    end else if (g_valid && loaded == (LOGN+1)'(N - 1)) begin
      issued <= '0;
      loaded <= '0;
    end else begin
      if (issue)   issued <= issued + 1'b1;
      if (g_valid) loaded <= loaded + 1'b1;
    end
  end

  // ------------------------------------------- x2 waits for its partner
  gauss_t v_noise;
  logic   u_valid;

  sample_fifo #(.DEPTH(2 * N), .W(GW)) u_noise_fifo (
    .clk, .rst_n, .push(g_valid), .din(x2), .pop(u_valid), .dout(v_noise),
    .count(fifo_count));

  // -------------------------------------------------------- stage 3: FFT
  cplx_t fwd_in, fwd_out, filt_out, inv_out;
  logic  fwd_out_valid, fwd_out_ready, filt_valid, inv_in_ready;

  assign fwd_in = '{re: DW'(x1) <<< (DF - GF), im: '0};

  fft #(.N(N), .INVERSE(1'b0), .SCALE(1'b1)) u_fft (
    .clk, .rst_n, .in_valid(g_valid), .in_ready(fwd_in_ready), .in_data(fwd_in),
    .out_valid(fwd_out_valid), .out_ready(fwd_out_ready), .out_data(fwd_out), .out_last());

  // ------------------------------------- stages 4, 5: filter and multiply
  spectral_filter #(.N(N)) u_filter (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(fwd_out_valid), .in_ready(fwd_out_ready), .in_data(fwd_out),
    .out_valid(filt_valid), .out_ready(inv_in_ready), .out_data(filt_out));

  // ------------------------------------------------------- stage 5: IFFT
  fft #(.N(N), .INVERSE(1'b1), .SCALE(1'b0)) u_ifft (
    .clk, .rst_n, .in_valid(filt_valid), .in_ready(inv_in_ready), .in_data(filt_out),
    .out_valid(u_valid), .out_ready(1'b1), .out_data(inv_out), .out_last());

  // ------------------------------------------------------- stage 6: ZMNL
  gauss_t u_corr;

  always_comb begin
    logic signed [DW-1:0] t;
    t = (inv_out.re + DW'(1 <<< (DF - GF - 1))) >>> (DF - GF);
    if (t > DW'(32767))       u_corr = 16'sh7FFF;
    else if (t < -DW'(32768)) u_corr = 16'sh8000;
    else                      u_corr = t[GW-1:0];
  end

  logic z_valid;

  zmnl u_zmnl (.clk, .rst_n, .in_valid(u_valid), .u(u_corr), .v(v_noise),
               .sigma(sigma_c), .ln_mu(ln_mu_c), .noise_gain,
               .out_valid(z_valid), .amp(out_amp), .clutter(out_clutter), .sat(out_sat));

  // --------------------------------------------------------- frame marks
  logic [LOGN-1:0] ocnt;

  always_ff @(posedge clk) begin
    if (!rst_n)       ocnt <= '0;
    else if (z_valid) ocnt <= ocnt + 1'b1;
  end

  assign out_valid = z_valid;
  assign out_last  = z_valid && (ocnt == LOGN'(N - 1));

endmodule
