// spectral_filter: filter spectrum memory and spectrum multiplier
// (stages 4 and 5 of the clutter generator).
//
// The clutter correlation is set by the filter spectrum H(k): each bin X(k)
// of the transformed white noise frame is multiplied by H(k) before the
// inverse transform, Y(k) = X(k) * H(k). The source design shows this stage
// as a filter block feeding a multiplier between the FFT and the IFFT and
// designs H offline; here H(k) sits in an N-entry coefficient memory that the
// host writes through coef_we / coef_addr / coef_data. The memory is not
// cleared by reset: the host loads it before starting.
//
// Stream interface: bins enter in natural order 0..N-1 on in_valid/in_ready
// (the bin number is counted internally and wraps after N) and leave on
// out_valid/out_ready through one register stage, so the latency is one
// clock and one bin can pass per clock. The complex product is rounded from
// 12 coefficient fraction bits and saturated to the 24-bit data format.
module spectral_filter
  import clutter_pkg::*;
#(
  parameter int N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient memory write port
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  coef_t                coef_data,
  // spectrum in
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t                in_data,
  // filtered spectrum out
  output logic                 out_valid,
  input  logic                 out_ready,
  output cplx_t                out_data
);

  localparam int LOGN = $clog2(N);
  localparam int PW   = DW + HW + 1;

  coef_t           coef_mem [N];
  logic [LOGN-1:0] bin;
  coef_t           h;
  logic signed [PW-1:0] pr, pi;
  cplx_t           prod;

  always_ff @(posedge clk) begin
    if (coef_we) coef_mem[coef_addr] <= coef_data;
  end

  function automatic logic signed [DW-1:0] round_sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(1 <<< (HF - 1))) >>> HF;
    if (r > PW'((1 <<< (DW - 1)) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (r < -PW'(1 <<< (DW - 1)))      return {1'b1, {(DW-1){1'b0}}};
    return r[DW-1:0];
  endfunction

  always_comb begin
    h    = coef_mem[bin];
    pr   = PW'(in_data.re) * PW'(h.re) - PW'(in_data.im) * PW'(h.im);
    pi   = PW'(in_data.re) * PW'(h.im) + PW'(in_data.im) * PW'(h.re);
    prod = '{re: round_sat(pr), im: round_sat(pi)};
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bin       <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) bin <= (bin == LOGN'(N - 1)) ? '0 : bin + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) out_data <= prod;
  end

endmodule
