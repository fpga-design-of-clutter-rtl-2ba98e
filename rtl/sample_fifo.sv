// sample_fifo: synchronous first-word-fall-through FIFO.
//
// Holds the second Gaussian stream of the clutter generator while the first
// stream travels through the FFT, filter and IFFT, so that both reach the
// amplitude transform together. DEPTH words of W bits in a circular buffer;
// `dout` shows the oldest word whenever `count` is nonzero, `pop` removes it
// and `push` appends `din`, both in the same clock if needed. Pushing into a
// full FIFO or popping an empty one is a usage error flagged by assertions.
// This buffer is this design's addition: the source design draws the second
// Gaussian stream as a direct wire to the amplitude transform.
module sample_fifo #(
  parameter int DEPTH = 2048,
  parameter int W     = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [W-1:0]           din,
  input  logic                   pop,
  output logic [W-1:0]           dout,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  assign dout = mem[rp];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push && !pop |-> count < ($clog2(DEPTH)+1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> count != '0);

endmodule
