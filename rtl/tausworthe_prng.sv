// tausworthe_prng: word-parallel Tausworthe pseudo-random generator.
//
// The generator produces the bit sequence of a P-bit feedback shift register
// with primitive trinomial x^P + x^Q + 1, i.e. a(n+P) = a(n+Q) xor a(n), but
// computes P new bits per clock instead of one. The P-bit state word holds P
// consecutive bits of the sequence, oldest bit in the LSB. One step is
//     B = A xor (A >> Q)            (right shift by Q, xor)
//     A' = B xor (B << (P-Q))       (left shift by P-Q, xor, keep P bits)
// which is exact when 0 < Q < P/2. With P = 31 (2^31-1 is prime) the word
// sequence has the full period 2^31-1.
//
// The shift/xor/shift/xor structure and the L <= P output window follow the
// source design's "improved Tausworthe" architecture, and the 31-bit state
// width follows its simulation waveform. Q, the seed and the position of the
// output window are this design's choice.
//
// Interface: `en` advances the state by one P-bit block per clock. `rnd`
// shows L bits of the current state, taken starting OFS bits below the MSB
// it is registered and changes one clock after a cycle with `en` high.
// Synchronous active-low reset loads SEED (must be nonzero).
module tausworthe_prng #(
  parameter int          P    = 31,
  parameter int          Q    = 3,
  parameter int          L    = 16,
  parameter int          OFS  = 0,
  parameter logic [P-1:0] SEED = P'(31'h2545_F491)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [L-1:0] rnd
);

  logic [P-1:0] state;
  logic [P-1:0] b;
  logic [P-1:0] nxt;

  always_comb begin
    b   = state ^ (state >> Q);
    nxt = b ^ (b << (P - Q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= nxt;
  end

  assign rnd = state[P-1-OFS -: L];

  initial begin
    assert (Q > 0 && 2 * Q < P) else $error("tausworthe_prng: need 0 < Q < P/2");
    assert (L + OFS <= P) else $error("tausworthe_prng: output window exceeds state");
  end

endmodule
