// tb_tausworthe_prng: checks the word-parallel Tausworthe generator against
// a bit-serial model of the same feedback shift register.
//
// The model extends the bit sequence one bit at a time with
// a(n+P) = a(n+Q) xor a(n), starting from the seed (LSB = oldest bit), and
// after each clock compares the next P model bits with the generator word
// seen through its L-bit output window (two instances look at different
// windows). A second instance with P = 7, Q = 3 (x^7 + x^3 + 1, primitive)
// must return to its seed after exactly 127 steps and not earlier.
module tb_tausworthe_prng;
  localparam int P = 31, Q = 3, L = 16;
  localparam logic [P-1:0] SEED = 31'h1234_5678;
  localparam int STEPS = 400;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [L-1:0] rnd_hi, rnd_lo;
  logic [6:0]   rnd7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tausworthe_prng #(.P(P), .Q(Q), .L(L), .OFS(0),  .SEED(SEED)) dut_hi (.clk, .rst_n, .en, .rnd(rnd_hi));
  tausworthe_prng #(.P(P), .Q(Q), .L(L), .OFS(15), .SEED(SEED)) dut_lo (.clk, .rst_n, .en, .rnd(rnd_lo));
  tausworthe_prng #(.P(7), .Q(3), .L(7), .OFS(0),  .SEED(7'h5B)) dut7 (.clk, .rst_n, .en, .rnd(rnd7));

  bit seq [P*(STEPS+2)];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P-1:0] exp_w;
    int period;
    for (int i = 0; i < P; i++) seq[i] = SEED[i];
    for (int n = 0; n + P < P*(STEPS+2); n++) seq[n+P] = seq[n+Q] ^ seq[n];

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // After reset the window shows the seed.
    checks++;
    if (rnd_hi !== SEED[P-1 -: L]) begin failures++; $display("seed window mismatch"); end

    for (int k = 1; k <= STEPS; k++) begin
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      #1;
      for (int i = 0; i < P; i++) exp_w[i] = seq[k*P + i];
      checks++;
      if (rnd_hi !== exp_w[P-1 -: L] || rnd_lo !== exp_w[P-1-15 -: L]) begin
        failures++;
        if (failures < 5) $display("step %0d: got %h/%h expected %h/%h", k, rnd_hi, rnd_lo,
                                   exp_w[P-1 -: L], exp_w[P-1-15 -: L]);
      end
    end

    // Period of the 7-bit generator (already advanced STEPS times).
    period = 0;
    begin
      logic [6:0] start;
      start = rnd7;
      do begin
        en <= 1'b1;
        @(posedge clk);
        #1;
        period++;
      end while (rnd7 !== start && period < 300);
      en <= 1'b0;
    end
    checks++;
    if (period != 127) begin failures++; $display("7-bit period %0d, expected 127", period); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
