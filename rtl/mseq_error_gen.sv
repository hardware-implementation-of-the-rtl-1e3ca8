// Random error adder of the codec test system, driven by a 17-stage
// m-sequence generator.
//
// A 17-stage Fibonacci LFSR with feedback polynomial x^17 + x^14 + 1 runs
// through all 2^17 - 1 non-zero states (period 131071, about 128 k). Each
// clock it is advanced 17 steps at once, so every error decision uses 17 new
// sequence bits; since 131071 is prime the stepped sequence still visits every
// state once per period. The channel bit is inverted when the state is below
// ber_thr, which gives exactly ber_thr - 1 errors per 131071 bits, a bit
// error rate of (ber_thr - 1) / 131071 (ber_thr = 2753 gives about 2.1 %).
//
// Interface: ch_in/ch_out is the serial channel, combinational through the
// adder; adv advances the generator (pulse it with each bit that moves);
// err shows whether the present bit is being inverted. Reset loads state 1.
// The polynomial, the 17-step advance and the threshold comparison are this
// design's choices: the reference test system names only the 17-stage
// m-sequence generator.
module mseq_error_gen #(
  parameter int unsigned STAGES = 17,
  parameter int unsigned TAP    = 14    // second tap of x^STAGES + x^TAP + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv,
  input  logic [STAGES-1:0] ber_thr,
  input  logic              ch_in,
  output logic              ch_out,
  output logic              err
);

  logic [STAGES-1:0] lfsr, nxt;

  // STAGES single steps: shift left, new bit = s[STAGES-1] ^ s[TAP-1].
  always_comb begin
    nxt = lfsr;
    for (int unsigned i = 0; i < STAGES; i++)
      nxt = {nxt[STAGES-2:0], nxt[STAGES-1] ^ nxt[TAP-1]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   lfsr <= STAGES'(1);
    else if (adv) lfsr <= nxt;
  end

  assign err    = (lfsr < ber_thr);
  assign ch_out = ch_in ^ err;

endmodule
