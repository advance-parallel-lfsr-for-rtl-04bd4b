// advance_lfsr -- advance parallel LFSR pseudo-random number generator.
//
// How it works: an N-bit parallel LFSR (feedback polynomial
// 1 + X^TAP + X^N, TAP = N/2) and an N-bit binary up counter run from the
// same clock. Every clock, the whole LFSR word and the whole counter word are
// XORed and the result is registered as number_o. The LFSR alone repeats
// after its own period; adding the counter makes the output sequence's period
// a multiple of 2^N. At N = 32 the design holds 96 flip-flops: 32 in the
// LFSR, 32 in the counter and 32 in the output register, plus one 1-bit XOR
// (LFSR feedback) and one 32-bit XOR (output).
//
// Interface: clk; reset, synchronous and active high, clears the LFSR, the
// counter and number_o; loadseed_i, synchronous, copies seed_i into the LFSR
// (the counter keeps running); number_o, the pseudo-random word.
//
// Timing: one number per clock. number_o at edge k+1 is LFSR ^ counter as
// they stood after edge k, so the first number made from a seed loaded at
// edge k appears after edge k+1.
//
// Follows the reference design: the ports, the LFSR/counter/XOR structure,
// the full-width select of both words and the register budget. This
// implementation's own choices: the reset values, that a seed load leaves
// the counter alone, and the one-clock output latency.
module advance_lfsr #(
  parameter int unsigned N   = advance_lfsr_pkg::PRNG_WIDTH,
  parameter int unsigned TAP = N / 2
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         loadseed_i,
  input  logic [N-1:0] seed_i,
  output logic [N-1:0] number_o
);

  logic [N-1:0] lfsr_word;
  logic [N-1:0] count_word;

  parallel_lfsr #(.N(N), .TAP(TAP)) u_lfsr (
    .clk     (clk),
    .reset   (reset),
    .load_i  (loadseed_i),
    .seed_i  (seed_i),
    .state_o (lfsr_word)
  );

  parallel_counter #(.N(N)) u_counter (
    .clk     (clk),
    .reset   (reset),
    .count_o (count_word)
  );

  // Both "N bit select" stages pass the full N-bit words to the XOR.
  prn_combiner #(.N(N)) u_combiner (
    .clk      (clk),
    .reset    (reset),
    .lfsr_i   (lfsr_word),
    .count_i  (count_word),
    .number_o (number_o)
  );

endmodule
