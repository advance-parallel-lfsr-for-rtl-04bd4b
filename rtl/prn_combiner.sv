// prn_combiner -- output stage of the generator: number_o <= lfsr_i ^ count_i.
//
// How it works: an N-bit bitwise XOR of the LFSR word and the counter word,
// captured in an N-bit register so that the number leaves the generator
// straight from flip-flops.
//
// Interface and timing: number_o changes on the rising edge after lfsr_i and
// count_i, i.e. one clock of latency, and a new number every clock. reset
// (synchronous, active high) clears the register.
//
// Follows the reference design: a full-width XOR of the two words into a
// registered output. This implementation's own choices: the one-clock
// latency and the reset value 0.
module prn_combiner #(
  parameter int unsigned N = advance_lfsr_pkg::PRNG_WIDTH
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] lfsr_i,
  input  logic [N-1:0] count_i,
  output logic [N-1:0] number_o
);

  logic [N-1:0] number_q;

  always_ff @(posedge clk) begin
    if (reset) number_q <= '0;
    else       number_q <= lfsr_i ^ count_i;
  end

  assign number_o = number_q;

endmodule
