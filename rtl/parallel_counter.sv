// parallel_counter -- N-bit binary up counter, all N bits read in parallel.
//
// How it works: a modulo-2^N counter whose single cycle of states is
// 0, 1, 2, ..., 2^N-1, 0, ... . It advances on every rising clock edge; there
// is no enable, because the generator clocks the counter and the LFSR
// together from one clock. In the generator its word is XORed onto the LFSR
// word so that the combined sequence cannot repeat before the counter has
// gone through all 2^N states.
//
// Interface: reset (synchronous, active high) returns the count to 0.
// count_o is the register itself.
//
// Follows the reference design: a plain N-bit binary up counter of modulus
// 2^N. This implementation's own choice: the reset value 0.
module parallel_counter #(
  parameter int unsigned N = advance_lfsr_pkg::PRNG_WIDTH
) (
  input  logic         clk,
  input  logic         reset,
  output logic [N-1:0] count_o
);

  logic [N-1:0] count_q;

  always_ff @(posedge clk) begin
    if (reset) count_q <= '0;
    else       count_q <= count_q + N'(1);
  end

  assign count_o = count_q;

endmodule
