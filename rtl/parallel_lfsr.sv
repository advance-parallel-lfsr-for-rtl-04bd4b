// parallel_lfsr -- N-bit LFSR with the two-tap feedback polynomial
// F(X) = 1 + X^TAP + X^N (TAP = N/2 by default), all N bits read in parallel.
//
// How it works: flip-flops FF1..FFN are state[0]..state[N-1]. On every rising
// clock edge each bit moves one place from the LSB towards the MSB
// (FF(i+1) <= FF(i)), and the LSB flip-flop FF1 takes FF(TAP) XOR FF(N). A
// single XOR gate is permanently wired to the two tap flip-flops; the taps
// never move. Numbering the bits by where they sat at some starting clock,
// the bits written into FF1 over the next N clocks are (N,TAP),
// (N-1,TAP-1), ..., the later ones reusing bits already fed back, and each
// moves up one place per clock: a fully new N-bit word every N clocks, a
// shifted one every clock.
//
// For odd N the feedback may use either floor(N/2) or ceil(N/2); TAP defaults
// to the floor and can be overridden.
//
// Interface: reset (synchronous, active high) clears the register; load_i
// (synchronous) copies seed_i into it, bit i into FF(i+1). Reset wins over
// load, load over shifting. state_o is the register itself, so a change is
// visible right after the clock edge that makes it.
//
// Follows the reference design: the polynomial, the shift direction, the
// single fixed XOR and the parallel seed load. This implementation's own
// choices: the reset value (all zeros, which is the LFSR's stuck state, so a
// non-zero seed has to be loaded before use) and the reset/load priority.
module parallel_lfsr #(
  parameter int unsigned N   = advance_lfsr_pkg::PRNG_WIDTH,
  parameter int unsigned TAP = N / 2
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load_i,
  input  logic [N-1:0] seed_i,
  output logic [N-1:0] state_o
);

  initial begin
    assert (N >= 2) else $error("parallel_lfsr: N must be at least 2");
    assert (TAP >= 1 && TAP < N) else $error("parallel_lfsr: TAP must lie in 1..N-1");
  end

  logic [N-1:0] state_q;
  logic         feedback;

  // The one XOR gate of the design: FF(TAP) ^ FF(N).
  assign feedback = state_q[TAP-1] ^ state_q[N-1];

  always_ff @(posedge clk) begin
    if (reset)       state_q <= '0;
    else if (load_i) state_q <= seed_i;
    else             state_q <= {state_q[N-2:0], feedback};
  end

  assign state_o = state_q;

endmodule
