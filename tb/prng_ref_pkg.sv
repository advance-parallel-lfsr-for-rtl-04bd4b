// prng_ref_pkg -- cycle-level reference model of the advance parallel LFSR
// generator, for the testbenches.
//
// prng_ref models the three registers of the generator at the rising clock
// edge: on reset all three clear; otherwise the output register takes the
// old LFSR word XOR the old counter word, the LFSR either loads the seed or
// shifts one place towards the MSB with bit 0 = bit(TAP-1) ^ bit(N-1), and
// the counter adds one modulo 2^N. It is written with plain integer
// arithmetic on a 64-bit word, independently of the RTL, and also counts
// the events the testbenches must see (loads, resets, counter wraps,
// feedback bits of value 1).
package prng_ref_pkg;

  class prng_ref;
    int unsigned     n;
    int unsigned     tap;
    longint unsigned mask;
    longint unsigned lfsr;
    longint unsigned count;
    longint unsigned number;
    int              n_resets;
    int              n_loads;
    int              n_wraps;
    int              n_feedback_ones;

    function new(int unsigned n, int unsigned tap);
      this.n    = n;
      this.tap  = tap;
      this.mask = (n >= 64) ? '1 : ((64'd1 << n) - 1);
      lfsr = 0; count = 0; number = 0;
      n_resets = 0; n_loads = 0; n_wraps = 0; n_feedback_ones = 0;
    endfunction

    // One rising clock edge with the given inputs.
    function void clock(bit reset, bit load, longint unsigned seed);
      longint unsigned fb;
      if (reset) begin
        lfsr = 0; count = 0; number = 0;
        n_resets++;
        return;
      end
      number = (lfsr ^ count) & mask;
      if (load) begin
        lfsr = seed & mask;
        n_loads++;
      end else begin
        fb = ((lfsr >> (tap - 1)) ^ (lfsr >> (n - 1))) & 1;
        if (fb != 0) n_feedback_ones++;
        lfsr = ((lfsr << 1) | fb) & mask;
      end
      count = (count + 1) & mask;
      if (count == 0) n_wraps++;
    endfunction
  endclass

endpackage
