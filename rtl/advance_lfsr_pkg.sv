// advance_lfsr_pkg -- constants shared by the advance parallel LFSR blocks.
//
// PRNG_WIDTH is the word width N of the generator: the LFSR, the counter and
// the output register are all N bits wide. 32 is the width of the reference
// implementation: a 32-bit seed in, a 32-bit number out, and the LFSR
// feedback polynomial 1 + X^16 + X^32. Every module takes N as a parameter
// whose default is this constant.
package advance_lfsr_pkg;
  localparam int unsigned PRNG_WIDTH = 32;
endpackage
