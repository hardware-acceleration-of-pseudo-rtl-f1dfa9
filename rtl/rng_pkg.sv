// rng_pkg: sizes and constants shared by the random number generator.
//
// The generator turns a uniformly distributed M-bit integer X into a number
// with an arbitrary distribution: the upper K bits of X index an inverse
// cumulative distribution table of 2^K+1 entries of W bits, and the lower
// M-K bits interpolate linearly between two neighbouring entries.
// The default sizes M=32, K=16, W=32 are those of the reference build.
//
// lfsr_taps() gives the feedback taps of a maximal-length Fibonacci LFSR
// of n bits (bit t-1 of the mask is set for tap t). The tap sets are the
// widely published maximal-length ones; the source of the design does not
// list taps, so they are this design's choice.
package rng_pkg;

  localparam int unsigned M_BITS_DEF = 32;  // width of the uniform integer X
  localparam int unsigned K_BITS_DEF = 16;  // table index bits
  localparam int unsigned W_BITS_DEF = 32;  // table entry / output width

  function automatic logic [31:0] tap_bit(input int unsigned t);
    logic [31:0] m;
    m = '0;
    m[t-1] = 1'b1;
    return m;
  endfunction

  function automatic logic [31:0] lfsr_taps(input int unsigned n);
    case (n)
      2:  return tap_bit(2)  | tap_bit(1);
      3:  return tap_bit(3)  | tap_bit(2);
      4:  return tap_bit(4)  | tap_bit(3);
      5:  return tap_bit(5)  | tap_bit(3);
      6:  return tap_bit(6)  | tap_bit(5);
      7:  return tap_bit(7)  | tap_bit(6);
      8:  return tap_bit(8)  | tap_bit(6)  | tap_bit(5) | tap_bit(4);
      9:  return tap_bit(9)  | tap_bit(5);
      10: return tap_bit(10) | tap_bit(7);
      11: return tap_bit(11) | tap_bit(9);
      12: return tap_bit(12) | tap_bit(6)  | tap_bit(4) | tap_bit(1);
      13: return tap_bit(13) | tap_bit(4)  | tap_bit(3) | tap_bit(1);
      14: return tap_bit(14) | tap_bit(5)  | tap_bit(3) | tap_bit(1);
      15: return tap_bit(15) | tap_bit(14);
      16: return tap_bit(16) | tap_bit(15) | tap_bit(13) | tap_bit(4);
      17: return tap_bit(17) | tap_bit(14);
      18: return tap_bit(18) | tap_bit(11);
      19: return tap_bit(19) | tap_bit(6)  | tap_bit(2) | tap_bit(1);
      20: return tap_bit(20) | tap_bit(17);
      21: return tap_bit(21) | tap_bit(19);
      22: return tap_bit(22) | tap_bit(21);
      23: return tap_bit(23) | tap_bit(18);
      24: return tap_bit(24) | tap_bit(23) | tap_bit(22) | tap_bit(17);
      25: return tap_bit(25) | tap_bit(22);
      26: return tap_bit(26) | tap_bit(6)  | tap_bit(2) | tap_bit(1);
      27: return tap_bit(27) | tap_bit(5)  | tap_bit(2) | tap_bit(1);
      28: return tap_bit(28) | tap_bit(25);
      29: return tap_bit(29) | tap_bit(27);
      30: return tap_bit(30) | tap_bit(6)  | tap_bit(4) | tap_bit(1);
      31: return tap_bit(31) | tap_bit(28);
      32: return tap_bit(32) | tap_bit(22) | tap_bit(2) | tap_bit(1);
      default: return '0;
    endcase
  endfunction

endpackage
