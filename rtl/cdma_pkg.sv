// cdma_pkg -- constants and helper functions shared by the dynamic CDMA bus.
//
// The bus uses Walsh-Hadamard spreading codes. A codeword bit is held as a
// single logic bit where 0 stands for +1 and 1 stands for -1, so spreading a
// data bit is an XOR and the Sylvester construction of WH_N reduces to the
// parity of (row AND column). Widths are derived here so that every module
// computes them the same way: a codeword identifier has ceil(log2 N) bits, a
// PE identifier ceil(log2 M) bits (both at least one bit wide so that N = 1
// or M = 1 still gives legal vectors), and a sum-chip has 1 + log2 N bits.
package cdma_pkg;

  // Width of an identifier able to name 'count' different things (min 1).
  function automatic int unsigned id_width(input int unsigned count);
    return (count > 1) ? $clog2(count) : 1;
  endfunction

  // Width of a sum-chip: it counts how many of the N chips are 1 (0..N).
  function automatic int unsigned sum_width(input int unsigned n);
    return 1 + $clog2(n);
  endfunction

  // Chip 'col' of Walsh-Hadamard codeword 'row'.
  function automatic logic walsh_bit(input logic [15:0] row, input logic [15:0] col);
    return ^(row & col);
  endfunction

  // Number of data bits carried by one p-byte word.
  function automatic int unsigned word_bits(input int unsigned p_bytes);
    return 8 * p_bytes;
  endfunction

endpackage
