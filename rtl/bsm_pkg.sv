// bsm_pkg: shared constants of the Bloomier-filter string matcher.
//
// The defaults describe the main configuration: up to 16k strings of 32 bytes,
// two hash functions (k = 2) and a lookup table of m = 2n words. The lookup
// table holds pointers into the result table, so its words are log2(n) bits
// wide and it is addressed by log2(2n) bits. These numbers follow the
// published configuration; the helper functions are this design's own.
package bsm_pkg;

  // Bytes per string and per data window (L).
  localparam int unsigned STR_BYTES_DEF   = 32;
  // Number of strings the result table can hold (n).
  localparam int unsigned NUM_STRINGS_DEF = 16384;
  // Number of hash functions (k); fixed at 2 by the architecture.
  localparam int unsigned NUM_HASHES      = 2;

  // Pointer width: log2(n).
  function automatic int unsigned ptr_width(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Lookup-table address width: log2(k*n) with k = 2.
  function automatic int unsigned lut_addr_width(input int unsigned n);
    return $clog2(NUM_HASHES * n);
  endfunction

endpackage
