// Shared constants and elaboration helpers of the hybrid Ling adders.
// BLK is the carry-select block width: every placement rule of the
// design (carries at 4k-1, &2 cells at 4k-2) assumes 4-bit blocks.
package hpcl_pkg;
  localparam int unsigned BLK = 4;

  // True when v is a power of two.
  function automatic bit is_pow2(input int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  // Which cell sits on bit pair n ahead of the Ling pair cells.
  typedef enum logic [2:0] {
    CK_PASS,      // plain wire
    CK_CIN,       // carry-in cell, bit 0
    CK_AND2,      // &2 cell, n = 4k-2 in the upper half
    CK_BRK,       // break cell, n = m-2, boundary m in the lower half
    CK_BRK_AND2,  // break cell merged with &2, n = m-2, m in the upper half
    CK_BRK_CIN    // break-with-carry-in cell, n = m-1
  } cell_kind_e;

  // Cell on pair n of an N-bit adder. part = 0: no partition boundaries
  // (fixed-width adder); otherwise boundaries at every multiple of part
  // from part to N-part.
  function automatic cell_kind_e cell_kind(input int unsigned n,
                                           input int unsigned nbits,
                                           input int unsigned part);
    bit on_and2, at_m1, at_m2;
    on_and2 = (n % BLK == BLK - 2) && (n + 2 >= nbits / 2 + BLK) && (n + 2 <= nbits - BLK);
    at_m1 = (part != 0) && ((n + 1) % part == 0) && (n + 1 < nbits);
    at_m2 = (part != 0) && ((n + 2) % part == 0) && (n + 2 < nbits);
    if (n == 0)   return CK_CIN;
    if (at_m1)    return CK_BRK_CIN;
    if (at_m2)    return ((n + 2) > nbits / 2) ? CK_BRK_AND2 : CK_BRK;
    if (on_and2)  return CK_AND2;
    return CK_PASS;
  endfunction
endpackage
