// lfsr_pkg -- shared helpers for the LFSR designs.
//
// parity() is the modulo-2 sum of the register bits selected by a tap mask;
// every feedback network in this collection is one call to it. Masks are
// written with bit i set when register stage i is a tap. The widths are
// bounded by MAX_W so one function serves every register length used here.
package lfsr_pkg;

  localparam int unsigned MAX_W = 64;

  // XOR of the bits of state selected by mask.
  function automatic logic parity(input logic [MAX_W-1:0] state,
                                  input logic [MAX_W-1:0] mask);
    return ^(state & mask);
  endfunction

endpackage
