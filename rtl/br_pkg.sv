// br_pkg: shared helpers for the parallel bit-reversal circuit.
//
// bitrev() reverses the lowest `width` bits of a value; the circuit uses it for
// the lane numbers (p bits), for the group address (n-2p bits) and, in the
// testbenches, for whole sample indices (n bits). Bits above `width` come back
// as zero. The function is plain combinational logic (a rewiring).
package br_pkg;

  localparam int unsigned MAX_BITS = 32;

  function automatic logic [MAX_BITS-1:0] bitrev(input logic [MAX_BITS-1:0] v,
                                                 input int unsigned width);
    logic [MAX_BITS-1:0] r;
    r = '0;
    for (int unsigned k = 0; k < MAX_BITS; k++) begin
      if (k < width) r[k] = v[width-1-k];
    end
    return r;
  endfunction

endpackage
