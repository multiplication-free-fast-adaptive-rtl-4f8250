// fabrc_pkg: types and helper functions shared by the F-ABRC (fast adaptive
// binary range coder) encoder and decoder.
//
// em_t is the per-symbol encode mode: a regular symbol is coded with the
// adaptive probability of its context, a bypass symbol with probability 1/2
// and no context. The width helpers derive the register widths from the two
// algorithm parameters, d (register precision: the range register holds d-1
// bits) and bl (log2 of the imaginary sliding window length).
package fabrc_pkg;

  typedef enum logic [0:0] {
    EM_REGULAR = 1'b0,
    EM_BYPASS  = 1'b1
  } em_t;

  // Width of the ISW counter no'. Its largest value is
  // alpha*2^(d-1)*2^bl with alpha = 9/16, i.e. 9*2^(d-5+bl) < 2^(d+bl-1).
  function automatic int unsigned no_width(int unsigned d, int unsigned bl);
    return d + bl - 1;
  endfunction

  // Width of a renormalisation shift count (0 .. d-1 inclusive).
  function automatic int unsigned shift_width(int unsigned d);
    return $clog2(d);
  endfunction

endpackage
