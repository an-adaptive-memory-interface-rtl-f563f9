// mic_pkg: types and constants shared by the Memory Interface Controller (MIC),
// the memory banks and the BFS accelerator built around them.
//
// A memory operation is described by an operation type carried next to the
// address and data lines. Loads and stores are the base set; fetch-and-add and
// compare-and-swap are the two atomic operations handled by the MIC's per-bank
// atomic units. The two-bit encoding is this design's own choice.
package mic_pkg;

  typedef enum logic [1:0] {
    OP_LOAD  = 2'd0,  // read one word
    OP_STORE = 2'd1,  // write one word
    OP_FAA   = 2'd2,  // fetch-and-add: mem += wdata, returns the old value
    OP_CAS   = 2'd3   // compare-and-swap: if mem == cmp then mem = wdata, returns the old value
  } mem_op_e;

  // Index width for a one-of-n selection; never zero so that n = 1 still works.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
