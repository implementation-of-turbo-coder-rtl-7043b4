// turbo_pkg: constants and small functions shared by the turbo coder.
//
// The constituent code is the rate-1/2, constraint-length-3 recursive
// systematic convolutional (RSC) code G = [1, g2/g1] with feedback
// g1 = 111 (1 + D + D^2) and feed-forward g2 = 101 (1 + D^2).  The encoder
// memory is two bits, held as state = {s1, s2} where s1 is the most recent
// register and s2 the oldest.  For input u:
//   a      = u ^ s1 ^ s2          (feedback bit, written into s1)
//   parity = a ^ s2               (feed-forward taps 1 and D^2)
//   next   = {a, s1}
// Because the state is a shift register, the two branches entering a state
// ns come from {ns[0], 0} and {ns[0], 1}; the oldest bit d of the
// predecessor identifies the branch, and the branch input is
// u = ns[1] ^ ns[0] ^ d.  The decoder uses this to store one decision bit
// per state and step.
//
// The frame length of 8 bits follows from the 24-bit rate-1/3 codeword;
// the 2 x 4 interleaver shape, the soft-value width, the channel amplitude
// and the iteration count are this design's own choices.
package turbo_pkg;

  localparam int unsigned FRAME_LEN = 8;   // information bits per frame
  localparam int unsigned IL_ROWS   = 2;   // block interleaver rows
  localparam int unsigned IL_COLS   = 4;   // block interleaver columns
  localparam int unsigned LLR_W     = 8;   // width of every soft value (signed)
  localparam int unsigned CH_AMP    = 16;  // magnitude of a received bit's soft value
  localparam int unsigned NUM_ITER  = 4;   // decoder iterations per frame

  typedef logic [1:0] rsc_state_t;         // {s1, s2}

  function automatic logic rsc_feedback(rsc_state_t s, logic u);
    return u ^ s[1] ^ s[0];
  endfunction

  function automatic logic rsc_parity(rsc_state_t s, logic u);
    return rsc_feedback(s, u) ^ s[0];
  endfunction

  function automatic rsc_state_t rsc_next(rsc_state_t s, logic u);
    return {rsc_feedback(s, u), s[1]};
  endfunction

  // Predecessor of state ns along the branch whose oldest bit is d.
  function automatic rsc_state_t rsc_prev(rsc_state_t ns, logic d);
    return {ns[0], d};
  endfunction

  // Input bit on the branch from rsc_prev(ns, d) into ns.
  function automatic logic rsc_branch_input(rsc_state_t ns, logic d);
    return ns[1] ^ ns[0] ^ d;
  endfunction

  // Block interleaver map: output position k takes input element
  // il_source(k).  Input element i is written at row i % rows, column
  // i / rows (columns filled top to bottom, left to right); the output is
  // read row by row, left to right, so position k is row k / cols,
  // column k % cols.
  function automatic int unsigned il_source(int unsigned k, int unsigned rows,
                                            int unsigned cols);
    return (k % cols) * rows + (k / cols);
  endfunction

endpackage
