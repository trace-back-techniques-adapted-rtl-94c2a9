// Shared constants of the M-algorithm survivor memory.
//
// The defaults are the configuration of the worked examples: M = 2 surviving
// paths, a 4-state trellis (K - 1 = 2 state bits), an input sequence of 8
// symbols and, for the combined register-exchange / trace-back scheme, m = 2
// trellis steps packed into one memory word. Every module takes these as
// parameter defaults so that a single override changes the whole design.
package mtb_pkg;

  // Number of surviving paths kept per trellis step (a power of two).
  localparam int unsigned DEF_M     = 2;
  // Constraint length: the trellis has 2**(K-1) states.
  localparam int unsigned DEF_K     = 3;
  // Length of one input sequence (frame), in symbols.
  localparam int unsigned DEF_L_SIN = 8;
  // Combined scheme: trellis steps gathered in the register bank per word.
  localparam int unsigned DEF_MSTEP = 2;

  // Width of a path number, log2(M); at least one bit.
  function automatic int unsigned path_w(int unsigned m);
    return (m > 1) ? $clog2(m) : 1;
  endfunction

endpackage
