// scs_pkg: types and constants shared by the self-checking systolic stack.
//
// The stack stores each data word together with its Berger check symbol, the
// binary count of zeros in the word. For I information bits the symbol needs
// K = ceil(log2(I+1)) bits; the default word of 32 bits takes a 6-bit symbol.
// Every storage column is steered by four one-hot control signals, bundled in
// cell_ctl_t: load from the left neighbour (the one nearer the host), load
// from the right neighbour, refresh (hold), and clear.
package scs_pkg;

  // Default width of a data word (the 32-bit example of the design).
  localparam int unsigned DATA_W = 32;

  // Number of Berger check bits for an info-bit count of i.
  function automatic int unsigned berger_k(int unsigned i);
    return $clog2(i + 1);
  endfunction

  // Column controls; exactly one is set in every cycle.
  typedef struct packed {
    logic clr;   // word leaves and nothing enters: load the clear word
    logic rfsh;  // keep the stored word
    logic ld_r;  // take the word of the right neighbour (moves toward the host)
    logic ld_l;  // take the word of the left neighbour (moves away from the host)
  } cell_ctl_t;

endpackage
