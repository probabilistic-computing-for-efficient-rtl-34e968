// pc_pkg - shared types and constants of the probabilistic SAD engine.
//
// The engine sums absolute pixel differences of two image windows with
// q = 2**k absolute-value units, a k-level adder tree and one accumulating
// adder. Every adder in it is a 16-bit ripple-carry adder built from
// nine-NAND full adders, so that two kinds of error can be injected at the
// place where they arise in silicon:
//   * bit-level probabilistic errors of voltage-scaled (BIVOS) adders, given
//     as an XOR mask on each adder's sum bits;
//   * a single-event transient (SET): one transistor of one NAND gate in one
//     full adder of one adder is struck, and the glitch lasts a given number
//     of gate stages.
// The adder numbering below is used by every module that routes these
// injection signals.
package pc_pkg;

  // Data-path width of every adder (16-bit adders are used throughout).
  localparam int unsigned ADD_W  = 16;
  // Width of one pixel.
  localparam int unsigned PIX_W  = 8;

  // One radiation strike. valid marks the cycle in which the strike happens.
  //   adder      : which adder of the engine is hit (see numbering below)
  //   bit_idx    : which full adder (bit position) of that adder
  //   gate       : which NAND of the full adder, 1..9 (0 = none)
  //   transistor : which transistor of that NAND, 0..3 (rows of the strike table)
  //   stages     : how many gate stages the transient pulse survives
  typedef struct packed {
    logic       valid;
    logic [7:0] adder;
    logic [3:0] bit_idx;
    logic [3:0] gate;
    logic [1:0] transistor;
    logic [2:0] stages;
  } set_hit_t;

  // Adder numbering inside an engine with q absolute-value units:
  //   2u     comparator adder of ABS unit u
  //   2u+1   difference adder of ABS unit u
  //   2q+t   adder t of the tree (level by level, leaves first), t = 0..q-2
  //   3q-1   accumulating adder
  function automatic int unsigned n_adders(int unsigned q);
    return 3 * q;
  endfunction

  // Clock cycles from start to a valid result (MaxCount):
  // ceil(n_pix / q) + k + 2.
  function automatic int unsigned max_count(int unsigned n_pix, int unsigned q,
                                            int unsigned k);
    return (n_pix + q - 1) / q + k + 2;
  endfunction

endpackage
