// vc_link_pkg - shared helpers for the asynchronous virtual-channel links.
//
// Modelling convention used by every module in this library: the links are
// self-timed 4-phase (return-to-zero) handshake circuits. To make them
// synthesizable RTL that a two-state, cycle-based simulator can run, every
// state-holding element of the circuits (Muller C-element, mutex, latch and
// latch controller) is a flip-flop updated on the rising edge of a free-running
// emulation clock `clk`, while plain gates (AND, OR, mux, encoders, decoders)
// are zero-delay combinational logic. One clock cycle is therefore one "gate
// delay" of a state-holding element; the handshake ordering of the original
// circuits is preserved, their analog timing is not. `rst` is active high and
// synchronous; the original circuits also use an active-high reset.
//
// Delay-insensitive wire codes: a 1-of-4 group carries two bits on four wires,
// active high, all-zero being the empty (spacer) codeword. A dual-rail pair
// {t, f} carries one bit, {0,0} being empty.
// The 1-of-4 and dual-rail codes are those of the reference design, except
// that they are active high here (its encoder cell has inverted outputs).
package vc_link_pkg;

  // Number of binary-tree levels for n channels (n a power of two).
  function automatic int unsigned tree_levels(input int unsigned n);
    return $clog2(n);
  endfunction

  // 1-of-4 codeword of a two-bit value (wire k high for value k).
  function automatic logic [3:0] onehot4(input logic [1:0] v);
    return 4'b0001 << v;
  endfunction

  // Two-bit value of a valid 1-of-4 codeword.
  function automatic logic [1:0] decode4(input logic [3:0] c);
    return c[0] ? 2'd0 : {c[2] | c[3], c[1] | c[3]};
  endfunction

endpackage
