// rev_pkg: the reversible gate library as functions on bits.
//
// Every reversible circuit in this design is a cascade of two gate kinds:
//   * the n-bit controlled-NOT, which inverts its target when all controls
//     are 1 (no control: NOT; one control: Feynman; two controls: Toffoli);
//   * the Fredkin gate, a controlled swap that exchanges its two data lines
//     when the control is 1.
// Each gate is its own inverse, so a cascade is undone by applying the same
// gates in the opposite order. The functions below let a module write such a
// cascade as a sequence of assignments inside an always_comb block; the
// line-by-line structure of the circuit is then kept in the code.
// The MAJ/UMA cells are the two halves of the garbage-free ripple adder:
// MAJ leaves the carry-out on the a line, UMA removes it again and leaves the
// sum bit on the b line. Their gate order is this design's choice (the
// classic three-gate cells), not taken from a printed circuit.
package rev_pkg;

  // Toffoli gate: t ^= c1 & c2
  function automatic logic toffoli(input logic c1, input logic c2, input logic t);
    return t ^ (c1 & c2);
  endfunction

  // Feynman gate: t ^= c
  function automatic logic feynman(input logic c, input logic t);
    return t ^ c;
  endfunction

  // MAJ cell on lines (c, b, a): afterwards a = majority(c_in, a_in, b_in),
  // b = a_in ^ b_in, c = a_in ^ c_in.
  function automatic logic [2:0] maj(input logic c, input logic b, input logic a);
    logic cc, bb, aa;
    bb = feynman(a, b);
    cc = feynman(a, c);
    aa = toffoli(cc, bb, a);
    return {cc, bb, aa};
  endfunction

  // UMA cell: inverse companion of MAJ; restores c and a, leaves the sum on b.
  function automatic logic [2:0] uma(input logic c, input logic b, input logic a);
    logic cc, bb, aa;
    aa = toffoli(c, b, a);
    cc = feynman(aa, c);
    bb = feynman(cc, b);
    return {cc, bb, aa};
  endfunction

  // Exact inverses of the two cells, used when a cascade is run backwards.
  function automatic logic [2:0] maj_inv(input logic c, input logic b, input logic a);
    logic cc, bb, aa;
    aa = toffoli(c, b, a);
    cc = feynman(aa, c);
    bb = feynman(aa, b);
    return {cc, bb, aa};
  endfunction

  function automatic logic [2:0] uma_inv(input logic c, input logic b, input logic a);
    logic cc, bb, aa;
    bb = feynman(c, b);
    cc = feynman(a, c);
    aa = toffoli(cc, bb, a);
    return {cc, bb, aa};
  endfunction

endpackage
