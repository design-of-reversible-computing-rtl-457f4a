// vshape_adder: garbage-free reversible ripple adder ("V-shaped" adder).
//
// Computes the reversible update (A, B) -> (A, B + A mod 2^N) with a single
// ancilla line that starts and ends at 0, so no garbage bits are produced.
// The cascade has two ripples, which gives the V shape in a circuit diagram:
//   * a forward ripple of MAJ cells computes the carries, each carry being
//     left on the a line of the bit below it;
//   * the top bit's sum is formed with two Feynman gates (the carry out of the
//     top bit is not needed for modular addition);
//   * a backward ripple of UMA cells uncomputes every carry and at the same
//     time leaves the sum bit on each b line.
// With inv = 1 the same gates are applied in the opposite order (each gate
// undone), which is the mirror circuit and computes (A, S) -> (A, S - A mod
// 2^N). The two-ripple scheme is the document's; the particular cells
// (MAJ/UMA with three gates each) are the classic ones and this design's
// choice.
// Interface: a, b in; a_out (= a), s out; anc_out is the ancilla line after
// the cascade and is always 0. Combinational; logic depth about 2N cells.
module vshape_adder #(
  parameter int unsigned N = 16
) (
  input  logic         inv,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] a_out,
  output logic [N-1:0] s,
  output logic         anc_out
);
  import rev_pkg::*;

  if (N < 2) begin : g_bad_width
    $error("vshape_adder needs N >= 2");
  end

  // Line naming: la[i] is the a line of bit i, lb[i] the b line. The carry
  // into bit i lives on line la[i-1] (on the ancilla for bit 0).
  logic [N-1:0] la, lb;
  logic         anc;

  // carry line of bit i is "x(i)": ancilla for i = 0, la[i-1] otherwise
  always_comb begin
    logic [2:0] t;
    logic       x;
    la  = a;
    lb  = b;
    anc = 1'b0;
    if (!inv) begin
      // forward ripple
      for (int i = 0; i < int'(N) - 1; i++) begin
        x = (i == 0) ? anc : la[i-1];
        t = maj(x, lb[i], la[i]);
        if (i == 0) anc = t[2]; else la[i-1] = t[2];
        lb[i] = t[1];
        la[i] = t[0];
      end
      // top bit: sum = a ^ b ^ carry
      lb[N-1] = feynman(la[N-1], lb[N-1]);
      lb[N-1] = feynman(la[N-2], lb[N-1]);
      // backward ripple
      for (int i = int'(N) - 2; i >= 0; i--) begin
        x = (i == 0) ? anc : la[i-1];
        t = uma(x, lb[i], la[i]);
        if (i == 0) anc = t[2]; else la[i-1] = t[2];
        lb[i] = t[1];
        la[i] = t[0];
      end
    end else begin
      // mirror: undo the backward ripple first
      for (int i = 0; i < int'(N) - 1; i++) begin
        x = (i == 0) ? anc : la[i-1];
        t = uma_inv(x, lb[i], la[i]);
        if (i == 0) anc = t[2]; else la[i-1] = t[2];
        lb[i] = t[1];
        la[i] = t[0];
      end
      lb[N-1] = feynman(la[N-2], lb[N-1]);
      lb[N-1] = feynman(la[N-1], lb[N-1]);
      for (int i = int'(N) - 2; i >= 0; i--) begin
        x = (i == 0) ? anc : la[i-1];
        t = maj_inv(x, lb[i], la[i]);
        if (i == 0) anc = t[2]; else la[i-1] = t[2];
        lb[i] = t[1];
        la[i] = t[0];
      end
    end
    a_out   = la;
    s       = lb;
    anc_out = anc;
  end
endmodule
