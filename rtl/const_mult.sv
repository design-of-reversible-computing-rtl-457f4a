// const_mult: garbage-free multiplication by a constant M = 2^K + 1 or 2^K - 1.
//
// Multiplication is made reversible by carrying a remainder along:
//   forward  (inv = 0): (A, R) -> P = A*M + R,      with 0 <= R < M
//   inverse  (inv = 1): P      -> (A, R) = (P / M, P mod M)
// which is a bijection between pairs (A, R) and products P, so nothing is
// thrown away. The multiplier family 2^K +/- 1 is the one the document
// supports; the default M = 5 (K = 2, plus) is the factor that appears in
// the H.264 lifting network. Here the forward direction is one shift and one
// add or subtract, and the inverse is a division by the constant; the gate
// structure of the reversible circuit is not reproduced.
// Interface: a and r in, p out for the forward direction; p_in in, a_q and
// r_q out for the inverse; rem_ok flags a legal remainder (r < M).
// Combinational.
module const_mult #(
  parameter int unsigned N    = 16,   // width of the multiplicand A
  parameter int unsigned K    = 2,    // M = 2^K + 1 (PLUS = 1) or 2^K - 1
  parameter bit          PLUS = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [K:0]     r,
  output logic [N+K:0]   p,
  output logic           rem_ok,
  input  logic [N+K:0]   p_in,
  output logic [N-1:0]   a_q,
  output logic [K:0]     r_q
);
  localparam int unsigned W = N + K + 1;
  localparam logic [W-1:0] M = PLUS ? W'((1 << K) + 1) : W'((1 << K) - 1);

  logic [W-1:0] a_ext, shifted, quo, rem;

  assign a_ext   = W'(a);
  assign shifted = a_ext << K;
  assign p       = (PLUS ? shifted + a_ext : shifted - a_ext) + W'(r);
  assign rem_ok  = W'(r) < M;

  assign quo = p_in / M;
  assign rem = p_in % M;
  assign a_q = quo[N-1:0];
  assign r_q = rem[K:0];
endmodule
