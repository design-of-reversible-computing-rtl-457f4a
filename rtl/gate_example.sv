// gate_example: three-line reversible circuit (A,B,C) -> (P,Q,R).
//
// The cascade, left to right:
//   1. Feynman gate, control B, target C
//   2. Toffoli gate, controls B and C, target A
//   3. Fredkin gate, control A, swaps the B and C lines
// which gives P = A ^ (B & ~C), and (Q,R) = (B, B^C) swapped when P = 1.
// The three gates and their order are the example circuit of the gate-level
// layer of the reversible computing tower; the line names are the printed
// ones. Built structurally from cnot_gate and fredkin_gate instances.
// Combinational, no clock.
module gate_example (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic [1:0] g1_ctrl;
  logic       g1_c;          // C after the Feynman gate
  logic [2:0] g2_ctrl;
  logic       g2_a;          // A after the Toffoli gate

  cnot_gate #(.NCTRL(1)) u_feynman (
    .ctrl_in ({1'b0, b}), .t_in(c),
    .ctrl_out(g1_ctrl),   .t_out(g1_c)
  );

  cnot_gate #(.NCTRL(2)) u_toffoli (
    .ctrl_in ({1'b0, g1_c, g1_ctrl[0]}), .t_in(a),
    .ctrl_out(g2_ctrl),                  .t_out(g2_a)
  );

  fredkin_gate u_fredkin (
    .c_in (g2_a), .x_in (g2_ctrl[0]), .y_in (g2_ctrl[1]),
    .c_out(p),    .x_out(q),          .y_out(r)
  );
endmodule
