// cnot_gate: n-bit controlled-NOT gate (the Toffoli family).
//
// The target line is inverted when every control line is 1; the control
// lines pass through unchanged. NCTRL = 0 gives the NOT gate, NCTRL = 1 the
// Feynman (CNOT) gate and NCTRL = 2 the Toffoli gate. The gate is a bijection
// on its NCTRL+1 lines and is its own inverse.
// Interface: ctrl_in/t_in are the input lines, ctrl_out/t_out the output
// lines. Purely combinational, no clock.
module cnot_gate #(
  parameter int unsigned NCTRL = 2
) (
  input  logic [NCTRL:0] ctrl_in,   // bit NCTRL is unused padding so NCTRL=0 is legal
  input  logic           t_in,
  output logic [NCTRL:0] ctrl_out,
  output logic           t_out
);
  // all controls active; an empty control set is always active
  logic all_on;
  always_comb begin
    all_on = 1'b1;
    for (int i = 0; i < int'(NCTRL); i++) all_on &= ctrl_in[i];
  end

  assign ctrl_out = ctrl_in;
  assign t_out    = t_in ^ all_on;
endmodule
