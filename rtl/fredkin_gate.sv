// fredkin_gate: controlled-swap gate.
//
// When the control c is 1 the two data lines x and y are exchanged,
// otherwise they pass straight through; the control passes unchanged. The
// gate is conservative (it keeps the number of 1s) and is its own inverse.
// This is the modern convention (swap on TRUE); the original 1982 gate
// swapped on FALSE.
// Purely combinational, no clock.
module fredkin_gate (
  input  logic c_in,
  input  logic x_in,
  input  logic y_in,
  output logic c_out,
  output logic x_out,
  output logic y_out
);
  assign c_out = c_in;
  assign x_out = c_in ? y_in : x_in;
  assign y_out = c_in ? x_in : y_in;
endmodule
