// bob_pc_update: program-counter update of the Bob processor (PC UPD).
//
// The next PC depends only on the branch register and the direction bit:
// with BR = 0 the PC moves one word, otherwise it moves BR words, forwards
// when dir = 0 and backwards when dir = 1. Since the step is determined by
// values that the machine keeps, the PC update can itself be undone.
// Uses the BR and direction values produced by the current instruction.
// The rule follows the document's description; the width is this design's.
// Combinational.
module bob_pc_update
  import bob_pkg::*;
(
  input  word_t pc,
  input  word_t br,
  input  logic  dir,
  output word_t pc_next
);
  word_t step;
  assign step    = (br == '0) ? word_t'(1) : br;
  assign pc_next = dir ? pc - step : pc + step;
endmodule
