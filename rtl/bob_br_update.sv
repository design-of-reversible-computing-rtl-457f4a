// bob_br_update: branch-register and direction update of the Bob processor
// (BR UPD).
//
// Instructions never write the PC. Branch instructions add a signed offset
// to the branch register BR; RBRA also flips the direction bit; SWBR
// exchanges BR with a register. When the machine runs backwards (dir = 1)
// every instruction does its inverse, so offsets are subtracted instead of
// added. Conditional branches (BEZ, BLTZ, BGEZ) act only when their test on
// register ra holds; because branches come in pairs with the same test, the
// branch at the target undoes the BR change on arrival.
// The BR/direction-bit scheme and the BRA and SWBR instructions are the
// document's; the conditional tests and RBRA are this design's choices,
// following the Pendulum-style instruction sets.
// Combinational.
module bob_br_update
  import bob_pkg::*;
(
  input  instr_t ins,
  input  logic   dir,        // 0: forward, 1: backward
  input  word_t  br,
  input  word_t  ra_data,
  output word_t  br_next,
  output logic   dir_next
);
  logic cond;

  always_comb begin
    unique case (ins.op)
      OP_BEZ:  cond = (ra_data == '0);
      OP_BLTZ: cond = ra_data[XLEN-1];
      OP_BGEZ: cond = !ra_data[XLEN-1];
      default: cond = 1'b0;
    endcase
  end

  always_comb begin
    br_next  = br;
    dir_next = dir;
    unique case (ins.op)
      OP_BRA:  br_next = dir ? br - ins.off : br + ins.off;
      OP_RBRA: begin
        br_next  = dir ? br - ins.off : br + ins.off;
        dir_next = !dir;
      end
      OP_SWBR: br_next = ra_data;
      OP_BEZ, OP_BLTZ, OP_BGEZ:
        if (cond) br_next = dir ? br - ins.imm : br + ins.imm;
      default: ;
    endcase
  end
endmodule
