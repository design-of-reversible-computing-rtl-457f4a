// bob_pkg: word sizes, instruction set and instruction decoding of the Bob
// reversible processor.
//
// Bob is a two-address machine: every instruction updates at most one
// register (ra) using a second operand (register rb or an immediate), and
// every instruction has an inverse in the set, so the machine can run its
// program backwards. Control flow follows the Pendulum scheme: instructions
// never write the program counter; they change the branch register BR and
// the direction bit, and the PC is then advanced by BR (or by one step when
// BR is zero) in the current direction.
//
// The instruction mnemonics NEG, XORI, ADD, SWBR and BRA are the document's;
// the rest of the set, the 16-bit word, the 16 registers and the binary
// encoding below are this design's choices:
//   [15:11] opcode
//   [10:7]  ra        (register updated)
//   [6:3]   rb        (second register operand)
//   [6:0]   imm7      (signed immediate: ADDI, XORI, RL, RR, BEZ, BLTZ, BGEZ)
//   [10:0]  off11     (signed branch offset: BRA, RBRA)
package bob_pkg;

  localparam int unsigned XLEN   = 16;
  localparam int unsigned NREG   = 16;
  localparam int unsigned RIDX_W = 4;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,   // no operation
    OP_ADD  = 5'd1,   // ra += rb            inverse SUB
    OP_SUB  = 5'd2,   // ra -= rb            inverse ADD
    OP_XOR  = 5'd3,   // ra ^= rb            self-inverse
    OP_NEG  = 5'd4,   // ra = -ra            self-inverse
    OP_ADDI = 5'd5,   // ra += imm           inverse ra -= imm
    OP_XORI = 5'd6,   // ra ^= imm           self-inverse
    OP_RL   = 5'd7,   // ra = rotl(ra, imm)  inverse RR
    OP_RR   = 5'd8,   // ra = rotr(ra, imm)  inverse RL
    OP_EXCH = 5'd9,   // swap ra <-> MEM[rb] self-inverse
    OP_SWBR = 5'd10,  // swap ra <-> BR      self-inverse
    OP_BRA  = 5'd11,  // BR += off           inverse BR -= off
    OP_RBRA = 5'd12,  // BR += off, flip dir inverse flip dir, BR -= off
    OP_BEZ  = 5'd13,  // if ra == 0: BR += imm
    OP_BLTZ = 5'd14,  // if ra <  0: BR += imm
    OP_BGEZ = 5'd15   // if ra >= 0: BR += imm
  } opcode_t;

  // operation selected in the reversible ALU
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,
    ALU_ADD  = 3'd1,
    ALU_SUB  = 3'd2,
    ALU_XOR  = 3'd3,
    ALU_NEG  = 3'd4,
    ALU_RL   = 3'd5,
    ALU_RR   = 3'd6
  } alu_op_t;

  typedef struct packed {
    opcode_t op;
    ridx_t   ra;
    ridx_t   rb;
    word_t   imm;     // sign-extended imm7
    word_t   off;     // sign-extended off11
  } instr_t;

  function automatic instr_t decode(input word_t w);
    instr_t d;
    d.op  = opcode_t'(w[15:11]);
    d.ra  = w[10:7];
    d.rb  = w[6:3];
    d.imm = {{(XLEN-7){w[6]}}, w[6:0]};
    d.off = {{(XLEN-11){w[10]}}, w[10:0]};
    return d;
  endfunction

  // encoders, used by testbenches to assemble programs
  function automatic word_t enc_rr(input opcode_t op, input ridx_t ra, input ridx_t rb);
    return {op, ra, rb, 3'b000};
  endfunction

  function automatic word_t enc_ri(input opcode_t op, input ridx_t ra, input int imm);
    logic [6:0] i7;
    i7 = imm[6:0];
    return {op, ra, i7};
  endfunction

  function automatic word_t enc_br(input opcode_t op, input int off);
    logic [10:0] o11;
    o11 = off[10:0];
    return {op, o11};
  endfunction

endpackage
