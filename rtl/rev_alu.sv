// rev_alu: garbage-free reversible arithmetic logic unit.
//
// The ALU performs a reversible update (A, B) -> (A, f(A, B)): the first
// operand passes through and only the second is changed, so each operation
// can be undone. Instead of computing every result side by side and
// selecting one (which a reversible circuit cannot do without garbage), the
// operations are laid out in sequence and control lines decide which stages
// act on B; a stage that is not selected passes B unchanged:
//   1. controlled complement        (SUB, NEG)      B = ~B
//   2. V-shaped adder               (ADD, SUB, NEG) B = B + addend,
//                                    addend = A for ADD/SUB, 1 for NEG
//   3. controlled complement        (SUB)           B = ~B
//   4. controlled XOR               (XOR)           B = B ^ A
//   5. controlled rotate by A[3:0]  (RL, RR)
// So SUB is computed as ~(~B + A) and NEG as ~B + 1.
// inv = 1 selects the inverse operation (ADD<->SUB, RL<->RR; XOR and NEG
// are their own inverses).
// The sequential-stages principle and the use of the V-shaped adder are the
// document's; the operation list (those needed by the Bob instruction set)
// and the stage order are this design's choices.
// Interface: op, inv, a, b in; a_out (= a), b_out out; anc_out is the adder's
// ancilla after the cascade (always 0). Combinational.
module rev_alu
  import bob_pkg::*;
(
  input  alu_op_t op,
  input  logic    inv,
  input  word_t   a,
  input  word_t   b,
  output word_t   a_out,
  output word_t   b_out,
  output logic    anc_out
);
  alu_op_t eff;
  word_t   b1, addend, b2, b3, b4, unused_a;

  always_comb begin
    eff = op;
    if (inv) begin
      unique case (op)
        ALU_ADD: eff = ALU_SUB;
        ALU_SUB: eff = ALU_ADD;
        ALU_RL:  eff = ALU_RR;
        ALU_RR:  eff = ALU_RL;
        default: eff = op;
      endcase
    end
  end

  // stage 1
  assign b1 = (eff == ALU_SUB || eff == ALU_NEG) ? ~b : b;

  // stage 2: controlled copy of the addend into the adder's A lines
  always_comb begin
    if (eff == ALU_ADD || eff == ALU_SUB) addend = a;
    else if (eff == ALU_NEG)             addend = word_t'(1);
    else                                 addend = '0;
  end

  vshape_adder #(.N(XLEN)) u_adder (
    .inv    (1'b0),
    .a      (addend),
    .b      (b1),
    .a_out  (unused_a),
    .s      (b2),
    .anc_out(anc_out)
  );

  // stage 3
  assign b3 = (eff == ALU_SUB) ? ~b2 : b2;

  // stage 4
  assign b4 = (eff == ALU_XOR) ? (b3 ^ a) : b3;

  // stage 5
  always_comb begin
    logic [3:0] sh;
    sh = a[3:0];
    unique case (eff)
      ALU_RL:  b_out = (b4 << sh) | (b4 >> (5'(XLEN) - 5'(sh)));
      ALU_RR:  b_out = (b4 >> sh) | (b4 << (5'(XLEN) - 5'(sh)));
      default: b_out = b4;
    endcase
  end

  assign a_out = a;
endmodule
