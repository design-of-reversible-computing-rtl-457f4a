// bob_ref_model: instruction-level reference model of the Bob processor for
// testbenches. It holds its own copy of the machine state and executes one
// instruction per call of step(), written directly from the instruction-set
// definition (forward semantics, and the inverse semantics when the
// direction bit is set), independently of the processor's datapath.
// Not synthesizable; testbench use only.
module bob_ref_model;
  import bob_pkg::*;

  logic [15:0] pc, br;
  logic        dir;
  logic [15:0] r   [16];
  logic [15:0] mem [65536];

  // reset of the processor state; memory keeps its contents, as in the
  // processor, and starts out all zero
  task automatic clear();
    pc = '0; br = '0; dir = 1'b0;
    for (int i = 0; i < 16; i++) r[i] = '0;
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = '0;
  end

  function automatic logic [15:0] rotl(input logic [15:0] x, input int n);
    logic [31:0] d;
    d = {x, x} << (n % 16);
    return d[31:16];
  endfunction

  function automatic logic [15:0] rotr(input logic [15:0] x, input int n);
    return rotl(x, (16 - (n % 16)) % 16);
  endfunction

  // executes the instruction at pc; returns its opcode
  task automatic step(output opcode_t op_out);
    logic [15:0] w, imm, off, t;
    logic [3:0]  a, b;
    logic        cond, back;
    int          sh;
    w    = mem[pc];
    a    = w[10:7];
    b    = w[6:3];
    imm  = 16'($signed(w[6:0]));
    off  = 16'($signed(w[10:0]));
    sh   = int'(w[3:0]);
    back = dir;
    op_out = opcode_t'(w[15:11]);
    cond = 1'b0;
    case (w[15:11])
      OP_ADD:  r[a] = back ? r[a] - r[b] : r[a] + r[b];
      OP_SUB:  r[a] = back ? r[a] + r[b] : r[a] - r[b];
      OP_XOR:  r[a] = r[a] ^ r[b];
      OP_NEG:  r[a] = -r[a];
      OP_ADDI: r[a] = back ? r[a] - imm : r[a] + imm;
      OP_XORI: r[a] = r[a] ^ imm;
      OP_RL:   r[a] = back ? rotr(r[a], sh) : rotl(r[a], sh);
      OP_RR:   r[a] = back ? rotl(r[a], sh) : rotr(r[a], sh);
      OP_EXCH: begin t = mem[r[b]]; mem[r[b]] = r[a]; r[a] = t; end
      OP_SWBR: begin t = br; br = r[a]; r[a] = t; end
      OP_BRA:  br = back ? br - off : br + off;
      OP_RBRA: begin br = back ? br - off : br + off; dir = !dir; end
      OP_BEZ, OP_BLTZ, OP_BGEZ: begin
        if (w[15:11] == OP_BEZ)  cond = (r[a] == 0);
        if (w[15:11] == OP_BLTZ) cond = r[a][15];
        if (w[15:11] == OP_BGEZ) cond = !r[a][15];
        if (cond) br = back ? br - imm : br + imm;
      end
      default: ;
    endcase
    t  = (br == 0) ? 16'd1 : br;
    pc = dir ? pc - t : pc + t;
  endtask
endmodule
