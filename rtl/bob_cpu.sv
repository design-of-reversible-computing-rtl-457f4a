// bob_cpu: Bob, a reversible two-address von Neumann processor.
//
// Every instruction is a bijection on the machine state (registers, memory,
// PC, branch register BR, direction bit DIR), and the state after an
// instruction determines the state before it, so the machine can run its
// program backwards: after a reverse-branch (RBRA) flips DIR, the PC walks
// back through the executed path and every instruction performs its inverse,
// restoring registers and memory.
//
// One instruction completes per clock while run = 1:
//   * fetch: the word at MEM[PC] is read (a copy that is dropped again after
//     the cycle, so the fetch loses no information);
//   * REGS read ra (updated operand) and rb; the reversible ALU updates ra
//     from rb or from the immediate (inverse operation when DIR = 1);
//   * EXCH swaps ra with MEM[rb], SWBR swaps ra with BR;
//   * BR UPD computes the new BR and DIR, PC UPD steps the PC by BR (or by 1
//     if BR = 0) in the new direction.
// With run = 0 the machine holds its state and the load port may write
// memory (to place a program and data).
// The blocks (DIR, BR, PC, BR UPD, PC UPD, REGS, ALU, MEM) and the PC/BR/DIR
// control scheme are the document's; the single-cycle timing, the word and
// register-file sizes, the instruction encoding and the load/observation
// ports are this design's choices.
// Rules that keep the instruction set reversible (ra != rb for ADD, SUB, XOR
// and EXCH) are checked by assertions.
module bob_cpu
  import bob_pkg::*;
#(
  parameter int unsigned AW = 16   // memory address width (words)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // memory load port (used while run = 0)
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  word_t         load_data,
  // observation
  input  ridx_t         dbg_ridx,
  output word_t         dbg_rdata,
  input  logic [AW-1:0] dbg_maddr,
  output word_t         dbg_mdata,
  output word_t         pc,
  output word_t         br,
  output logic          dir,
  output logic          alu_anc      // ALU ancilla, 0 when the adder is clean
);
  word_t  instr_word, ra_data, rb_data, mem_rdata;
  instr_t ins;
  word_t  alu_a, alu_b_out, unused_a_out, ra_wdata, br_next, pc_next;
  logic   dir_next, rf_we, mem_we;
  alu_op_t alu_op;
  logic [AW-1:0] mem_waddr;
  word_t  mem_wdata;

  assign ins = decode(instr_word);

  bob_memory #(.AW(AW)) u_mem (
    .clk       (clk),
    .fetch_addr(pc[AW-1:0]),
    .fetch_data(instr_word),
    .data_addr (rb_data[AW-1:0]),
    .data_rdata(mem_rdata),
    .we        (mem_we),
    .waddr     (mem_waddr),
    .wdata     (mem_wdata),
    .dbg_addr  (dbg_maddr),
    .dbg_data  (dbg_mdata)
  );

  bob_regfile u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .ra      (ins.ra),
    .rb      (ins.rb),
    .ra_data (ra_data),
    .rb_data (rb_data),
    .we      (rf_we),
    .wdata   (ra_wdata),
    .dbg_idx (dbg_ridx),
    .dbg_data(dbg_rdata)
  );

  // ALU control
  always_comb begin
    alu_op = ALU_PASS;
    alu_a  = rb_data;
    unique case (ins.op)
      OP_ADD:  alu_op = ALU_ADD;
      OP_SUB:  alu_op = ALU_SUB;
      OP_XOR:  alu_op = ALU_XOR;
      OP_NEG:  alu_op = ALU_NEG;
      OP_ADDI: begin alu_op = ALU_ADD; alu_a = ins.imm; end
      OP_XORI: begin alu_op = ALU_XOR; alu_a = ins.imm; end
      OP_RL:   begin alu_op = ALU_RL;  alu_a = ins.imm; end
      OP_RR:   begin alu_op = ALU_RR;  alu_a = ins.imm; end
      default: ;
    endcase
  end

  rev_alu u_alu (
    .op     (alu_op),
    .inv    (dir),
    .a      (alu_a),
    .b      (ra_data),
    .a_out  (unused_a_out),
    .b_out  (alu_b_out),
    .anc_out(alu_anc)
  );

  bob_br_update u_brupd (
    .ins     (ins),
    .dir     (dir),
    .br      (br),
    .ra_data (ra_data),
    .br_next (br_next),
    .dir_next(dir_next)
  );

  bob_pc_update u_pcupd (
    .pc     (pc),
    .br     (br_next),
    .dir    (dir_next),
    .pc_next(pc_next)
  );

  // register write-back: ALU result, memory word (EXCH) or old BR (SWBR)
  always_comb begin
    unique case (ins.op)
      OP_EXCH: ra_wdata = mem_rdata;
      OP_SWBR: ra_wdata = br;
      default: ra_wdata = alu_b_out;
    endcase
    rf_we = run && (ins.op inside {OP_ADD, OP_SUB, OP_XOR, OP_NEG, OP_ADDI,
                                   OP_XORI, OP_RL, OP_RR, OP_EXCH, OP_SWBR});
  end

  // memory write: exchange while running, load port while stopped
  always_comb begin
    if (run) begin
      mem_we    = (ins.op == OP_EXCH);
      mem_waddr = rb_data[AW-1:0];
      mem_wdata = ra_data;
    end else begin
      mem_we    = load_we;
      mem_waddr = load_addr;
      mem_wdata = load_data;
    end
  end

  // DIR, BR and PC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      br  <= '0;
      dir <= 1'b0;
    end else if (run) begin
      pc  <= pc_next;
      br  <= br_next;
      dir <= dir_next;
    end
  end

  // reversibility rules of the instruction set
  a_two_regs: assert property (@(posedge clk) disable iff (!rst_n)
      run && (ins.op inside {OP_ADD, OP_SUB, OP_XOR, OP_EXCH}) |-> ins.ra != ins.rb)
    else $error("bob_cpu: %s with ra == rb is not reversible", ins.op.name());
  a_clean_alu: assert property (@(posedge clk) disable iff (!rst_n) run |-> !alu_anc)
    else $error("bob_cpu: ALU ancilla not restored");
endmodule
