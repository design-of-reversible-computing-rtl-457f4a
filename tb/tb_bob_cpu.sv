// tb_bob_cpu: runs programs on the Bob processor (default sizes: 16-bit
// words, 16 registers, 64K-word memory) and compares PC, BR, DIR, every
// register and the touched memory words with the instruction-level
// reference model after every instruction.
//   Test 1: a program that uses every instruction, calls a subroutine
//           through SWBR, takes paired conditional branches, swaps a memory
//           word with EXCH, and ends in RBRA, which turns the machine round;
//           it then runs backwards to its start and must leave registers and
//           memory exactly as they were before the program ran.
//   Test 2: random straight-line programs followed by RBRA, run forwards and
//           backwards in the same way.
// Counts how often each opcode ran in each direction and fails for any that
// never ran. Checks one instruction per clock.
module tb_bob_cpu;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, run, load_we, dir, anc;
  logic [15:0] load_addr, dbg_maddr;
  word_t load_data, dbg_rdata, dbg_mdata, pc, br;
  ridx_t dbg_ridx;

  bob_cpu dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .dbg_ridx(dbg_ridx), .dbg_rdata(dbg_rdata),
    .dbg_maddr(dbg_maddr), .dbg_mdata(dbg_mdata),
    .pc(pc), .br(br), .dir(dir), .alu_anc(anc)
  );

  bob_ref_model ref_m ();

  int fwd_cnt [32];
  int bwd_cnt [32];
  int taken_cond = 0, calls = 0, reversals = 0;
  logic [15:0] watch [$];   // memory addresses compared after each step

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic do_reset();
    run = 0; load_we = 0; rst_n = 0;
    ref_m.clear();
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    @(posedge clk);
  endtask

  task automatic load(input int addr, input word_t w);
    load_we = 1; load_addr = 16'(addr); load_data = w;
    @(posedge clk); #1;
    load_we = 0;
    ref_m.mem[addr] = w;
    watch.push_back(16'(addr));
  endtask

  task automatic compare_state();
    check(pc == ref_m.pc && br == ref_m.br && dir == ref_m.dir,
          $sformatf("pc/br/dir %h/%h/%b exp %h/%h/%b", pc, br, dir, ref_m.pc, ref_m.br, ref_m.dir));
    for (int i = 0; i < 16; i++) begin
      dbg_ridx = 4'(i); #0.1;
      check(dbg_rdata == ref_m.r[i], $sformatf("r%0d=%h exp %h", i, dbg_rdata, ref_m.r[i]));
    end
    foreach (watch[k]) begin
      dbg_maddr = watch[k]; #0.1;
      check(dbg_mdata == ref_m.mem[watch[k]], $sformatf("mem[%h]=%h exp %h", watch[k], dbg_mdata, ref_m.mem[watch[k]]));
    end
  endtask

  // one instruction on both the processor and the model
  task automatic step(output opcode_t op);
    logic [15:0] br_before;
    logic        d;
    d = ref_m.dir;
    br_before = ref_m.br;
    run = 1;
    @(posedge clk); #1;
    run = 0;
    ref_m.step(op);
    if (d) bwd_cnt[op]++; else fwd_cnt[op]++;
    if (op inside {OP_BEZ, OP_BLTZ, OP_BGEZ} && ref_m.br != br_before) taken_cond++;
    if (op == OP_SWBR) calls++;
    if (op == OP_RBRA) reversals++;
    check(!anc, "ALU ancilla clean");
    compare_state();
  endtask

  // runs forwards until an RBRA, then backwards the same number of steps,
  // and checks that the data state is back where it started
  task automatic run_and_reverse(input int max_steps, input logic [15:0] start_mem [$]);
    opcode_t op;
    int n;
    n = 0;
    do begin
      step(op);
      n++;
    end while (op != OP_RBRA && n < max_steps);
    check(op == OP_RBRA, "program reached RBRA");
    check(dir == 1'b1, "direction flipped");
    repeat (n - 1) step(op);
    check(pc == 16'hffff && br == 0, $sformatf("back before start: pc=%h br=%h", pc, br));
    for (int i = 0; i < 16; i++) begin
      dbg_ridx = 4'(i); #0.1;
      check(dbg_rdata == 0, $sformatf("r%0d restored to 0 (is %h)", i, dbg_rdata));
    end
    foreach (watch[k]) begin
      dbg_maddr = watch[k]; #0.1;
      check(dbg_mdata == start_mem[k], $sformatf("mem[%h] restored", watch[k]));
    end
  endtask

  initial begin
    logic [15:0] snap [$];
    for (int i = 0; i < 32; i++) begin fwd_cnt[i] = 0; bwd_cnt[i] = 0; end
    dbg_ridx = 0; dbg_maddr = 0; load_addr = 0; load_data = 0;

    // ---------------- test 1: directed program ----------------
    do_reset();
    watch.delete();
    load(0,  enc_ri(OP_XORI, 2, 5));
    load(1,  enc_ri(OP_XORI, 3, -3));
    load(2,  enc_rr(OP_ADD, 2, 3));
    load(3,  enc_rr(OP_SUB, 3, 2));
    load(4,  enc_ri(OP_RL, 3, 3));
    load(5,  enc_ri(OP_RR, 2, 1));
    load(6,  enc_ri(OP_XORI, 4, 60));
    load(7,  enc_rr(OP_EXCH, 5, 4));
    load(8,  enc_rr(OP_XOR, 5, 2));
    load(9,  enc_ri(OP_ADDI, 6, -7));
    load(10, enc_br(OP_BRA, 13));           // call the subroutine at 23
    load(11, enc_ri(OP_BEZ, 7, 4));         // r7 == 0: taken to 15
    load(15, enc_ri(OP_BEZ, 7, -4));
    load(16, enc_ri(OP_BLTZ, 6, 2));        // r6 < 0: taken to 18
    load(18, enc_ri(OP_BLTZ, 6, -2));
    load(19, enc_ri(OP_BGEZ, 6, 5));        // not taken
    load(20, enc_br(OP_RBRA, 0));           // turn round
    // subroutine, body as in the machine-code example
    load(22, enc_br(OP_BRA, 7));
    load(23, enc_rr(OP_SWBR, 1, 0));
    load(24, enc_rr(OP_NEG, 1, 0));
    load(25, enc_rr(OP_NEG, 3, 0));
    load(26, enc_ri(OP_XORI, 3, 42));
    load(27, enc_rr(OP_ADD, 2, 3));
    load(28, enc_ri(OP_XORI, 3, 42));
    load(29, enc_br(OP_BRA, -7));
    load(60, 16'h1234);                     // data word
    snap.delete();
    foreach (watch[k]) snap.push_back(ref_m.mem[watch[k]]);
    compare_state();
    run_and_reverse(200, snap);

    // ---------------- test 2: random straight-line programs ----------------
    for (int prog = 0; prog < 20; prog++) begin
      int len;
      do_reset();
      watch.delete();
      len = 10 + int'($urandom_range(0, 30));
      for (int k = 0; k < len; k++) begin
        opcode_t o;
        int ra, rb;
        ra = int'($urandom_range(0, 15));
        do rb = int'($urandom_range(0, 15)); while (rb == ra);
        case ($urandom_range(0, 8))
          0: o = OP_ADD;  1: o = OP_SUB;  2: o = OP_XOR;  3: o = OP_NEG;
          4: o = OP_ADDI; 5: o = OP_XORI; 6: o = OP_RL;   7: o = OP_RR;
          default: o = OP_EXCH;
        endcase
        if (k < 4) o = OP_XORI;   // seed some registers
        if (o inside {OP_ADDI, OP_XORI, OP_RL, OP_RR})
          load(k, enc_ri(o, 4'(ra), int'($urandom_range(0, 127)) - 64));
        else
          load(k, enc_rr(o, 4'(ra), 4'(rb)));
      end
      load(len, enc_br(OP_RBRA, 0));
      // data region the EXCH instructions may reach with small addresses
      for (int k = 0; k < 8; k++) watch.push_back(16'(200 + k));
      snap.delete();
      foreach (watch[k]) snap.push_back(ref_m.mem[watch[k]]);
      run_and_reverse(100, snap);
    end

    // ---------------- mechanisms ----------------
    foreach (fwd_cnt[i]) begin
      if (i >= 1 && i <= 15) begin
        checks++;
        if (fwd_cnt[i] == 0 || (i != OP_RBRA && bwd_cnt[i] == 0)) begin
          failures++;
          $display("FAIL: opcode %0d ran fwd %0d / bwd %0d times", i, fwd_cnt[i], bwd_cnt[i]);
        end
      end
    end
    checks++;
    if (taken_cond == 0 || calls == 0 || reversals == 0) begin
      failures++; $display("FAIL: mechanism missing");
    end
    $display("taken conditional branches %0d, SWBR %0d, reversals %0d", taken_cond, calls, reversals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
