// tb_rev_systems_top: end-to-end test of the whole design at its default
// sizes (no parameter overrides).
//   Bob: a program is loaded through the load port and executed one
//   instruction per clock, compared after every instruction with the
//   instruction-level reference model. It contains the machine-code example
//   (BRA 6 / SWBR $1 / NEG $3 / XORI $3 42 / ADD $2 $3 / XORI $3 42 /
//   BRA -6), which is passed over by its paired branches, a subroutine call
//   through SWBR, paired conditional branches, a memory exchange, and a
//   final RBRA after which the machine runs backwards and must restore all
//   registers and memory.
//   RBCA, constant multiplier and gate example: random and corner operands
//   against plain arithmetic and the gate truth table.
// Mechanisms counted (each must occur): forward step, backward step,
// direction reversal, taken branch, conditional branch taken, SWBR call,
// EXCH, block carry rippled through a propagating block, constant-multiplier
// round trip, illegal remainder flagged, Fredkin swap in the gate example.
module tb_rev_systems_top;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, run, load_we, dir, anc;
  logic [15:0] load_addr, dbg_maddr;
  word_t load_data, dbg_rdata, dbg_mdata, pc, br;
  ridx_t dbg_ridx;
  logic rbca_inv;
  logic [15:0] rbca_a, rbca_b, rbca_ao, rbca_s;
  logic [3:0]  rbca_bc;
  logic [15:0] cm_a, cm_aq;
  logic [2:0]  cm_r, cm_rq;
  logic [18:0] cm_p, cm_pin;
  logic cm_ok;
  logic gx_a, gx_b, gx_c, gx_p, gx_q, gx_r;

  rev_systems_top dut (
    .clk(clk), .rst_n(rst_n),
    .bob_run(run), .bob_load_we(load_we), .bob_load_addr(load_addr), .bob_load_data(load_data),
    .bob_dbg_ridx(dbg_ridx), .bob_dbg_rdata(dbg_rdata), .bob_dbg_maddr(dbg_maddr), .bob_dbg_mdata(dbg_mdata),
    .bob_pc(pc), .bob_br(br), .bob_dir(dir), .bob_alu_anc(anc),
    .rbca_inv(rbca_inv), .rbca_a(rbca_a), .rbca_b(rbca_b), .rbca_a_out(rbca_ao), .rbca_s(rbca_s),
    .rbca_blk_carry(rbca_bc),
    .cm_a(cm_a), .cm_r(cm_r), .cm_p(cm_p), .cm_rem_ok(cm_ok), .cm_p_in(cm_pin), .cm_a_q(cm_aq), .cm_r_q(cm_rq),
    .gx_a(gx_a), .gx_b(gx_b), .gx_c(gx_c), .gx_p(gx_p), .gx_q(gx_q), .gx_r(gx_r)
  );

  bob_ref_model ref_m ();

  int n_fwd = 0, n_bwd = 0, n_rev = 0, n_branch = 0, n_cond = 0, n_call = 0, n_exch = 0;
  int n_ripple = 0, n_cm = 0, n_badrem = 0, n_swap = 0;
  logic [15:0] watch [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
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
      check(dbg_mdata == ref_m.mem[watch[k]], $sformatf("mem[%h]", watch[k]));
    end
  endtask

  task automatic step(output opcode_t op);
    logic [15:0] br0;
    logic d;
    d = ref_m.dir; br0 = ref_m.br;
    run = 1;
    @(posedge clk); #1;
    run = 0;
    ref_m.step(op);
    if (d) n_bwd++; else n_fwd++;
    if (op == OP_RBRA) n_rev++;
    if (op inside {OP_BRA, OP_RBRA} && ref_m.br != br0) n_branch++;
    if (op inside {OP_BEZ, OP_BLTZ, OP_BGEZ} && ref_m.br != br0) n_cond++;
    if (op == OP_SWBR) n_call++;
    if (op == OP_EXCH) n_exch++;
    check(!anc, "ALU ancilla clean");
    compare_state();
  endtask

  task automatic run_bob();
    opcode_t op;
    logic [15:0] snap [$];
    int n;
    run = 0; load_we = 0; rst_n = 0;
    ref_m.clear();
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    // main program
    load(0,  enc_ri(OP_XORI, 2, 9));
    load(1,  enc_ri(OP_XORI, 3, -20));
    load(2,  enc_ri(OP_XORI, 4, 100));
    load(3,  enc_rr(OP_EXCH, 5, 4));       // r5 <-> MEM[100]
    load(4,  enc_br(OP_BRA, 6));           // call the subroutine at 10
    load(5,  enc_ri(OP_BGEZ, 3, 3));       // r3 = 20 >= 0: taken to 8
    load(8,  enc_ri(OP_BGEZ, 3, -3));
    load(9,  enc_br(OP_BRA, 31));          // jump to 40
    // subroutine: entered at 10 from the BRA at 4; SWBR takes the return
    // offset out of BR, NEG turns it round, and the BRA at 16 comes back to
    // the SWBR, which puts it into BR again to return to 4
    load(10, enc_rr(OP_SWBR, 1, 0));
    load(11, enc_rr(OP_NEG, 1, 0));
    load(12, enc_rr(OP_NEG, 3, 0));
    load(13, enc_ri(OP_XORI, 3, 42));
    load(14, enc_rr(OP_ADD, 2, 3));
    load(15, enc_ri(OP_XORI, 3, 42));
    load(16, enc_br(OP_BRA, -6));          // back to the entry, swap BR back
    // machine-code example, passed over by its paired branches
    load(40, enc_br(OP_BRA, -31));         // landing of the jump from 9
    load(41, enc_br(OP_BRA, 6));
    load(42, enc_rr(OP_SWBR, 1, 0));
    load(43, enc_rr(OP_NEG, 3, 0));
    load(44, enc_ri(OP_XORI, 3, 42));
    load(45, enc_rr(OP_ADD, 2, 3));
    load(46, enc_ri(OP_XORI, 3, 42));
    load(47, enc_br(OP_BRA, -6));
    load(48, enc_rr(OP_XOR, 6, 2));
    load(49, enc_ri(OP_RL, 6, 5));
    load(50, enc_br(OP_RBRA, 0));
    load(100, 16'hbeef);
    snap.delete();
    foreach (watch[k]) snap.push_back(ref_m.mem[watch[k]]);
    compare_state();
    n = 0;
    do begin step(op); n++; end while (op != OP_RBRA && n < 500);
    check(op == OP_RBRA, "program reached RBRA");
    repeat (n - 1) step(op);
    check(pc == 16'hffff && br == 0 && dir == 1, $sformatf("returned before start: pc=%h", pc));
    for (int i = 0; i < 16; i++) begin
      dbg_ridx = 4'(i); #0.1; check(dbg_rdata == 0, $sformatf("r%0d restored", i));
    end
    foreach (watch[k]) begin
      dbg_maddr = watch[k]; #0.1; check(dbg_mdata == snap[k], "memory restored");
    end
    $display("Bob: %0d instructions forwards, %0d backwards", n_fwd, n_bwd);
  endtask

  task automatic run_arith();
    for (int k = 0; k < 2000; k++) begin
      logic [15:0] bb;
      rbca_a = 16'($urandom); rbca_b = 16'($urandom); rbca_inv = k[0];
      if (k < 2) begin rbca_a = 16'h0001; rbca_b = 16'h0fff; end
      cm_a = 16'($urandom); cm_r = 3'(k % 8);
      #1;
      check(rbca_s == (rbca_inv ? rbca_b - rbca_a : rbca_b + rbca_a) && rbca_ao == rbca_a, "rbca sum");
      bb = rbca_inv ? ~rbca_b : rbca_b;
      for (int j = 1; j < 4; j++)
        if (rbca_bc[j] && rbca_bc[j-1] && (&(rbca_a[(j-1)*4 +: 4] ^ bb[(j-1)*4 +: 4]))) n_ripple++;
      if (cm_r < 5) begin
        check(int'(cm_p) == int'(cm_a) * 5 + int'(cm_r) && cm_ok, "cm forward");
        cm_pin = cm_p; #1;
        check(cm_aq == cm_a && cm_rq == cm_r, "cm inverse");
        n_cm++;
      end else begin
        check(!cm_ok, "cm remainder flagged");
        n_badrem++;
      end
    end
    for (int v = 0; v < 8; v++) begin
      logic c1, ep;
      {gx_a, gx_b, gx_c} = v[2:0];
      #1;
      c1 = gx_b ^ gx_c; ep = gx_a ^ (gx_b & c1);
      check({gx_p, gx_q, gx_r} == {ep, ep ? c1 : gx_b, ep ? gx_b : c1}, "gate example");
      if (ep) n_swap++;
    end
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    dbg_ridx = 0; dbg_maddr = 0; load_addr = 0; load_data = 0;
    rbca_inv = 0; rbca_a = 0; rbca_b = 0; cm_a = 0; cm_r = 0; cm_pin = 0;
    gx_a = 0; gx_b = 0; gx_c = 0;
    run_bob();
    run_arith();
    need(n_fwd, "Bob forward steps");
    need(n_bwd, "Bob backward steps");
    need(n_rev, "Bob direction reversals");
    need(n_branch, "Bob taken BRA");
    need(n_cond, "Bob taken conditional branches");
    need(n_call, "Bob SWBR");
    need(n_exch, "Bob EXCH");
    need(n_ripple, "RBCA carry through a block");
    need(n_cm, "constant multiplier round trips");
    need(n_badrem, "illegal remainders flagged");
    need(n_swap, "gate example swaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
