// rev_systems_top: the reversible computing systems side by side.
//
// The design is a collection of garbage-free reversible circuits that do
// not feed each other, so the top places them next to each other and brings
// each one's ports out under its own prefix:
//   bob_*  the Bob reversible processor (which contains the reversible ALU,
//          built around the V-shaped adder)
//   rbca_* the ripple-block carry adder, (A, B) -> (A, A + B)
//   cm_*   the constant multiplier with remainder, (A, R) <-> A*M + R
//   gx_*   the three-line gate-level example circuit (Feynman, Toffoli and
//          Fredkin gates)
// Only the processor is clocked; the other three are combinational.
// Parameters carry the default sizes of each block.
module rev_systems_top
  import bob_pkg::*;
#(
  parameter int unsigned BOB_AW   = 16,
  parameter int unsigned RBCA_N   = 16,
  parameter int unsigned RBCA_BLK = 4,
  parameter int unsigned CM_N     = 16,
  parameter int unsigned CM_K     = 2,
  parameter bit          CM_PLUS  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // Bob processor
  input  logic              bob_run,
  input  logic              bob_load_we,
  input  logic [BOB_AW-1:0] bob_load_addr,
  input  word_t             bob_load_data,
  input  ridx_t             bob_dbg_ridx,
  output word_t             bob_dbg_rdata,
  input  logic [BOB_AW-1:0] bob_dbg_maddr,
  output word_t             bob_dbg_mdata,
  output word_t             bob_pc,
  output word_t             bob_br,
  output logic              bob_dir,
  output logic              bob_alu_anc,
  // ripple-block carry adder
  input  logic                     rbca_inv,
  input  logic [RBCA_N-1:0]        rbca_a,
  input  logic [RBCA_N-1:0]        rbca_b,
  output logic [RBCA_N-1:0]        rbca_a_out,
  output logic [RBCA_N-1:0]        rbca_s,
  output logic [RBCA_N/RBCA_BLK-1:0] rbca_blk_carry,
  // constant multiplier
  input  logic [CM_N-1:0]      cm_a,
  input  logic [CM_K:0]        cm_r,
  output logic [CM_N+CM_K:0]   cm_p,
  output logic                 cm_rem_ok,
  input  logic [CM_N+CM_K:0]   cm_p_in,
  output logic [CM_N-1:0]      cm_a_q,
  output logic [CM_K:0]        cm_r_q,
  // gate-level example
  input  logic              gx_a,
  input  logic              gx_b,
  input  logic              gx_c,
  output logic              gx_p,
  output logic              gx_q,
  output logic              gx_r
);
  bob_cpu #(.AW(BOB_AW)) u_bob (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (bob_run),
    .load_we  (bob_load_we),
    .load_addr(bob_load_addr),
    .load_data(bob_load_data),
    .dbg_ridx (bob_dbg_ridx),
    .dbg_rdata(bob_dbg_rdata),
    .dbg_maddr(bob_dbg_maddr),
    .dbg_mdata(bob_dbg_mdata),
    .pc       (bob_pc),
    .br       (bob_br),
    .dir      (bob_dir),
    .alu_anc  (bob_alu_anc)
  );

  rbca_adder #(.N(RBCA_N), .BLK(RBCA_BLK)) u_rbca (
    .inv      (rbca_inv),
    .a        (rbca_a),
    .b        (rbca_b),
    .a_out    (rbca_a_out),
    .s        (rbca_s),
    .blk_carry(rbca_blk_carry)
  );

  const_mult #(.N(CM_N), .K(CM_K), .PLUS(CM_PLUS)) u_cm (
    .a     (cm_a),
    .r     (cm_r),
    .p     (cm_p),
    .rem_ok(cm_rem_ok),
    .p_in  (cm_p_in),
    .a_q   (cm_a_q),
    .r_q   (cm_r_q)
  );

  gate_example u_gx (
    .a(gx_a), .b(gx_b), .c(gx_c),
    .p(gx_p), .q(gx_q), .r(gx_r)
  );
endmodule
