// bob_regfile: general-purpose register file of the Bob processor (REGS).
//
// NREG registers of XLEN bits with two combinational read ports (ra, rb),
// a third read port for observation, and one synchronous write port: a Bob
// instruction changes at most one register, the ra operand, so one write
// port is enough. Reset clears every register.
// The register file as a block is the document's; its size (16 x 16 bit)
// and port arrangement are this design's choices.
module bob_regfile
  import bob_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ridx_t ra,
  input  ridx_t rb,
  output word_t ra_data,
  output word_t rb_data,
  input  logic  we,
  input  word_t wdata,        // written to register ra
  input  ridx_t dbg_idx,
  output word_t dbg_data
);
  word_t regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we) begin
      regs[ra] <= wdata;
    end
  end

  assign ra_data  = regs[ra];
  assign rb_data  = regs[rb];
  assign dbg_data = regs[dbg_idx];
endmodule
