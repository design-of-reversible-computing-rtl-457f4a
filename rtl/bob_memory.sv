// bob_memory: unified instruction and data memory of the Bob processor (MEM).
//
// Bob is a von Neumann machine: program and data share one word-addressed
// memory of 2^AW words. The memory has three combinational read ports
// (instruction fetch at the PC, data for the exchange instruction, and an
// observation port) and one synchronous write port. The processor only ever
// writes through an exchange, so memory contents are permuted, never lost.
// Contents are zero at power-up (an all-zero word is a NOP), as an FPGA
// block RAM with an initial value would be; there is no reset of the array.
// Memory size (the whole 16-bit address space) and the port arrangement are
// this design's choices.
module bob_memory
  import bob_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] fetch_addr,
  output word_t         fetch_data,
  input  logic [AW-1:0] data_addr,
  output word_t         data_rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  logic [AW-1:0] dbg_addr,
  output word_t         dbg_data
);
  word_t mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign fetch_data = mem[fetch_addr];
  assign data_rdata = mem[data_addr];
  assign dbg_data   = mem[dbg_addr];
endmodule
