// tb_rbca_adder: checks the ripple-block carry adder at its default size
// (16 bits, blocks of 4): sums and differences against plain arithmetic, the
// corrected carry into each block against the carry of the plain sum at the
// block boundary, an exhaustive run at 6 bits with blocks of 2, and random
// operands at 64 bits with blocks of 8. Counts
// how often a carry had to be carried through a whole propagating block
// (the carry-correction ripple) and fails if that never happened.
module tb_rbca_adder;
  int checks = 0, failures = 0, ripples = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 16, BLK = 4;
  logic [N-1:0] a, b, ao, s;
  logic inv;
  logic [N/BLK-1:0] bc;
  rbca_adder #(.N(N), .BLK(BLK)) dut (.inv(inv), .a(a), .b(b), .a_out(ao), .s(s), .blk_carry(bc));

  logic [5:0] a6, b6, ao6, s6;
  logic inv6;
  logic [2:0] bc6;
  rbca_adder #(.N(6), .BLK(2)) dut6 (.inv(inv6), .a(a6), .b(b6), .a_out(ao6), .s(s6), .blk_carry(bc6));

  // wide instance: 64 bits in blocks of 8 (sqrt(64)), the size range where
  // the block structure matters most
  logic [63:0] a64, b64, ao64, s64;
  logic inv64;
  logic [7:0] bc64;
  rbca_adder #(.N(64), .BLK(8)) dut64 (.inv(inv64), .a(a64), .b(b64), .a_out(ao64), .s(s64), .blk_carry(bc64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input logic [N-1:0] x, input logic [N-1:0] y, input logic i);
    logic [N-1:0] exp, bb;
    logic [N:0]   lo;
    a = x; b = y; inv = i;
    #1;
    exp = i ? y - x : y + x;
    bb  = i ? ~y : y;
    check(s == exp && ao == x, $sformatf("inv=%0d a=%h b=%h s=%h exp=%h", i, x, y, s, exp));
    for (int j = 1; j < N / BLK; j++) begin
      lo = (N+1)'(x & ((1 << (j*BLK)) - 1)) + (N+1)'(bb & ((1 << (j*BLK)) - 1));
      check(bc[j] == lo[j*BLK], $sformatf("block carry %0d", j));
      // carry into block j came through the whole of block j-1
      if (bc[j] && bc[j-1] && (&(x[(j-1)*BLK +: BLK] ^ bb[(j-1)*BLK +: BLK]))) ripples++;
    end
    check(bc[0] == 1'b0, "block 0 carry-in");
  endtask

  initial begin
    one(16'h0001, 16'h0fff, 0); one(16'h0001, 16'hffff, 0); one(16'h00f1, 16'h0f0f, 0);
    for (int k = 0; k < 3000; k++) one(N'($urandom), N'($urandom), k[0]);
    for (int v = 0; v < 8192; v++) begin
      {inv6, a6, b6} = v[12:0];
      #1;
      checks++;
      if (s6 != (inv6 ? b6 - a6 : b6 + a6) || ao6 != a6) begin
        failures++; $display("FAIL 6-bit inv=%0d a=%h b=%h s=%h", inv6, a6, b6, s6);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; inv64 = k[0];
      if (k == 0) begin a64 = 64'd1; b64 = 64'h00ff_ffff_ffff_ffff; end
      #1;
      check(s64 == (inv64 ? b64 - a64 : b64 + a64) && ao64 == a64,
            $sformatf("64-bit inv=%0d a=%h b=%h s=%h", inv64, a64, b64, s64));
    end
    checks++;
    if (ripples == 0) begin failures++; $display("FAIL: carry never rippled through a block"); end
    $display("carry-correction ripples through a block: %0d", ripples);
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
