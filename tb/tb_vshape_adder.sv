// tb_vshape_adder: checks the V-shaped adder at the default width (16 bits)
// on corner values and random operands: forward gives (A, B + A mod 2^16),
// the mirrored cascade gives (A, S - A), running forward then mirror returns
// the input, and the ancilla line is always back at 0. An exhaustive run at
// 4 bits covers every carry pattern.
module tb_vshape_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 16;
  logic [N-1:0] a, b, ao, s, ao2, s2;
  logic inv, anc, anc2;
  vshape_adder #(.N(N)) dut  (.inv(inv),  .a(a),  .b(b), .a_out(ao),  .s(s),  .anc_out(anc));
  vshape_adder #(.N(N)) back (.inv(~inv), .a(ao), .b(s), .a_out(ao2), .s(s2), .anc_out(anc2));

  logic [3:0] a4, b4, ao4, s4;
  logic inv4, anc4;
  vshape_adder #(.N(4)) dut4 (.inv(inv4), .a(a4), .b(b4), .a_out(ao4), .s(s4), .anc_out(anc4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input logic [N-1:0] x, input logic [N-1:0] y, input logic i);
    logic [N-1:0] exp;
    a = x; b = y; inv = i;
    #1;
    exp = i ? y - x : y + x;
    check(s == exp, $sformatf("inv=%0d a=%h b=%h s=%h exp=%h", i, x, y, s, exp));
    check(ao == x, "a passes");
    check(!anc && !anc2, "ancilla clean");
    check(s2 == y && ao2 == x, "mirror restores input");
  endtask

  initial begin
    one('0, '0, 0); one('1, 16'd1, 0); one(16'h8000, 16'h8000, 0); one('1, '1, 1);
    one(16'h7fff, 16'h0001, 0); one(16'h0001, 16'h0000, 1);
    for (int k = 0; k < 2000; k++) one(N'($urandom), N'($urandom), k[0]);
    for (int v = 0; v < 512; v++) begin
      {inv4, a4, b4} = v[8:0];
      #1;
      checks++;
      if (s4 != (inv4 ? b4 - a4 : b4 + a4) || anc4 || ao4 != a4) begin
        failures++; $display("FAIL 4-bit inv=%0d a=%h b=%h s=%h", inv4, a4, b4, s4);
      end
    end
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
