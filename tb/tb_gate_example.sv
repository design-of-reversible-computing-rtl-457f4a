// tb_gate_example: exhaustive check of the three-line example circuit
// against its truth table worked out gate by gate, plus a check that the
// eight outputs are all different (the circuit is a permutation).
module tb_gate_example;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a, b, c, p, q, r;
  gate_example dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seen [8];
    logic ep, c1, eq, er;
    for (int v = 0; v < 8; v++) seen[v] = 0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      c1 = b ^ c;             // Feynman B -> C
      ep = a ^ (b & c1);      // Toffoli B,C -> A
      eq = ep ? c1 : b;       // Fredkin on A swaps B and C
      er = ep ? b : c1;
      check({p, q, r} == {ep, eq, er}, $sformatf("ABC=%03b PQR=%b%b%b", v[2:0], p, q, r));
      check(!seen[{p, q, r}], "output repeated");
      seen[{p, q, r}] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
