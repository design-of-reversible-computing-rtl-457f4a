// tb_cnot_gate: exhaustive check of the n-bit controlled-NOT gate for the
// NOT (0 controls), Feynman (1) and Toffoli (2) cases: the target flips
// exactly when all controls are 1, the controls pass unchanged, and applying
// the gate twice gives the input back.
module tb_cnot_gate;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [0:0] c0_in, c0_out;  logic t0_in, t0_out;
  logic [1:0] c1_in, c1_out;  logic t1_in, t1_out;
  logic [2:0] c2_in, c2_out;  logic t2_in, t2_out;
  logic [2:0] c2b_out;        logic t2b_out;

  cnot_gate #(.NCTRL(0)) u_not (.ctrl_in(c0_in), .t_in(t0_in), .ctrl_out(c0_out), .t_out(t0_out));
  cnot_gate #(.NCTRL(1)) u_fey (.ctrl_in(c1_in), .t_in(t1_in), .ctrl_out(c1_out), .t_out(t1_out));
  cnot_gate #(.NCTRL(2)) u_tof (.ctrl_in(c2_in), .t_in(t2_in), .ctrl_out(c2_out), .t_out(t2_out));
  cnot_gate #(.NCTRL(2)) u_tof2(.ctrl_in(c2_out), .t_in(t2_out), .ctrl_out(c2b_out), .t_out(t2b_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      c0_in = 1'b0; t0_in = v[0];
      c1_in = {1'b0, v[1]}; t1_in = v[0];
      c2_in = {1'b0, v[2:1]}; t2_in = v[0];
      #1;
      check(t0_out == ~v[0], "NOT");
      check(t1_out == (v[0] ^ v[1]), "Feynman");
      check(c1_out == c1_in, "Feynman control");
      check(t2_out == (v[0] ^ (v[1] & v[2])), "Toffoli");
      check(c2_out == c2_in, "Toffoli controls");
      check(t2b_out == v[0] && c2b_out == c2_in, "Toffoli self-inverse");
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
