// tb_fredkin_gate: exhaustive check of the controlled swap: swap on c = 1,
// pass on c = 0, number of 1s preserved, and self-inverse.
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic c, x, y, c1, x1, y1, c2, x2, y2;
  fredkin_gate u0 (.c_in(c),  .x_in(x),  .y_in(y),  .c_out(c1), .x_out(x1), .y_out(y1));
  fredkin_gate u1 (.c_in(c1), .x_in(x1), .y_in(y1), .c_out(c2), .x_out(x2), .y_out(y2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, x, y} = v[2:0];
      #1;
      check(c1 == c, "control passes");
      check(x1 == (c ? y : x) && y1 == (c ? x : y), "swap");
      check(int'(c1) + int'(x1) + int'(y1) == int'(c) + int'(x) + int'(y), "conservative");
      check({c2, x2, y2} == {c, x, y}, "self-inverse");
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
