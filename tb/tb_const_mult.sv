// tb_const_mult: checks the constant multiplier with remainder for the
// default M = 5 and for M = 2^3 - 1 = 7: forward P = A*M + R for all legal
// remainders, inverse recovers (A, R), illegal remainders are flagged, and
// distinct (A, R) pairs give distinct products at a small width.
module tb_const_mult;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 16;
  logic [N-1:0] a, aq;
  logic [2:0]   r, rq;
  logic [N+2:0] p;
  logic ok;
  const_mult dut (.a(a), .r(r), .p(p), .rem_ok(ok), .p_in(p), .a_q(aq), .r_q(rq));

  logic [5:0] a7, aq7;
  logic [3:0] r7, rq7;
  logic [9:0] p7;
  logic ok7;
  const_mult #(.N(6), .K(3), .PLUS(1'b0)) dut7
    (.a(a7), .r(r7), .p(p7), .rem_ok(ok7), .p_in(p7), .a_q(aq7), .r_q(rq7));

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seen [1024];
    for (int k = 0; k < 2000; k++) begin
      a = (k < 5) ? N'(k) : (k < 10 ? N'('1 - k) : N'($urandom));
      r = 3'(k % 8);
      #1;
      if (r < 5) begin
        check(int'(p) == int'(a) * 5 + int'(r), $sformatf("a=%0d r=%0d p=%0d", a, r, p));
        check(ok && aq == a && rq == r, "inverse of M=5");
      end else begin
        check(!ok, "illegal remainder flagged");
      end
    end
    for (int v = 0; v < 1024; v++) seen[v] = 0;
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 7; y++) begin
        a7 = 6'(x); r7 = 4'(y);
        #1;
        check(int'(p7) == x * 7 + y && ok7, $sformatf("M=7 a=%0d r=%0d p=%0d", x, y, p7));
        check(aq7 == a7 && rq7 == r7, "inverse of M=7");
        check(!seen[p7], "product repeated");
        seen[p7] = 1;
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
