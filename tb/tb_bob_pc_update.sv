// tb_bob_pc_update: checks next-PC = PC + 1 or PC + BR forwards and
// PC - 1 or PC - BR backwards, including wrap-around.
module tb_bob_pc_update;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  word_t pc, br, pcn;
  logic  dir;
  bob_pc_update dut (.pc(pc), .br(br), .dir(dir), .pc_next(pcn));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int e;
      pc  = (k < 4) ? word_t'(16'hffff * (k % 2)) : word_t'($urandom);
      br  = (k % 3 == 0) ? '0 : word_t'($urandom);
      dir = k[1];
      #1;
      e = dir ? int'(pc) - (br == 0 ? 1 : int'($signed(br))) : int'(pc) + (br == 0 ? 1 : int'($signed(br)));
      check(pcn == word_t'(e), $sformatf("pc %h br %h dir %0d -> %h", pc, br, dir, pcn));
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
