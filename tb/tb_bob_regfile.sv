// tb_bob_regfile: writes random values to random registers and checks all
// three read ports against a shadow copy; checks that reset clears every
// register and that nothing is written while we = 0.
module tb_bob_regfile;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, we;
  ridx_t ra, rb, di;
  word_t rad, rbd, wd, dd;
  word_t shadow [16];
  bob_regfile dut (.clk(clk), .rst_n(rst_n), .ra(ra), .rb(rb), .ra_data(rad), .rb_data(rbd),
                   .we(we), .wdata(wd), .dbg_idx(di), .dbg_data(dd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; ra = 0; rb = 0; di = 0; wd = 0; rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      di = 4'(i); #1; check(dd == 0, "reset value"); shadow[i] = 0;
    end
    for (int k = 0; k < 500; k++) begin
      ra = 4'($urandom); rb = 4'($urandom); di = 4'($urandom);
      wd = word_t'($urandom); we = ($urandom_range(0, 3) != 0);
      #1;
      check(rad == shadow[ra] && rbd == shadow[rb] && dd == shadow[di], "read ports");
      @(posedge clk); #1;
      if (we) shadow[ra] = wd;
    end
    we = 0;
    for (int i = 0; i < 16; i++) begin di = 4'(i); #1; check(dd == shadow[i], "final contents"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
