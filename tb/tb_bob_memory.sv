// tb_bob_memory: checks the zero power-up contents, then random writes
// against a shadow copy through all three read ports, at a reduced size of
// 2^8 words so that every word can be checked.
module tb_bob_memory;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int AW = 8;
  logic [AW-1:0] fa, da, wa, ga;
  logic we;
  word_t fd, dd, wd, gd;
  word_t shadow [2**AW];
  bob_memory #(.AW(AW)) dut (.clk(clk), .fetch_addr(fa), .fetch_data(fd), .data_addr(da), .data_rdata(dd),
                              .we(we), .waddr(wa), .wdata(wd), .dbg_addr(ga), .dbg_data(gd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; fa = 0; da = 0; wa = 0; ga = 0; wd = 0;
    #1;
    for (int i = 0; i < 2**AW; i++) begin
      ga = AW'(i); #1; check(gd == 0, "power-up zero"); shadow[i] = 0;
    end
    for (int k = 0; k < 2000; k++) begin
      fa = AW'($urandom); da = AW'($urandom); ga = AW'($urandom); wa = AW'($urandom);
      wd = word_t'($urandom); we = $urandom_range(0, 1) == 1;
      #1;
      check(fd == shadow[fa] && dd == shadow[da] && gd == shadow[ga], "read ports");
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
    end
    we = 0;
    for (int i = 0; i < 2**AW; i++) begin ga = AW'(i); #1; check(gd == shadow[i], "final contents"); end
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
