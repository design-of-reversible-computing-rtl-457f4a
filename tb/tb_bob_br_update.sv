// tb_bob_br_update: checks the branch-register and direction update for
// every control-flow instruction in both directions, taken and not taken,
// and that other instructions leave BR and DIR alone.
module tb_bob_br_update;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  instr_t ins;
  logic   dir, dir_n;
  word_t  br, rad, br_n;
  bob_br_update dut (.ins(ins), .dir(dir), .br(br), .ra_data(rad), .br_next(br_n), .dir_next(dir_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      word_t w, eb, sgn;
      logic  ed, c;
      int    o;
      o   = int'($urandom_range(0, 15));
      w   = {5'(o), 11'($urandom)};
      ins = decode(w);
      dir = $urandom_range(0, 1) == 1;
      br  = (k % 3 == 0) ? '0 : word_t'($urandom);
      rad = (k % 4 == 0) ? '0 : word_t'($urandom);
      sgn = dir ? -16'sd1 : 16'sd1;
      eb = br; ed = dir;
      case (o)
        11: eb = br + sgn * 16'($signed(w[10:0]));
        12: begin eb = br + sgn * 16'($signed(w[10:0])); ed = !dir; end
        10: eb = rad;
        13, 14, 15: begin
          c = (o == 13) ? (rad == 0) : (o == 14) ? rad[15] : !rad[15];
          if (c) eb = br + sgn * 16'($signed(w[6:0]));
        end
        default: ;
      endcase
      #1;
      check(br_n == eb && dir_n == ed, $sformatf("op %0d dir %0d br %h -> %h/%0d exp %h/%0d", o, dir, br, br_n, dir_n, eb, ed));
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
