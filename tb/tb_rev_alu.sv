// tb_rev_alu: checks every ALU operation against plain arithmetic on corner
// and random operands, checks that the first operand passes unchanged and
// the adder's ancilla is clean, and checks reversibility: a second ALU with
// inv = 1 fed with the first one's outputs must give back the inputs.
module tb_rev_alu;
  import bob_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_t op;
  logic    inv, anc, anc2;
  word_t   a, b, ao, bo, ao2, bo2;
  rev_alu dut  (.op(op), .inv(inv),  .a(a),  .b(b),  .a_out(ao),  .b_out(bo),  .anc_out(anc));
  rev_alu undo (.op(op), .inv(!inv), .a(ao), .b(bo), .a_out(ao2), .b_out(bo2), .anc_out(anc2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic word_t model(input alu_op_t o, input logic i, input word_t x, input word_t y);
    int sh;
    sh = int'(x[3:0]);
    if (i) begin
      if (o == ALU_ADD) o = ALU_SUB; else if (o == ALU_SUB) o = ALU_ADD;
      else if (o == ALU_RL) o = ALU_RR; else if (o == ALU_RR) o = ALU_RL;
    end
    case (o)
      ALU_ADD: return y + x;
      ALU_SUB: return y - x;
      ALU_XOR: return y ^ x;
      ALU_NEG: return -y;
      ALU_RL:  return word_t'(({y, y} << sh) >> 16);
      ALU_RR:  return word_t'({y, y} >> sh);
      default: return y;
    endcase
  endfunction

  initial begin
    alu_op_t ops [7] = '{ALU_PASS, ALU_ADD, ALU_SUB, ALU_XOR, ALU_NEG, ALU_RL, ALU_RR};
    for (int k = 0; k < 4000; k++) begin
      op  = ops[k % 7];
      inv = k[3];
      a   = (k < 56) ? word_t'(k / 14) : word_t'($urandom);
      b   = (k < 28) ? 16'hffff : word_t'($urandom);
      #1;
      check(bo == model(op, inv, a, b),
            $sformatf("%s inv=%0d a=%h b=%h -> %h exp %h", op.name(), inv, a, b, bo, model(op, inv, a, b)));
      check(ao == a && !anc && !anc2, "a passes, ancilla clean");
      check(bo2 == b && ao2 == a, "inverse restores");
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
