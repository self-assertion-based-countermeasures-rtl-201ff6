// tb_op_decoder: encodes random instructions of each of the 43 types with
// the testbench's own encoder and checks that the decoder names the type;
// also checks that FENCE, ECALL, illegal funct7 variants and other opcodes
// decode as OP_INVALID.
module tb_op_decoder;
  import sabc_pkg::*;
  import tb_rv_pkg::*;
  logic [31:0] w;
  op_e         op;
  int checks = 0, failures = 0;
  int seen [NUM_OPS+1];

  op_decoder dut (.instr(w), .op_code(op));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s w=%h op=%s", what, w, op.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i;
    foreach (seen[k]) seen[k] = 0;
    for (int n = 0; n < 5000; n++) begin
      i = rand_instr(0);
      w = i.word; #1;
      check(op == i.op, "type");
      seen[int'(i.op)]++;
    end
    for (int k = 1; k <= NUM_OPS; k++) check(seen[k] > 0, "every type generated");
    w = 32'h0ff0000f; #1; check(op == OP_INVALID, "fence");
    w = 32'h00000073; #1; check(op == OP_INVALID, "ecall");
    w = 32'h00100073; #1; check(op == OP_INVALID, "ebreak");
    w = 32'h02000033; #1; check(op == OP_INVALID, "mul (funct7 01)");
    w = 32'h40001013; #1; check(op == OP_INVALID, "slli funct7 20");
    w = 32'h40002033; #1; check(op == OP_INVALID, "slt funct7 20");
    w = 32'h00003003 | (32'h3 << 12); #1; check(op == OP_INVALID, "load f3=3");
    w = 32'h00003023; #1; check(op == OP_INVALID, "store f3=3");
    w = 32'h00002063; #1; check(op == OP_INVALID, "branch f3=2");
    w = 32'h00001067; #1; check(op == OP_INVALID, "jalr f3=1");
    w = 32'h0000007f; #1; check(op == OP_INVALID, "unknown opcode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
