// tb_dio_sabc: drives the DIO checker with random instructions whose
// execute-stage control (alu_op, mem_op, mem_size) comes from the
// testbench's own control table, and random word-aligned fetch addresses.
// Consistent state must pass. Then one item at a time is damaged and the
// checker must fire: alu_op replaced by another operation, mem_op changed,
// mem_size changed on a load or store, IMemAddr misaligned while a fetch is
// delivered. Damage that does not matter (mem_size of a non-memory
// instruction, a misaligned address with instr_ready low, an invalid slot)
// must not fire.
module tb_dio_sabc;
  import sabc_pkg::*;
  import tb_rv_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [31:0] imem_addr = '0;
  logic        if_ready = 0, ex_valid = 0;
  op_e         ex_op = OP_INVALID;
  ex_view_t    ex = '0;
  logic        fail, err;
  int checks = 0, failures = 0;

  dio_sabc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%s alu=%s mem=%s size=%s addr=%h", what, ex_op.name(),
               ex.alu_op.name(), ex.mem_op.name(), ex.mem_size.name(), imem_addr);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic present(input instr_t i);
    ctrl_t c;
    c           = ctrl_of(i.op);
    ex_op       = i.op;
    ex          = '0;
    ex.alu_op   = c.alu;
    ex.mem_op   = c.mem;
    ex.mem_size = (c.mem == MEM_NONE) ? mem_size_e'($urandom % 3) : c.size;
    imem_addr   = {$urandom, 2'b00};
    if_ready    = 1'($urandom);
  endtask

  initial begin
    instr_t i;
    ctrl_t  c;
    int     which;
    bit     expect_fail;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      i = rand_instr(5);
      present(i);
      ex_valid = 1'($urandom % 8 != 0);
      #1;
      check(!fail, "consistent state passes");
      check(!err, "no sticky error yet");
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      i = rand_instr(0);
      present(i);
      c = ctrl_of(i.op);
      ex_valid = 1;
      which = $urandom % 4;
      expect_fail = 1;
      case (which)
        0: ex.alu_op = alu_op_e'((int'(c.alu) + 1 + $urandom % 10) % 11);
        1: ex.mem_op = mem_op_e'((int'(c.mem) + 1 + $urandom % 2) % 3);
        2: begin
          ex.mem_size  = mem_size_e'((int'(ex.mem_size) + 1 + $urandom % 2) % 3);
          expect_fail  = c.mem != MEM_NONE;
        end
        default: begin
          imem_addr[1:0] = 2'(1 + $urandom % 3);
          expect_fail    = if_ready;
        end
      endcase
      #1;
      check(fail == expect_fail, $sformatf("damage %0d: fail=%0b", which, fail));
      if (n == 0 && expect_fail) begin
        @(posedge clk); #1;
        check(err, "sticky error set one clock after the failure");
      end
      ex_valid = 0; if_ready = 0; #1;
      check(!fail, "invalid slot and idle fetch ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
