// tb_crc_sabc: a three-stage (execute, memory, write-back) model of the
// monitored pipeline feeds the CRC checker with random instructions of all 43
// types, random operands, random stalls (advance low) and bubbles. All values
// are computed by the testbench's reference ALU and branch comparator.
// About one instruction in eight carries one damage, chosen at random:
//   A  alu_result wrong (the wrong value also travels on as DMemAddr),
//   B  branch_taken inverted,
//   C  DMemAddr wrong in the memory stage,
//   D  DMemDataOut wrong in a stored byte lane,
//   E  wb_rd_data wrong in the write-back stage.
// Every cycle the expected fail_alu / fail_br / fail_dp is worked out from
// which damaged instruction sits in which stage, and compared.
module tb_crc_sabc;
  import sabc_pkg::*;
  import tb_rv_pkg::*;

  typedef enum {NONE, A_ALU, B_BR, C_ADDR, D_DATA, E_WB} dmg_e;
  typedef struct {
    bit        valid;
    instr_t    i;
    ctrl_t     c;
    dmg_e      dmg;
    ex_view_t  exv;
    mem_view_t memv;
    wb_view_t  wbv;
  } rec_t;

  logic      clk = 0, rst_n = 0, advance = 0;
  logic      ex_valid, mem_valid, wb_valid;
  op_e       ex_op, mem_op, wb_op;
  logic [31:0] ex_imm;
  ex_view_t  ex;
  mem_view_t mem;
  wb_view_t  wb;
  logic      fail_dp, fail_alu, fail_br, fail, err;
  int checks = 0, failures = 0;
  int seen [dmg_e];

  crc_sabc dut (.*);

  always #5 clk = ~clk;

  rec_t s_ex, s_mem, s_wb;

  // a single set bit among the low 'n' bits
  function automatic logic [31:0] one_bit(input int unsigned n);
    int unsigned k;
    k = $urandom_range(n - 1, 0);
    return 32'h1 << k;
  endfunction

  function automatic rec_t new_rec(input bit allow_damage);
    rec_t r;
    logic [31:0] x, y, b;
    r.valid = ($urandom % 6) != 0;
    r.i     = rand_instr(3);
    r.c     = ctrl_of(r.i.op);
    r.exv   = '0;
    r.exv.rs1_addr    = r.i.rs1;
    r.exv.rs2_addr    = r.i.rs2;
    r.exv.rd_addr     = r.i.rd;
    r.exv.csr_addr    = r.i.csr;
    r.exv.funct3      = r.i.word[14:12];
    r.exv.alu_op      = r.c.alu;
    r.exv.mem_op      = r.c.mem;
    r.exv.mem_size    = r.c.size;
    r.exv.pc          = {$urandom, 2'b00};
    r.exv.rs1_forward = $urandom;
    r.exv.rs2_forward = ($urandom % 4 == 0) ? r.exv.rs1_forward : $urandom;
    x = (r.c.xsel == 0) ? r.exv.rs1_forward : (r.c.xsel == 1) ? r.exv.pc : 32'd0;
    y = (r.c.ysel == 0) ? r.exv.rs2_forward : (r.c.ysel == 1) ? r.i.imm : 32'd4;
    r.exv.alu_x       = x;
    r.exv.alu_y       = y;
    r.exv.alu_result  = alu_ref(r.c.alu, x, y);
    r.exv.branch_taken = taken_ref(r.i.op, r.exv.rs1_forward, r.exv.rs2_forward);
    r.dmg = NONE;
    if (allow_damage && r.valid && r.i.op != OP_INVALID && ($urandom % 8 == 0)) begin
      r.dmg = dmg_e'(1 + $urandom % 5);
      if (r.dmg == C_ADDR && r.c.mem == MEM_NONE)   r.dmg = NONE;
      if (r.dmg == D_DATA && r.c.mem != MEM_STORE)  r.dmg = NONE;
      if (r.dmg == E_WB && !r.c.wr)                 r.dmg = NONE;
      if (r.dmg == A_ALU && r.c.alu == ALU_NOP)     r.dmg = NONE;
    end
    if (r.dmg == A_ALU) r.exv.alu_result = r.exv.alu_result ^ one_bit(32);
    if (r.dmg == B_BR)  r.exv.branch_taken = ~r.exv.branch_taken;
    r.memv.mem_op   = r.c.mem;
    r.memv.mem_size = r.c.size;
    r.memv.rd_write = r.c.wr;
    r.memv.dmem_addr = r.exv.alu_result;
    case (r.c.size)
      SZ_BYTE: b = {24'b0, r.exv.rs2_forward[7:0]};
      SZ_HALF: b = {16'b0, r.exv.rs2_forward[15:0]};
      default: b = r.exv.rs2_forward;
    endcase
    r.memv.dmem_data_out = b;
    if (r.dmg == C_ADDR) r.memv.dmem_addr = r.memv.dmem_addr ^ one_bit(32);
    if (r.dmg == D_DATA)
      r.memv.dmem_data_out = r.memv.dmem_data_out ^
                             one_bit((r.c.size == SZ_BYTE) ? 8 : (r.c.size == SZ_HALF) ? 16 : 32);
    r.memv.mem_rd_data = (r.c.mem == MEM_LOAD) ? $urandom : r.exv.alu_result;
    r.wbv.wb_rd_data = r.memv.mem_rd_data;
    r.wbv.rd_addr    = r.i.rd;
    r.wbv.rd_write   = r.c.wr;
    if (r.dmg == E_WB) r.wbv.wb_rd_data = r.wbv.wb_rd_data ^ one_bit(32);
    return r;
  endfunction

  always_comb begin
    ex_valid  = s_ex.valid;  ex_op  = s_ex.i.op;  ex_imm = s_ex.i.imm; ex = s_ex.exv;
    mem_valid = s_mem.valid; mem_op = s_mem.i.op; mem = s_mem.memv;
    wb_valid  = s_wb.valid;  wb_op  = s_wb.i.op;  wb = s_wb.wbv;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t ex=%s/%s mem=%s/%s wb=%s/%s", what, $time,
               s_ex.i.op.name(), s_ex.dmg.name(), s_mem.i.op.name(), s_mem.dmg.name(),
               s_wb.i.op.name(), s_wb.dmg.name());
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_alu, e_br, e_dp;
    s_ex = new_rec(0); s_ex.valid = 0;
    s_mem = s_ex; s_wb = s_ex;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      #1;
      e_alu = s_ex.valid && s_ex.dmg == A_ALU;
      e_br  = s_ex.valid && s_ex.dmg == B_BR;
      e_dp  = (s_mem.valid && s_mem.dmg inside {C_ADDR, D_DATA}) ||
              (s_wb.valid && s_wb.dmg == E_WB);
      // damage A makes the execute-stage source CRC wrong too, but the same
      // wrong address travels on, so the memory stage stays consistent
      check(fail_alu == e_alu, "fail_alu");
      check(fail_br == e_br, "fail_br");
      check(fail_dp == e_dp, "fail_dp");
      check(fail == (e_alu || e_br || e_dp), "fail");
      if (e_alu) seen[A_ALU]++;
      if (e_br)  seen[B_BR]++;
      if (s_mem.valid && s_mem.dmg == C_ADDR) seen[C_ADDR]++;
      if (s_mem.valid && s_mem.dmg == D_DATA) seen[D_DATA]++;
      if (s_wb.valid && s_wb.dmg == E_WB) seen[E_WB]++;
      advance = ($urandom % 5) != 0;
      @(posedge clk);
      #1;
      if (advance) begin
        s_wb  = s_mem;
        s_mem = s_ex;
        s_ex  = new_rec(n > 2000);
      end
      if (n == 1999) check(!err, "no error while fault free");
    end
    check(err, "sticky error set");
    for (int k = 1; k <= 5; k++) begin
      check(seen[dmg_e'(k)] > 0, $sformatf("damage %s exercised", dmg_e'(k)));
      $display("damage %s seen in %0d cycles", dmg_e'(k), seen[dmg_e'(k)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
