// tb_rfi_sabc: presents random instructions of all 43 types to the RFI
// checker as the execute stage would see them: the fetched word, the decoded
// type, the immediate and the execute-register fields, all built by the
// testbench's own encoder. A consistent instruction must pass. Then one piece
// is damaged at a time and the checker must fire:
//   - one bit of the fetched word flipped (caught for every decoded type);
//   - a register address, funct3 or immediate bit corrupted where the
//     instruction format uses it.
// Invalid slots (ex_valid low) and OP_INVALID must never fire, and the sticky
// error flag must rise one clock after the first failure.
module tb_rfi_sabc;
  import sabc_pkg::*;
  import tb_rv_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            ex_valid = 0;
  logic [31:0]     ex_instr = '0;
  op_e             ex_op = OP_INVALID;
  logic [31:0]     ex_imm = '0;
  ex_view_t        ex = '0;
  logic            fail, err;
  int checks = 0, failures = 0;

  rfi_sabc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%s word=%h", what, ex_op.name(), ex_instr);
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
    ex_instr    = i.word;
    ex_imm      = i.imm;
    ex          = '0;
    ex.rs1_addr = i.word[19:15];
    ex.rs2_addr = i.word[24:20];
    ex.rd_addr  = i.word[11:7];
    ex.csr_addr = i.word[31:20];
    ex.funct3   = i.word[14:12];
    ex.alu_y    = (c.ysel == 1) ? i.imm : 32'($urandom);
  endtask

  // A random instruction whose immediate uses the full field width (the
  // shared generator keeps branch and jump targets short and memory
  // addresses small, since its instructions are also executed elsewhere).
  function automatic instr_t wide_instr(input int unsigned pct_invalid);
    instr_t      i;
    logic [31:0] r;
    i = rand_instr(pct_invalid);
    r = $urandom;
    case (i.op)
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU:
        i.word = encode(i.op, i.rd, i.rs1, i.rs2, {{19{r[12]}}, r[12:1], 1'b0}, i.csr);
      OP_JAL:
        i.word = encode(i.op, i.rd, i.rs1, i.rs2, {{11{r[20]}}, r[20:1], 1'b0}, i.csr);
      OP_JALR, OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU, OP_SB, OP_SH, OP_SW:
        i.word = encode(i.op, i.rd, 5'($urandom), i.rs2, {{20{r[11]}}, r[11:0]}, i.csr);
      default: ;
    endcase
    i.imm = imm_of(i.word);
    i.rs1 = i.word[19:15];
    return i;
  endfunction

  initial begin
    instr_t i;
    ctrl_t  c;
    bit     uses_rd, uses_rs2, uses_imm, uses_f3;
    logic [4:0] m5;
    logic [2:0] m3;
    int     which;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fault-free: never fires
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      i = wide_instr(5);
      present(i);
      ex_valid = 1'($urandom % 8 != 0);
      #1;
      check(!fail, "consistent instruction passes");
      check(!err, "no sticky error yet");
    end
    // damaged LHS: fetched word differs by one bit
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      i = wide_instr(0);
      present(i);
      ex_valid = 1;
      ex_instr = ex_instr ^ (32'h1 << ($urandom % 32));
      #1;
      check(fail, "flipped fetched bit detected");
      if (n == 0) begin
        @(posedge clk); #1;
        check(err, "sticky error set one clock after the failure");
        @(negedge clk);
      end
      ex_valid = 0; #1;
      check(!fail, "invalid slot ignored");
    end
    // damaged RHS fields
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      i = wide_instr(0);
      present(i);
      ex_valid = 1;
      c        = ctrl_of(i.op);
      uses_rd  = !(c.fmt inside {"S", "B"});
      uses_rs2 = c.fmt inside {"R", "S", "B"};
      uses_imm = !(c.fmt == "R") && !(i.op inside {OP_CSRRW, OP_CSRRS, OP_CSRRC,
                 OP_CSRRWI, OP_CSRRSI, OP_CSRRCI, OP_SLLI, OP_SRLI, OP_SRAI});
      uses_f3  = !(c.fmt inside {"U", "J"});
      which = $urandom % 4;
      m5    = 5'b1 << ($urandom % 5);
      m3    = 3'b1 << ($urandom % 3);
      case (which)
        0: if (uses_rd)  ex.rd_addr  = ex.rd_addr ^ m5;
        1: if (uses_rs2) ex.rs2_addr = ex.rs2_addr ^ m5;
        2: if (uses_f3)  ex.funct3   = ex.funct3 ^ m3;
        default: if (uses_imm) ex_imm = ex_imm ^ ((c.fmt == "U") ? 32'h0000_1000 : 32'h0000_0020);
      endcase
      #1;
      if ((which == 0 && uses_rd) || (which == 1 && uses_rs2) || (which == 2 && uses_f3) ||
          (which == 3 && uses_imm))
        check(fail, $sformatf("corrupted field %0d detected rs2=%h fmt=%c", which, ex.rs2_addr, c.fmt));
      else
        check(!fail, "unused field ignored");
    end
    // OP_INVALID never checked
    @(negedge clk);
    ex_op = OP_INVALID; ex_valid = 1; ex_instr = 32'hdeadbeef; #1;
    check(!fail, "OP_INVALID not checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
