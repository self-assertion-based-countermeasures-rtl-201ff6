// tb_sabc_top: end-to-end test of the countermeasure module beside a model of
// a 5-stage RV32I pipeline. The model fetches random instructions of all 43
// types, executes them architecturally at fetch time (register file, 1 KiB
// data memory, branches and jumps), and moves them through decode, execute,
// memory and write-back with random stalls (advance low), fetch bubbles
// (instr_ready low) and a two-instruction flush after every taken branch or
// jump; the wrong-path instructions fetched meanwhile are never executed. A
// second, "physical" register file with synchronous read is written from the
// write-back stage and read in decode, as the monitored core's would be.
//
// Episodes, each starting from reset:
//   0  fault free: no checker may fire in any cycle; the counter cell counts
//      the transitions of a branch-comparator node (equality of the low four
//      operand bits), and the count is checked directly and after scan-out;
//   1  the decode register holds a word with one bit different from the
//      fetched word (RFI must fire);
//   2  an execute-stage alu_op is wrong (DIO must fire);
//   3  an ALU result is wrong (CRC must fire);
//   4  a register-file bit is stuck at 1 (SRC must fire);
//   5  an inversion fault is scanned into the counter cell and must show on
//      its node output during the run.
// After each damage episode 'halt' must be high. Each mechanism (stall,
// bubble, flush, load, store, each checker firing, halt, scan-out, fault
// injection) is counted, and one that never happened counts as a failure.
module tb_sabc_top;
  import sabc_pkg::*;
  import tb_rv_pkg::*;

  typedef enum {DM_NONE, DM_RFI, DM_DIO, DM_CRC} dmg_e;

  typedef struct {
    bit          valid;     // an instruction (not a bubble)
    bit          wrong;     // wrong-path: will be flushed
    instr_t      i;
    ctrl_t       c;
    logic [31:0] pc;
    logic [31:0] dword;     // word in the decode register
    logic [31:0] rs1v, rs2v, x, y, alu, rdv, st;
    bit          taken;
    dmg_e        dmg;
  } rec_t;

  // DUT signals
  logic        clk = 0, rst_n = 0, advance = 0, flush;
  if_view_t    if_v;
  de_view_t    de_v;
  ex_view_t    ex_v;
  mem_view_t   mem_v;
  wb_view_t    wb_v;
  logic [31:0] rf_rs1_data, rf_rs2_data;
  logic        scan_en = 0, cnt_en = 0;
  logic [2:0]  scan_in = '0, scan_out;
  logic        cnt_node_in, cnt_node_out;
  logic [16:0] cnt_count;
  op_e         de_op_code;
  sabc_err_t   fail, err;
  logic [2:0]  crc_cause;
  logic        halt;

  sabc_top dut (.*);

  always #5 clk = ~clk;

  // model state
  rec_t        F, D, E, M, W;
  logic [31:0] areg [32];
  logic [7:0]  dmem [1024];
  logic [31:0] preg [32];
  logic [31:0] rf1_q, rf2_q;
  logic [31:0] fetch_pc;
  bit          await_flush;
  dmg_e        pending_dmg;
  int          stuck_reg;       // SRC damage: register with bit 3 stuck at 1, 0 = none
  int          pct_bubble = 10, pct_stall = 20;

  int checks = 0, failures = 0;
  int n_stall = 0, n_bubble = 0, n_flush = 0, n_load = 0, n_store = 0, n_instr = 0;
  int n_rfi = 0, n_dio = 0, n_crc = 0, n_src = 0, n_halt = 0, n_scan = 0, n_inject = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rec_t bubble();
    rec_t r;
    r.valid = 0; r.wrong = 0; r.i = '{op: OP_INVALID, word: 0, rd: 0, rs1: 0, rs2: 0, imm: 0, csr: 0};
    r.c = ctrl_of(OP_INVALID); r.pc = 0; r.dword = 0;
    r.rs1v = 0; r.rs2v = 0; r.x = 0; r.y = 0; r.alu = 0; r.rdv = 0; r.st = 0;
    r.taken = 0; r.dmg = DM_NONE;
    return r;
  endfunction

  function automatic logic [31:0] load_val(input op_e op, input logic [31:0] a);
    logic [31:0] w;
    w = {dmem[(a + 3) % 1024], dmem[(a + 2) % 1024], dmem[(a + 1) % 1024], dmem[a % 1024]};
    case (op)
      OP_LB:  return {{24{w[7]}}, w[7:0]};
      OP_LBU: return {24'b0, w[7:0]};
      OP_LH:  return {{16{w[15]}}, w[15:0]};
      OP_LHU: return {16'b0, w[15:0]};
      default: return w;
    endcase
  endfunction

  // Fetch one slot: a bubble, a wrong-path word or an executed instruction.
  function automatic rec_t fetch();
    rec_t r;
    r = bubble();
    if (($urandom % 100) < pct_bubble) return r;
    r.valid = 1;
    r.pc    = fetch_pc;
    r.i     = rand_instr(2);
    r.c     = ctrl_of(r.i.op);
    r.dword = r.i.word;
    if (await_flush) begin
      r.wrong  = 1;
      fetch_pc = fetch_pc + 4;
      return r;
    end
    r.rs1v = (r.i.rs1 == 0) ? 0 : areg[r.i.rs1];
    r.rs2v = (r.i.rs2 == 0) ? 0 : areg[r.i.rs2];
    r.x    = (r.c.xsel == 0) ? r.rs1v : (r.c.xsel == 1) ? r.pc : 32'd0;
    r.y    = (r.c.ysel == 0) ? r.rs2v : (r.c.ysel == 1) ? r.i.imm : 32'd4;
    r.alu  = alu_ref(r.c.alu, r.x, r.y);
    r.taken = taken_ref(r.i.op, r.rs1v, r.rs2v);
    r.rdv  = r.alu;
    if (r.c.mem == MEM_LOAD) r.rdv = load_val(r.i.op, r.alu);
    if (r.i.op inside {OP_CSRRW, OP_CSRRS, OP_CSRRC, OP_CSRRWI, OP_CSRRSI, OP_CSRRCI})
      r.rdv = {20'b0, r.i.csr};
    case (r.c.size)
      SZ_BYTE: r.st = {24'b0, r.rs2v[7:0]};
      SZ_HALF: r.st = {16'b0, r.rs2v[15:0]};
      default: r.st = r.rs2v;
    endcase
    if (r.c.mem == MEM_STORE) begin
      dmem[r.alu % 1024] = r.rs2v[7:0];
      if (r.c.size != SZ_BYTE) dmem[(r.alu + 1) % 1024] = r.rs2v[15:8];
      if (r.c.size == SZ_WORD) begin
        dmem[(r.alu + 2) % 1024] = r.rs2v[23:16];
        dmem[(r.alu + 3) % 1024] = r.rs2v[31:24];
      end
    end
    if (r.c.wr && r.i.rd != 0) areg[r.i.rd] = r.rdv;
    // damage requested by the running episode
    if (pending_dmg == DM_RFI && r.c.wr && !r.taken) begin
      r.dmg = DM_RFI; r.dword = r.i.word ^ 32'h0000_0080;   // rd bit 0 in the decode register
      pending_dmg = DM_NONE;
    end else if (pending_dmg == DM_DIO && r.i.op != OP_INVALID) begin
      r.dmg = DM_DIO; pending_dmg = DM_NONE;
    end else if (pending_dmg == DM_CRC && r.c.alu != ALU_NOP && !r.taken) begin
      // the wrong result travels on as DMemAddr; the register value stays right
      r.dmg = DM_CRC; r.alu = r.alu ^ 32'h0004_0000; pending_dmg = DM_NONE;
    end
    n_instr++;
    if (r.taken) begin
      await_flush = 1;
      fetch_pc = (r.i.op == OP_JALR) ? ((r.rs1v + r.i.imm) & ~32'd1) : r.pc + r.i.imm;
    end else
      fetch_pc = fetch_pc + 4;
    return r;
  endfunction

  // Drive the monitored signals from the stage records.
  always_comb begin
    if_v.imem_addr   = F.pc;
    if_v.instruction = F.i.word;
    if_v.instr_ready = F.valid;
    de_v.instruction = D.dword;
    de_v.immediate   = imm_of(D.dword);
    de_v.rs1_addr    = D.dword[19:15];
    de_v.rs2_addr    = D.dword[24:20];
    ex_v              = '0;
    ex_v.rs1_addr     = E.dword[19:15];
    ex_v.rs2_addr     = E.dword[24:20];
    ex_v.rd_addr      = E.dword[11:7];
    ex_v.csr_addr     = E.dword[31:20];
    ex_v.funct3       = E.dword[14:12];
    ex_v.alu_op       = (E.dmg == DM_DIO) ? ((E.c.alu == ALU_XOR) ? ALU_OR : ALU_XOR) : E.c.alu;
    ex_v.mem_op       = E.c.mem;
    ex_v.mem_size     = E.c.size;
    ex_v.pc           = E.pc;
    ex_v.alu_x        = E.x;
    ex_v.alu_y        = E.y;
    ex_v.alu_result   = E.alu;
    ex_v.rs1_forward  = E.rs1v;
    ex_v.rs2_forward  = E.rs2v;
    ex_v.branch_taken = E.valid && E.taken;
    flush             = E.valid && !E.wrong && E.taken;
    mem_v.mem_op        = M.c.mem;
    mem_v.mem_size      = M.c.size;
    mem_v.dmem_addr     = M.alu;
    mem_v.dmem_data_out = M.st;
    mem_v.mem_rd_data   = M.rdv;
    mem_v.rd_write      = M.valid && M.c.wr;
    wb_v.wb_rd_data = W.rdv;
    wb_v.rd_addr    = W.dword[11:7];
    wb_v.rd_write   = W.valid && W.c.wr;
    rf_rs1_data     = rf1_q;
    rf_rs2_data     = rf2_q;
    cnt_node_in     = E.valid && (E.rs1v[3:0] == E.rs2v[3:0]);
  end

  function automatic logic [31:0] prd(input logic [4:0] a);
    if (a == 0) return 0;
    if (wb_v.rd_write && wb_v.rd_addr == a)
      return (stuck_reg == int'(a)) ? (wb_v.wb_rd_data | 32'h8) : wb_v.wb_rd_data;
    return preg[a];
  endfunction

  // One clock of the model, applied just after the rising edge the DUT used.
  task automatic step();
    bit adv, fl;
    adv = advance;
    fl  = flush;
    @(posedge clk);
    #1;
    if (adv) begin
      rf1_q = prd(de_v.rs1_addr);
      rf2_q = prd(de_v.rs2_addr);
    end
    if (wb_v.rd_write && wb_v.rd_addr != 0)
      preg[wb_v.rd_addr] = (stuck_reg == int'(wb_v.rd_addr)) ? (wb_v.wb_rd_data | 32'h8)
                                                              : wb_v.wb_rd_data;
    if (adv) begin
      if (fl) begin
        n_flush++;
        await_flush = 0;
      end
      if (M.valid && M.c.mem == MEM_LOAD)  n_load++;
      if (M.valid && M.c.mem == MEM_STORE) n_store++;
      W = M;
      M = E;
      E = fl ? bubble() : D;
      D = fl ? bubble() : F;
      F = fetch();
      if (!F.valid) n_bubble++;
    end else
      n_stall++;
    advance = ($urandom % 100) >= pct_stall;
    #1;   // let the monitored signals settle before anyone looks at them
  endtask

  task automatic restart();
    rst_n = 0;
    foreach (areg[k]) begin areg[k] = 0; preg[k] = 0; end
    foreach (dmem[k]) dmem[k] = 8'($urandom);
    rf1_q = 0; rf2_q = 0; fetch_pc = 0; await_flush = 0;
    pending_dmg = DM_NONE; stuck_reg = 0;
    F = bubble(); D = bubble(); E = bubble(); M = bubble(); W = bubble();
    advance = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    advance = 1;
  endtask

  // Load the counter cell's scan chains with configuration 'cfg' (clears the count).
  // The pipeline is held (advance low) meanwhile.
  task automatic scan_config(input logic [2:0] cfg);
    advance = 0;
    @(negedge clk);
    scan_en = 1; scan_in = cfg;
    @(negedge clk);
    scan_en = 0; scan_in = '0;
    @(posedge clk);
    #1 advance = 1;
  endtask

  // Shift the count out of the three chains and rebuild it.
  task automatic scan_read(output logic [16:0] v);
    advance = 0;
    @(negedge clk);
    v = '0;
    v[16] = scan_out[2];
    scan_en = 1;
    for (int k = 0; k < 8; k++) begin
      v[k]     = scan_out[0];
      v[8 + k] = scan_out[1];
      @(negedge clk);
    end
    scan_en = 0;
    n_scan++;
  endtask

  // Run until the given flag is set or 'limit' cycles pass; returns cycles used.
  task automatic run_until(input int which, input int limit, output int used);
    used = 0;
    while (used < limit) begin
      step();
      used++;
      case (which)
        0: if (err.rfi) break;
        1: if (err.dio) break;
        2: if (err.crc) break;
        default: if (err.src) break;
      endcase
    end
  endtask

  initial begin
    int          exp_cnt, used;
    logic [16:0] cnt_before;
    logic        prev_node;
    logic [16:0] got;
    F = bubble(); D = bubble(); E = bubble(); M = bubble(); W = bubble();
    foreach (areg[k]) begin areg[k] = 0; preg[k] = 0; end
    rf1_q = 0; rf2_q = 0; fetch_pc = 0;

    // ---- episode 0: fault free, with the counter running ----
    restart();
    scan_config(3'b000);
    exp_cnt   = 0;
    prev_node = cnt_node_in;
    cnt_en    = 1;
    for (int n = 0; n < 20000; n++) begin
      #0;
      check(fail == '0, $sformatf("no checker fires when fault free (fail=%b cause=%b)", fail, crc_cause));
      check(cnt_node_out == cnt_node_in, "counter node passes through");
      if (cnt_node_in != prev_node) exp_cnt++;
      prev_node = cnt_node_in;
      step();
    end
    cnt_en = 0;
    check(err == '0 && !halt, "no error flag, no halt after a clean run");
    @(negedge clk);
    check(cnt_count == 17'(exp_cnt), $sformatf("transition count %0d vs %0d", cnt_count, exp_cnt));
    scan_read(got);
    check(got == 17'(exp_cnt), $sformatf("scanned count %0d vs %0d", got, exp_cnt));
    $display("episode 0: %0d instructions, %0d transitions counted", n_instr, exp_cnt);

    // ---- episodes 1..4: one damage each ----
    for (int ep = 1; ep <= 4; ep++) begin
      restart();
      repeat (300) begin
        step();
        check(fail == '0, $sformatf("clean before damage fail=%b cause=%b E=%s F=%s", fail, crc_cause, E.i.op.name(), F.i.op.name()));
      end
      check(!halt, "no halt before damage");
      case (ep)
        1: pending_dmg = DM_RFI;
        2: pending_dmg = DM_DIO;
        3: pending_dmg = DM_CRC;
        default: stuck_reg = 5 + $urandom % 20;
      endcase
      run_until(ep - 1, 3000, used);
      case (ep)
        1: begin check(err.rfi, "RFI detects a decode-register bit flip"); if (err.rfi) n_rfi++; end
        2: begin check(err.dio, "DIO detects a wrong alu_op"); if (err.dio) n_dio++; end
        3: begin check(err.crc, "CRC detects a wrong ALU result"); if (err.crc) n_crc++; end
        default: begin check(err.src, "SRC detects a stuck register-file bit"); if (err.src) n_src++; end
      endcase
      @(negedge clk);
      check(halt, "halt raised after detection");
      if (halt) n_halt++;
      $display("episode %0d: detected after %0d cycles, err=%b", ep, used, err);
    end

    // ---- episode 5: inversion fault on the counter node ----
    restart();
    scan_config(3'b111);
    cnt_en = 1;
    repeat (500) begin
      #0;
      check(cnt_node_out == ~cnt_node_in, "inversion fault on the node");
      step();
    end
    cnt_en = 0;
    n_inject++;
    @(negedge clk);
    cnt_before = cnt_count;
    check(cnt_before > 0, "node toggled during the fault run");
    scan_read(got);
    check(got == cnt_before, "scan-out of the fault run");

    // ---- every mechanism happened ----
    check(n_stall > 0,  "stall seen");
    check(n_bubble > 0, "fetch bubble seen");
    check(n_flush > 0,  "flush seen");
    check(n_load > 0,   "load seen");
    check(n_store > 0,  "store seen");
    check(n_rfi > 0 && n_dio > 0 && n_crc > 0 && n_src > 0, "every checker fired");
    check(n_halt == 4,  "halt after every detection");
    check(n_scan == 2 && n_inject == 1, "scan-out and fault injection");
    $display("mechanisms: instr=%0d stall=%0d bubble=%0d flush=%0d load=%0d store=%0d rfi=%0d dio=%0d crc=%0d src=%0d halt=%0d scan=%0d inject=%0d",
             n_instr, n_stall, n_bubble, n_flush, n_load, n_store, n_rfi, n_dio, n_crc, n_src,
             n_halt, n_scan, n_inject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
