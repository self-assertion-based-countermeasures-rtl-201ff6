// tb_sabc_system: end-to-end test of the full system (checkers, counter cell
// and fault-emulation engine) beside a model of a 5-stage RV32I pipeline.
// The model fetches random instructions of all 43 types, executes them
// architecturally at fetch time (register file, 1 KiB data memory, branches
// and jumps) and moves them through decode, execute, memory and write-back
// with random stalls, fetch bubbles and a two-instruction flush after every
// taken branch or jump; wrong-path instructions are never executed. A second,
// "physical" register file with synchronous read is written from write-back
// and read in decode. Stores to the top 64 bytes of data memory are the
// processor's serial-port writes.
//
// Everything on the test side goes through the GPIO command pair, as the
// managing program would: scan configuration and read-out of the counter
// cell, the run length, START/STOP and the read-back of status, cycle count,
// address history and serial bytes. The pipeline only moves while core_run
// is high.
//
// Episodes, each starting from reset:
//   0  fault free, 20000-cycle run: no checker may fire; the counter's count
//      of a branch-comparator node is checked directly and after scan-out; the
//      run length, the 50 newest address-bus changes and the serial bytes
//      read back must match the model;
//   1  the decode register holds a word with one bit different from the
//      fetched word (RFI must fire);
//   2  an execute-stage alu_op is wrong (DIO must fire);
//   3  an ALU result is wrong (CRC must fire);
//   4  a register-file bit is stuck at 1 (SRC must fire);
//      after each of 1..4 the run is stopped and the status word must show
//      the flag and halt;
//   5  an inversion fault is scanned into the counter cell;
//   6  a stuck-at-1 fault is scanned into the counter cell.
// Each mechanism is counted, and one that never happened counts as a failure.
module tb_sabc_system;
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
  logic        ser_valid;
  logic [7:0]  ser_data;
  logic        core_run;
  logic [31:0] gpio_cmd = '0, gpio_rsp;
  logic        cnt_node_in, cnt_node_out;
  logic [16:0] cnt_count;
  op_e         de_op_code;
  sabc_err_t   fail, err;
  logic [2:0]  crc_cause;
  logic        halt;

  sabc_system dut (.*);

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
  int n_ser = 0, n_stop = 0, n_sa1 = 0, ran = 0;
  logic [31:0] hist_m [$];
  logic [7:0]  ser_m [$];
  bit          hist_first;
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
    ser_valid       = advance && M.valid && M.c.mem == MEM_STORE && M.alu[9:6] == 4'hf;
    ser_data        = M.st[7:0];
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
    if (core_run) begin
      if (hist_first || if_v.imem_addr != hist_m[$]) hist_m.push_back(if_v.imem_addr);
      hist_first = 0;
      if (ser_valid) ser_m.push_back(ser_data);
      ran++;
    end
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
    advance = core_run && (($urandom % 100) >= pct_stall);
    #1;   // let the monitored signals settle before anyone looks at them
  endtask

  task automatic restart();
    rst_n = 0;
    foreach (areg[k]) begin areg[k] = 0; preg[k] = 0; end
    foreach (dmem[k]) dmem[k] = 8'($urandom);
    rf1_q = 0; rf2_q = 0; fetch_pc = 0; await_flush = 0;
    pending_dmg = DM_NONE; stuck_reg = 0;
    F = bubble(); D = bubble(); E = bubble(); M = bubble(); W = bubble();
    advance  = 0;
    gpio_cmd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
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

  // One GPIO command; returns the response data. The pipeline is held meanwhile.
  task automatic cmd(input logic [2:0] op, input logic [27:0] arg, output logic [30:0] data);
    logic t;
    advance = 0;
    t = ~gpio_cmd[31];
    @(negedge clk);
    gpio_cmd = {t, op, arg};
    @(posedge clk);
    @(negedge clk);
    check(gpio_rsp[0] == t, "GPIO ack");
    data = gpio_rsp[31:1];
  endtask

  // Load the counter cell's configuration (clears its count).
  task automatic scan_config(input logic [2:0] cfg);
    logic [30:0] d;
    cmd(3'd5, {25'b0, cfg}, d);
  endtask

  // Shift the count out of the three chains and rebuild it.
  task automatic scan_read(output logic [16:0] v);
    logic [30:0] d;
    v = '0;
    for (int k = 0; k < 8; k++) begin
      cmd(3'd5, 28'd0, d);
      if (k == 0) v[16] = d[2];
      v[k]     = d[0];
      v[8 + k] = d[1];
    end
    n_scan++;
  endtask

  // Program the run length and start the run; the records restart with it.
  task automatic start_run(input int limit);
    logic [30:0] d;
    cmd(3'd1, 28'(limit), d);
    cmd(3'd2, 28'd0, d);
    hist_m.delete();
    ser_m.delete();
    hist_first = 1;
    ran = 0;
    check(core_run, "run started");
  endtask

  initial begin
    int          exp_cnt, used;
    logic [16:0] cnt_before;
    logic        prev_node;
    logic [16:0] got;
    logic [30:0] d;
    F = bubble(); D = bubble(); E = bubble(); M = bubble(); W = bubble();
    foreach (areg[k]) begin areg[k] = 0; preg[k] = 0; end
    rf1_q = 0; rf2_q = 0; fetch_pc = 0;

    // ---- episode 0: fault free, one full run ----
    restart();
    scan_config(3'b000);
    start_run(20000);
    exp_cnt   = 0;
    prev_node = cnt_node_in;
    while (core_run) begin
      #0;
      check(fail == '0, $sformatf("no checker fires when fault free (fail=%b cause=%b)", fail, crc_cause));
      check(cnt_node_out == cnt_node_in, "counter node passes through");
      if (cnt_node_in != prev_node) exp_cnt++;
      prev_node = cnt_node_in;
      step();
    end
    check(ran == 20000, $sformatf("run length %0d", ran));
    check(err == '0 && !halt, "no error flag, no halt after a clean run");
    @(negedge clk);
    check(cnt_count == 17'(exp_cnt), $sformatf("transition count %0d vs %0d", cnt_count, exp_cnt));
    cmd(3'd0, 28'd0, d);
    check(d[1:0] == 2'b10 && d[6:2] == '0, "status after a clean run");
    check(int'(d[14:9]) == ((hist_m.size() > 50) ? 50 : hist_m.size()), "history count");
    check(int'(d[30:15]) == ser_m.size(), $sformatf("serial count %0d vs %0d", d[30:15], ser_m.size()));
    cmd(3'd6, 28'd0, d);
    check(int'(d) == 20000, "cycle count read back");
    for (int k = 0; k < 50 && k < hist_m.size(); k++) begin
      cmd(3'd3, 28'(k), d);
      check(d == hist_m[hist_m.size() - 1 - k][31:1], $sformatf("address history entry %0d", k));
    end
    for (int k = 0; k < 64 && k < ser_m.size(); k++) begin
      cmd(3'd4, 28'(k), d);
      check(d == 31'(ser_m[k]), $sformatf("serial byte %0d", k));
      n_ser++;
    end
    scan_read(got);
    check(got == 17'(exp_cnt), $sformatf("scanned count %0d vs %0d", got, exp_cnt));
    $display("episode 0: %0d instructions, %0d transitions, %0d address changes, %0d serial bytes",
             n_instr, exp_cnt, hist_m.size(), ser_m.size());

    // ---- episodes 1..4: one damage each ----
    for (int ep = 1; ep <= 4; ep++) begin
      restart();
      start_run(5000);
      repeat (300) begin
        step();
        check(fail == '0, $sformatf("clean before damage fail=%b cause=%b", fail, crc_cause));
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
      cmd(3'd7, 28'd0, d);
      check(!core_run, "STOP ends the run");
      if (!core_run) n_stop++;
      cmd(3'd0, 28'd0, d);
      check(d[5:2] == err && err[ep - 1], "status shows the error flag");
      check(d[6] && halt, "halt raised after detection");
      if (d[6] && halt) n_halt++;
      $display("episode %0d: detected after %0d cycles, err=%b", ep, used, err);
    end

    // ---- episode 5: inversion fault on the counter node ----
    restart();
    scan_config(3'b111);
    start_run(500);
    while (core_run) begin
      #0;
      check(cnt_node_out == ~cnt_node_in, "inversion fault on the node");
      step();
    end
    n_inject++;
    @(negedge clk);
    cnt_before = cnt_count;
    check(cnt_before > 0, "node toggled during the fault run");
    scan_read(got);
    check(got == cnt_before, "scan-out of the fault run");

    // ---- episode 6: stuck-at-1 fault on the counter node ----
    restart();
    scan_config(3'b011);
    start_run(300);
    while (core_run) begin
      #0;
      check(cnt_node_out == 1'b1, "stuck-at-1 fault on the node");
      if (!cnt_node_in) n_sa1++;
      step();
    end

    // ---- every mechanism happened ----
    check(n_stall > 0,  "stall seen");
    check(n_bubble > 0, "fetch bubble seen");
    check(n_flush > 0,  "flush seen");
    check(n_load > 0,   "load seen");
    check(n_store > 0,  "store seen");
    check(n_ser > 0,    "serial bytes recorded");
    check(n_rfi > 0 && n_dio > 0 && n_crc > 0 && n_src > 0, "every checker fired");
    check(n_halt == 4 && n_stop == 4, "halt and STOP after every detection");
    check(n_scan == 2 && n_inject == 1 && n_sa1 > 0, "scan-out and fault injection");
    $display("mechanisms: instr=%0d stall=%0d bubble=%0d flush=%0d load=%0d store=%0d serial=%0d rfi=%0d dio=%0d crc=%0d src=%0d halt=%0d stop=%0d scan=%0d inject=%0d sa1=%0d",
             n_instr, n_stall, n_bubble, n_flush, n_load, n_store, n_ser, n_rfi, n_dio, n_crc, n_src,
             n_halt, n_stop, n_scan, n_inject, n_sa1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
