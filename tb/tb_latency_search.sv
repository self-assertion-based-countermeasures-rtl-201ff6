// tb_latency_search: the latency analysis run on the full system. For a
// permanent fault (one register-file bit stuck at 1 in the modelled core) it
// finds, by binary search over the run length, the shortest run after which
// the checkers' flags are set, exactly as the managing program would: each
// trial restarts from reset with the same program (the random generator is
// reseeded, so every replay is cycle-identical), programs a run length over
// GPIO, starts the run, and reads the status word. The answer is compared
// with a reference run that watches the checkers every cycle. A fault-free
// run of the same length must never raise a flag.
//
// Sizes: first a fault-free run of 6,717,440 cycles (the length of one
// complete program run in the evaluation this design follows) must stay
// clean; then one fault is searched in 1024-cycle steps over that length (at
// most 13 trials); then six faults are searched in 32-cycle steps over 4096
// cycles (at most 8 trials each) to resolve the latency finely.
//
// The processor model is the one of tb_sabc_system: random instructions of
// all 43 types executed at fetch, five stages with random stalls, fetch
// bubbles and flushes after taken branches and jumps, and a physical register
// file with synchronous reads that holds the stuck bit.
module tb_latency_search;
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
  int n_runs = 0, n_iters = 0, n_found = 0;
  int n_rfi = 0, n_dio = 0, n_crc = 0, n_src = 0, n_halt = 0, n_scan = 0, n_inject = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
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

  // Program the run length and start the run.
  task automatic start_run(input int limit);
    logic [30:0] d;
    cmd(3'd1, 28'(limit), d);
    cmd(3'd2, 28'd0, d);
    hist_m.delete();
    ser_m.delete();
    hist_first = 1;
    ran = 0;
  endtask

  // One experiment from a clean start: same program (same seed), same fault,
  // run for 'limit' cycles. Returns whether the error flags were set at the
  // end (read from the status word) and, when 'watch' is set, the first run
  // cycle in which a checker failed (0 = none).
  task automatic experiment(input int seed, input int reg_no, input int limit, input bit watch,
                            output bit flagged, output int first_fail);
    logic [30:0] d;
    process::self().srandom(seed);
    restart();
    stuck_reg = reg_no;
    start_run(limit);
    first_fail = 0;
    while (core_run) begin
      #0;
      if (watch && first_fail == 0 && fail != '0) first_fail = ran + 1;
      step();
    end
    n_runs++;
    cmd(3'd0, 28'd0, d);
    check(d[1] && !d[0], "run finished");
    flagged = d[6];
    check(flagged == halt, "status halt bit");
  endtask

  localparam int FULL_RUN = 6717440;  // cycles of one complete program run (document's AES run)
  localparam int BIG_STEP = 1024;     // the document's search step
  localparam int STEP     = 32;       // fine search step
  localparam int NSTEP    = 128;      // fine search: longest run = NSTEP * STEP cycles

  // Binary search over whole steps for the shortest flagged run, checked
  // against a watched reference run of 'ref_limit' cycles.
  task automatic search(input int seed, input int reg_no, input int step_len, input int nstep,
                        input int ref_limit, output int found_len, output int first_fail);
    bit flagged;
    int lo, hi, mid, iters, dummy;
    experiment(seed, reg_no, ref_limit, 1, flagged, first_fail);
    check(flagged == (first_fail != 0), "flag after the reference run matches the watched failures");
    if (first_fail != 0) n_found++;
    lo = 0; hi = nstep + 1; iters = 0;   // flagged(lo) false; flagged(hi) taken as true
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      experiment(seed, reg_no, mid * step_len, 0, flagged, dummy);
      iters++;
      if (flagged) hi = mid; else lo = mid;
    end
    n_iters += iters;
    check(iters <= $clog2(nstep + 1), $sformatf("search length %0d", iters));
    // A run of L cycles ends flagged once the first failure lies inside it; a
    // failure in the cycle right after the run can still be flagged while the
    // processor is held, so the step found may end one cycle early.
    if (first_fail != 0)
      check(hi * step_len >= first_fail - 1 && (hi - 1) * step_len < first_fail,
            $sformatf("search found step %0d, first failure in cycle %0d", hi, first_fail));
    else if (ref_limit >= nstep * step_len)
      check(hi == nstep + 1, "no flag in any run when the longest run has none");
    found_len = hi * step_len;
    $display("x%0d bit 3 stuck at 1: first failure in cycle %0d, %0d trials of %0d-cycle steps, flagged from %0d cycles",
             reg_no, first_fail, iters, step_len, found_len);
  endtask

  initial begin
    bit flagged;
    int first_fail, found_len;
    logic [30:0] d;
    F = bubble(); D = bubble(); E = bubble(); M = bubble(); W = bubble();
    foreach (areg[k]) begin areg[k] = 0; preg[k] = 0; end
    rf1_q = 0; rf2_q = 0; fetch_pc = 0;

    // a fault-free program of the full run length must never raise a flag
    experiment(1000, 0, FULL_RUN, 1, flagged, first_fail);
    check(!flagged && first_fail == 0, "fault-free run of the full length is clean");
    cmd(3'd6, 28'd0, d);
    check(int'(d) == FULL_RUN, "engine ran the full length");
    check(ran == FULL_RUN, "processor clocked for the full length");
    $display("fault-free run: %0d cycles, %0d instructions", ran, n_instr);

    // the search at the document's size: 1024-cycle steps over the full run
    search(2000, 9, BIG_STEP, FULL_RUN / BIG_STEP, 8 * BIG_STEP, found_len, first_fail);

    // fine searches that resolve the latency to 32 cycles
    for (int f = 0; f < 6; f++)
      search(1001 + f, 5 + 3 * f, STEP, NSTEP, NSTEP * STEP, found_len, first_fail);

    check(n_found == 7, "every fault detected inside its reference run");
    check(n_stall > 0 && n_flush > 0 && n_load > 0 && n_store > 0, "pipeline mechanisms seen");
    $display("mechanisms: runs=%0d search_iterations=%0d detected=%0d stall=%0d flush=%0d load=%0d store=%0d",
             n_runs, n_iters, n_found, n_stall, n_flush, n_load, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
