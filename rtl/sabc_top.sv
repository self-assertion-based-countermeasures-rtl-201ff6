// sabc_top: the countermeasure module that sits beside a 5-stage RV32I
// pipeline (fetch, decode, execute, memory, write-back) and watches it for
// signs of a permanent fault before secret data can reach an output channel.
// It holds the four self-assertion checkers and one counter cell:
//   RFI  rebuilds the executing instruction from decoded fields and compares
//        it with the fetched word;
//   DIO  compares alu_op / mem_op / mem_size / IMemAddr with the constants the
//        decoded type implies;
//   CRC  compares CRCs of datapath values at source and destination, and of
//        the ALU and branch results against a redundant ALU and comparator;
//   SRC  keeps a CRC shadow of the register file and checks every read.
// The extra decoder (op_decoder) turns the decode-stage instruction register
// into the op_code all checkers share; sabc_track carries the fetched word
// and op_code down the pipeline. Each checker has a sticky error flag; any set
// flag raises 'halt', the fail-safe request that disables the processor.
//
// The fic_cell is the counter countermeasure: it sits on one node of the
// processor (the document's best node lies in the branch comparator's
// reduction logic), passes it through or injects a fault, counts its
// transitions and is read out over its three scan chains.
//
// Interface: the monitored signals arrive as one struct per pipeline stage,
// sampled on the rising clock edge; 'advance' is high when the pipeline moves
// and 'flush' when a taken branch or jump kills the two younger instructions.
// 'fail' shows this cycle's failing checkers; 'err' and 'halt' go high one
// clock later and stay high until reset.
module sabc_top
  import sabc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,
  input  logic            flush,
  input  if_view_t        if_v,
  input  de_view_t        de_v,
  input  ex_view_t        ex_v,
  input  mem_view_t       mem_v,
  input  wb_view_t        wb_v,
  input  logic [XLEN-1:0] rf_rs1_data,
  input  logic [XLEN-1:0] rf_rs2_data,
  // counter countermeasure
  input  logic            scan_en,
  input  logic            cnt_en,
  input  logic [2:0]      scan_in,
  output logic [2:0]      scan_out,
  input  logic            cnt_node_in,
  output logic            cnt_node_out,
  output logic [16:0]     cnt_count,
  // results
  output op_e             de_op_code,
  output sabc_err_t       fail,
  output sabc_err_t       err,
  output logic [2:0]      crc_cause,   // {branch, alu, datapath} parts of fail.crc
  output logic            halt
);
  logic            ex_valid, mem_valid, wb_valid;
  logic [31:0]     ex_instr;
  op_e             ex_op, mem_op, wb_op;
  logic [XLEN-1:0] ex_imm;
  logic            crc_fail_dp, crc_fail_alu, crc_fail_br;

  op_decoder u_dec (.instr(de_v.instruction), .op_code(de_op_code));

  sabc_track u_track (
    .clk, .rst_n, .advance, .flush,
    .if_instr(if_v.instruction), .if_ready(if_v.instr_ready),
    .de_op(de_op_code), .de_imm(de_v.immediate),
    .ex_valid, .ex_instr, .ex_op, .ex_imm,
    .mem_valid, .mem_op, .wb_valid, .wb_op
  );

  rfi_sabc u_rfi (
    .clk, .rst_n, .ex_valid, .ex_instr, .ex_op, .ex_imm, .ex(ex_v),
    .fail(fail.rfi), .err(err.rfi)
  );

  dio_sabc u_dio (
    .clk, .rst_n, .imem_addr(if_v.imem_addr), .if_ready(if_v.instr_ready),
    .ex_valid, .ex_op, .ex(ex_v), .fail(fail.dio), .err(err.dio)
  );

  crc_sabc u_crc (
    .clk, .rst_n, .advance,
    .ex_valid, .ex_op, .ex_imm, .ex(ex_v),
    .mem_valid, .mem_op, .mem(mem_v),
    .wb_valid, .wb_op, .wb(wb_v),
    .fail_dp(crc_fail_dp), .fail_alu(crc_fail_alu), .fail_br(crc_fail_br),
    .fail(fail.crc), .err(err.crc)
  );

  src_sabc u_src (
    .clk, .rst_n,
    .rd_write(wb_v.rd_write), .rd_addr(wb_v.rd_addr), .wb_rd_data(wb_v.wb_rd_data),
    .rd_en(advance), .rs1_addr(de_v.rs1_addr), .rs2_addr(de_v.rs2_addr),
    .rs1_data(rf_rs1_data), .rs2_data(rf_rs2_data),
    .fail(fail.src), .err(err.src)
  );

  fic_cell u_cnt (
    .clk, .rst_n, .scan_en, .cnt_en, .scan_in, .scan_out,
    .node_in(cnt_node_in), .node_out(cnt_node_out), .count(cnt_count)
  );

  assign crc_cause = {crc_fail_br, crc_fail_alu, crc_fail_dp};
  assign halt      = |err;
endmodule
