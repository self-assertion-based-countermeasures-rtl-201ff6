// crc_sabc: Cyclic-Redundancy-Check checker. Every check compares the 8-bit
// light-weight CRC (crc_lite) of two values that should be equal but come from
// different places in the pipeline.
//
// Datapath checks (a value at its source against the same value further on):
//   - alu_result of a load or store in execute  vs. DMemAddr in memory;
//   - store operand rs2_forward in execute      vs. DMemDataOut in memory
//     (both masked to the access size);
//   - mem_rd_data in memory                     vs. wb_rd_data in write-back.
// The source CRC is registered when the pipeline advances, so it lines up
// with the destination one stage later.
// ALU checks: a redundant local ALU recomputes add/sub, shift, compare,
// boolean and jump-link results from operands taken independently of the
// ALU's own operand multiplexers (rs1_forward, rs2_forward, the pc, the
// immediate or the constant 4, selected by the decoded op_code), and its CRC
// is compared with the CRC of alu_result. The branch check recomputes the
// branch condition from rs1_forward/rs2_forward and compares it with
// branch_taken (always 1 for jumps, 0 for everything else).
//
// The document names the signal pairs and the redundant units; the pipeline
// alignment, the use of the forwarded operands and the size masking are this
// design's choices. 'fail' is combinational; 'err' is the sticky flag.
module crc_sabc
  import sabc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,
  input  logic            ex_valid,
  input  op_e             ex_op,
  input  logic [XLEN-1:0] ex_imm,
  input  ex_view_t        ex,
  input  logic            mem_valid,
  input  op_e             mem_op,
  input  mem_view_t       mem,
  input  logic            wb_valid,
  input  op_e             wb_op,
  input  wb_view_t        wb,
  output logic            fail_dp,    // a datapath pair disagrees
  output logic            fail_alu,   // redundant ALU disagrees
  output logic            fail_br,    // redundant branch comparator disagrees
  output logic            fail,
  output logic            err
);
  op_ctrl_t        c_ex, c_mem, c_wb;
  logic [XLEN-1:0] x_red, y_red, res_red, st_ex, st_mem;
  logic            br_red, is_branch, is_jump;
  logic [CRCW-1:0] crc_alu, crc_red, crc_st_ex, crc_dmaddr, crc_dmdata, crc_mrd, crc_wrd;
  logic [CRCW-1:0] addr_q, st_q, mrd_q;

  always_comb begin
    c_ex  = exp_ctrl(ex_op);
    c_mem = exp_ctrl(mem_op);
    c_wb  = exp_ctrl(wb_op);
    unique case (c_ex.x_sel)
      X_PC:    x_red = ex.pc;
      X_ZERO:  x_red = '0;
      default: x_red = ex.rs1_forward;
    endcase
    unique case (c_ex.y_sel)
      Y_RS2:   y_red = ex.rs2_forward;
      Y_FOUR:  y_red = 32'd4;
      default: y_red = ex_imm;
    endcase
    res_red   = alu_eval(c_ex.alu_op, x_red, y_red);
    is_branch = ex_op inside {OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU};
    is_jump   = ex_op inside {OP_JAL, OP_JALR};
    br_red    = is_branch ? branch_eval(c_ex.funct3, ex.rs1_forward, ex.rs2_forward) : is_jump;
    st_ex     = size_mask(c_ex.mem_size, ex.rs2_forward);
    st_mem    = size_mask(c_mem.mem_size, mem.dmem_data_out);
  end

  crc_lite u_crc_alu    (.data(ex.alu_result),  .crc(crc_alu));
  crc_lite u_crc_red    (.data(res_red),        .crc(crc_red));
  crc_lite u_crc_st_ex  (.data(st_ex),          .crc(crc_st_ex));
  crc_lite u_crc_dmaddr (.data(mem.dmem_addr),  .crc(crc_dmaddr));
  crc_lite u_crc_dmdata (.data(st_mem),         .crc(crc_dmdata));
  crc_lite u_crc_mrd    (.data(mem.mem_rd_data), .crc(crc_mrd));
  crc_lite u_crc_wrd    (.data(wb.wb_rd_data),  .crc(crc_wrd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      st_q   <= '0;
      mrd_q  <= '0;
    end else if (advance) begin
      addr_q <= crc_alu;
      st_q   <= crc_st_ex;
      mrd_q  <= crc_mrd;
    end
  end

  always_comb begin
    fail_alu = ex_valid && (c_ex.alu_op != ALU_NOP) && (crc_alu != crc_red);
    fail_br  = ex_valid && (ex_op != OP_INVALID) && (ex.branch_taken != br_red);
    fail_dp  = (mem_valid && (c_mem.mem_op != MEM_NONE) && (crc_dmaddr != addr_q)) ||
               (mem_valid && (c_mem.mem_op == MEM_STORE) && (crc_dmdata != st_q)) ||
               (wb_valid && c_wb.rd_write && (crc_wrd != mrd_q));
    fail     = fail_alu || fail_br || fail_dp;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    err <= 1'b0;
    else if (fail) err <= 1'b1;
endmodule
