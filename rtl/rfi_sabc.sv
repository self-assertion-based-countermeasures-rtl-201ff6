// rfi_sabc: Reconstitute-Full-Instruction checker. The right-hand side of the
// assertion is an instruction word rebuilt from what the pipeline decoded:
// the op_code of the decode-stage decoder selects the format, opcode and
// funct7 constants, and the fields are taken from the immediate decoder
// output and from the execute pipeline register (ex_rs1_addr, ex_rs2_addr,
// ex_rd_addr, ex_csr_addr, ex_funct3) and, for shift-immediates, the shift
// amount from the ALU operand alu_y. The left-hand side is the word that the
// fetch stage delivered, carried to execute by sabc_track. They must agree
// whenever a valid, decoded (non-OP_INVALID) instruction is in execute.
//
// 'fail' is high, combinationally, in each cycle the assertion fails; 'err'
// is the sticky error flag, set on the next clock edge, cleared by reset only.
// The selection multiplexer follows the document; the field layout is the
// RV32I encoding.
module rfi_sabc
  import sabc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ex_valid,
  input  logic [31:0]     ex_instr,   // LHS: fetched instruction
  input  op_e             ex_op,      // decoded type, tracked to execute
  input  logic [XLEN-1:0] ex_imm,     // immediate, tracked to execute
  input  ex_view_t        ex,
  output logic            fail,
  output logic            err
);
  op_ctrl_t    c;
  logic        is_shift_imm, is_csr;
  logic [31:0] rhs;           // RHS: reconstituted instruction

  always_comb begin
    c            = exp_ctrl(ex_op);
    is_shift_imm = ex_op inside {OP_SLLI, OP_SRLI, OP_SRAI};
    is_csr       = ex_op inside {OP_CSRRW, OP_CSRRS, OP_CSRRC, OP_CSRRWI, OP_CSRRSI, OP_CSRRCI};
    unique case (c.fmt)
      FMT_R: rhs = {c.funct7, ex.rs2_addr, ex.rs1_addr, ex.funct3, ex.rd_addr, c.opcode};
      FMT_S: rhs = {ex_imm[11:5], ex.rs2_addr, ex.rs1_addr, ex.funct3, ex_imm[4:0], c.opcode};
      FMT_B: rhs = {ex_imm[12], ex_imm[10:5], ex.rs2_addr, ex.rs1_addr, ex.funct3,
                    ex_imm[4:1], ex_imm[11], c.opcode};
      FMT_U: rhs = {ex_imm[31:12], ex.rd_addr, c.opcode};
      FMT_J: rhs = {ex_imm[20], ex_imm[10:1], ex_imm[11], ex_imm[19:12], ex.rd_addr, c.opcode};
      default: begin  // FMT_I
        if (is_csr)
          rhs = {ex.csr_addr, ex.rs1_addr, ex.funct3, ex.rd_addr, c.opcode};
        else if (is_shift_imm)
          rhs = {c.funct7, ex.alu_y[4:0], ex.rs1_addr, ex.funct3, ex.rd_addr, c.opcode};
        else
          rhs = {ex_imm[11:0], ex.rs1_addr, ex.funct3, ex.rd_addr, c.opcode};
      end
    endcase
    fail = ex_valid && (ex_op != OP_INVALID) && (rhs != ex_instr);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    err <= 1'b0;
    else if (fail) err <= 1'b1;
endmodule
