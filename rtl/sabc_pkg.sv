// sabc_pkg: types, constants and pure functions shared by the self-assertion
// checkers (SABC) that watch a 5-stage RV32I pipeline.
//
// op_e is the instruction type produced by the extra decoder in the decode
// stage: the 37 RV32I base instructions plus the 6 Zicsr instructions, 43 types
// in all, and OP_INVALID for anything else (FENCE, ECALL, ...), which the
// checkers leave alone. The count of 43 follows the document; which 43 they are
// is this design's reading.
//
// The control encodings (alu_op_e, mem_op_e, mem_size_e) and the operand
// convention in exp_ctrl() are this design's own: the monitored core must
// produce alu_result = alu_op(alu_x, alu_y) with these operands.
//
// crc8() is the light-weight CRC of the CRC circuit: bit i of the 8-bit result
// is the XOR of input bits i, i+8, i+16 and i+24, one 4-input XOR gate per
// output bit, 8 gates per 32-bit bus.
package sabc_pkg;

  localparam int XLEN = 32;
  localparam int CRCW = 8;

  typedef enum logic [5:0] {
    OP_INVALID = 6'd0,
    OP_LUI, OP_AUIPC, OP_JAL, OP_JALR,
    OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU,
    OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU,
    OP_SB, OP_SH, OP_SW,
    OP_ADDI, OP_SLTI, OP_SLTIU, OP_XORI, OP_ORI, OP_ANDI,
    OP_SLLI, OP_SRLI, OP_SRAI,
    OP_ADD, OP_SUB, OP_SLL, OP_SLT, OP_SLTU, OP_XOR, OP_SRL, OP_SRA,
    OP_OR, OP_AND,
    OP_CSRRW, OP_CSRRS, OP_CSRRC, OP_CSRRWI, OP_CSRRSI, OP_CSRRCI
  } op_e;

  localparam int NUM_OPS = 43;

  typedef enum logic [3:0] {
    ALU_NOP, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA
  } alu_op_e;

  typedef enum logic [1:0] {MEM_NONE, MEM_LOAD, MEM_STORE} mem_op_e;

  typedef enum logic [1:0] {SZ_WORD, SZ_BYTE, SZ_HALF} mem_size_e;

  // Where the ALU operands come from, for the redundant checks.
  typedef enum logic [1:0] {X_RS1, X_PC, X_ZERO} x_sel_e;
  typedef enum logic [1:0] {Y_RS2, Y_IMM, Y_FOUR} y_sel_e;

  typedef enum logic [2:0] {FMT_R, FMT_I, FMT_S, FMT_B, FMT_U, FMT_J} fmt_e;

  // Expected operational state of one instruction type.
  typedef struct packed {
    alu_op_e   alu_op;
    mem_op_e   mem_op;
    mem_size_e mem_size;
    x_sel_e    x_sel;
    y_sel_e    y_sel;
    logic      rd_write;
    fmt_e      fmt;
    logic [6:0] opcode;
    logic [2:0] funct3;
    logic [6:0] funct7;
  } op_ctrl_t;

  // Fetch-stage signals (Fig. 4: IMemAddr, instruction, instr_ready).
  typedef struct packed {
    logic [XLEN-1:0] imem_addr;
    logic [31:0]     instruction;
    logic            instr_ready;
  } if_view_t;

  // Decode-stage signals: the decode instruction register, the immediate
  // decoder output and the register-file read addresses.
  typedef struct packed {
    logic [31:0]     instruction;
    logic [XLEN-1:0] immediate;
    logic [4:0]      rs1_addr;
    logic [4:0]      rs2_addr;
  } de_view_t;

  // Execute pipeline register and execute-stage nets.
  typedef struct packed {
    logic [4:0]      rs1_addr;
    logic [4:0]      rs2_addr;
    logic [4:0]      rd_addr;
    logic [11:0]     csr_addr;
    logic [2:0]      funct3;
    alu_op_e         alu_op;
    mem_op_e         mem_op;
    mem_size_e       mem_size;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] alu_x;
    logic [XLEN-1:0] alu_y;
    logic [XLEN-1:0] alu_result;
    logic [XLEN-1:0] rs1_forward;
    logic [XLEN-1:0] rs2_forward;
    logic            branch_taken;
  } ex_view_t;

  // Memory-stage signals.
  typedef struct packed {
    mem_op_e         mem_op;
    mem_size_e       mem_size;
    logic [XLEN-1:0] dmem_addr;
    logic [XLEN-1:0] dmem_data_out;
    logic [XLEN-1:0] mem_rd_data;
    logic            rd_write;
  } mem_view_t;

  // Write-back stage signals (register-file write port).
  typedef struct packed {
    logic [XLEN-1:0] wb_rd_data;
    logic [4:0]      rd_addr;
    logic            rd_write;
  } wb_view_t;

  // One error flag per checker.
  typedef struct packed {
    logic src;
    logic crc;
    logic dio;
    logic rfi;
  } sabc_err_t;

  function automatic logic [CRCW-1:0] crc8(input logic [XLEN-1:0] d);
    logic [CRCW-1:0] c;
    for (int i = 0; i < CRCW; i++)
      c[i] = d[i] ^ d[i+8] ^ d[i+16] ^ d[i+24];
    return c;
  endfunction

  function automatic op_ctrl_t exp_ctrl(input op_e op);
    op_ctrl_t c;
    c = '{alu_op: ALU_NOP, mem_op: MEM_NONE, mem_size: SZ_WORD, x_sel: X_RS1,
          y_sel: Y_IMM, rd_write: 1'b1, fmt: FMT_I, opcode: 7'b0010011,
          funct3: 3'b000, funct7: 7'b0000000};
    unique case (op)
      OP_LUI:   begin c.alu_op = ALU_ADD; c.x_sel = X_ZERO; c.fmt = FMT_U; c.opcode = 7'b0110111; end
      OP_AUIPC: begin c.alu_op = ALU_ADD; c.x_sel = X_PC; c.fmt = FMT_U; c.opcode = 7'b0010111; end
      OP_JAL:   begin c.alu_op = ALU_ADD; c.x_sel = X_PC; c.y_sel = Y_FOUR; c.fmt = FMT_J; c.opcode = 7'b1101111; end
      OP_JALR:  begin c.alu_op = ALU_ADD; c.x_sel = X_PC; c.y_sel = Y_FOUR; c.opcode = 7'b1100111; end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU: begin
        c.alu_op = ALU_ADD; c.x_sel = X_PC; c.rd_write = 1'b0; c.fmt = FMT_B; c.opcode = 7'b1100011;
        unique case (op)
          OP_BEQ:  c.funct3 = 3'b000;
          OP_BNE:  c.funct3 = 3'b001;
          OP_BLT:  c.funct3 = 3'b100;
          OP_BGE:  c.funct3 = 3'b101;
          OP_BLTU: c.funct3 = 3'b110;
          default: c.funct3 = 3'b111;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        c.alu_op = ALU_ADD; c.mem_op = MEM_LOAD; c.opcode = 7'b0000011;
        unique case (op)
          OP_LB:   begin c.funct3 = 3'b000; c.mem_size = SZ_BYTE; end
          OP_LH:   begin c.funct3 = 3'b001; c.mem_size = SZ_HALF; end
          OP_LW:   begin c.funct3 = 3'b010; c.mem_size = SZ_WORD; end
          OP_LBU:  begin c.funct3 = 3'b100; c.mem_size = SZ_BYTE; end
          default: begin c.funct3 = 3'b101; c.mem_size = SZ_HALF; end
        endcase
      end
      OP_SB, OP_SH, OP_SW: begin
        c.alu_op = ALU_ADD; c.mem_op = MEM_STORE; c.rd_write = 1'b0; c.fmt = FMT_S; c.opcode = 7'b0100011;
        unique case (op)
          OP_SB:   begin c.funct3 = 3'b000; c.mem_size = SZ_BYTE; end
          OP_SH:   begin c.funct3 = 3'b001; c.mem_size = SZ_HALF; end
          default: begin c.funct3 = 3'b010; c.mem_size = SZ_WORD; end
        endcase
      end
      OP_ADDI:  c.alu_op = ALU_ADD;
      OP_SLTI:  begin c.alu_op = ALU_SLT;  c.funct3 = 3'b010; end
      OP_SLTIU: begin c.alu_op = ALU_SLTU; c.funct3 = 3'b011; end
      OP_XORI:  begin c.alu_op = ALU_XOR;  c.funct3 = 3'b100; end
      OP_ORI:   begin c.alu_op = ALU_OR;   c.funct3 = 3'b110; end
      OP_ANDI:  begin c.alu_op = ALU_AND;  c.funct3 = 3'b111; end
      OP_SLLI:  begin c.alu_op = ALU_SLL;  c.funct3 = 3'b001; end
      OP_SRLI:  begin c.alu_op = ALU_SRL;  c.funct3 = 3'b101; end
      OP_SRAI:  begin c.alu_op = ALU_SRA;  c.funct3 = 3'b101; c.funct7 = 7'b0100000; end
      OP_ADD, OP_SUB, OP_SLL, OP_SLT, OP_SLTU, OP_XOR, OP_SRL, OP_SRA, OP_OR, OP_AND: begin
        c.y_sel = Y_RS2; c.fmt = FMT_R; c.opcode = 7'b0110011;
        unique case (op)
          OP_ADD:  c.alu_op = ALU_ADD;
          OP_SUB:  begin c.alu_op = ALU_SUB; c.funct7 = 7'b0100000; end
          OP_SLL:  begin c.alu_op = ALU_SLL;  c.funct3 = 3'b001; end
          OP_SLT:  begin c.alu_op = ALU_SLT;  c.funct3 = 3'b010; end
          OP_SLTU: begin c.alu_op = ALU_SLTU; c.funct3 = 3'b011; end
          OP_XOR:  begin c.alu_op = ALU_XOR;  c.funct3 = 3'b100; end
          OP_SRL:  begin c.alu_op = ALU_SRL;  c.funct3 = 3'b101; end
          OP_SRA:  begin c.alu_op = ALU_SRA;  c.funct3 = 3'b101; c.funct7 = 7'b0100000; end
          OP_OR:   begin c.alu_op = ALU_OR;   c.funct3 = 3'b110; end
          default: begin c.alu_op = ALU_AND;  c.funct3 = 3'b111; end
        endcase
      end
      OP_CSRRW, OP_CSRRS, OP_CSRRC, OP_CSRRWI, OP_CSRRSI, OP_CSRRCI: begin
        c.opcode = 7'b1110011;
        unique case (op)
          OP_CSRRW:  c.funct3 = 3'b001;
          OP_CSRRS:  c.funct3 = 3'b010;
          OP_CSRRC:  c.funct3 = 3'b011;
          OP_CSRRWI: c.funct3 = 3'b101;
          OP_CSRRSI: c.funct3 = 3'b110;
          default:   c.funct3 = 3'b111;
        endcase
      end
      default: begin c.rd_write = 1'b0; c.opcode = 7'b0000000; end
    endcase
    return c;
  endfunction

  // Reference ALU, used by the redundant functional unit of the CRC checker.
  function automatic logic [XLEN-1:0] alu_eval(input alu_op_e op, input logic [XLEN-1:0] x,
                                               input logic [XLEN-1:0] y);
    unique case (op)
      ALU_ADD:  return x + y;
      ALU_SUB:  return x - y;
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_SLT:  return {31'b0, $signed(x) < $signed(y)};
      ALU_SLTU: return {31'b0, x < y};
      ALU_SLL:  return x << y[4:0];
      ALU_SRL:  return x >> y[4:0];
      ALU_SRA:  return $unsigned($signed(x) >>> y[4:0]);
      default:  return '0;
    endcase
  endfunction

  // Reference branch comparator (funct3 of the B-type instructions).
  function automatic logic branch_eval(input logic [2:0] f3, input logic [XLEN-1:0] a,
                                       input logic [XLEN-1:0] b);
    unique case (f3)
      3'b000:  return a == b;
      3'b001:  return a != b;
      3'b100:  return $signed(a) < $signed(b);
      3'b101:  return $signed(a) >= $signed(b);
      3'b110:  return a < b;
      3'b111:  return a >= b;
      default: return 1'b0;
    endcase
  endfunction

  // Store operand as it appears on the data bus: right-aligned, masked to size.
  function automatic logic [XLEN-1:0] size_mask(input mem_size_e sz, input logic [XLEN-1:0] d);
    unique case (sz)
      SZ_BYTE: return {24'b0, d[7:0]};
      SZ_HALF: return {16'b0, d[15:0]};
      default: return d;
    endcase
  endfunction

endpackage
