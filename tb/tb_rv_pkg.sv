// tb_rv_pkg: testbench-side RV32I knowledge, written from the instruction-set
// definition and kept apart from the RTL's own tables so that the testbenches
// check the checkers against an independent reference:
//   - the opcode / funct3 / funct7 of each of the 43 instruction types,
//   - an encoder that builds an instruction word from its fields,
//   - the immediate a decode stage extracts from a word,
//   - the control signals (alu_op, mem_op, mem_size) and operand choice a
//     pipeline following the checkers' conventions produces,
//   - a random instruction generator whose memory accesses stay inside a
//     1 KiB data memory and whose jumps stay word aligned.
package tb_rv_pkg;
  import sabc_pkg::*;

  typedef struct {
    op_e         op;
    logic [31:0] word;
    logic [4:0]  rd, rs1, rs2;
    logic [31:0] imm;      // value the immediate decoder yields
    logic [11:0] csr;
  } instr_t;

  typedef struct {
    alu_op_e   alu;
    mem_op_e   mem;
    mem_size_e size;
    int        xsel;   // 0 rs1, 1 pc, 2 zero
    int        ysel;   // 0 rs2, 1 imm, 2 four
    bit        wr;     // writes rd
    byte       fmt;    // "R","I","S","B","U","J"
  } ctrl_t;

  function automatic void enc_fields(input op_e op, output logic [6:0] opc,
                                     output logic [2:0] f3, output logic [6:0] f7);
    f7 = 7'h00; f3 = 3'd0; opc = 7'h13;
    case (op)
      OP_LUI:   opc = 7'h37;
      OP_AUIPC: opc = 7'h17;
      OP_JAL:   opc = 7'h6f;
      OP_JALR:  opc = 7'h67;
      OP_BEQ:   begin opc = 7'h63; f3 = 0; end
      OP_BNE:   begin opc = 7'h63; f3 = 1; end
      OP_BLT:   begin opc = 7'h63; f3 = 4; end
      OP_BGE:   begin opc = 7'h63; f3 = 5; end
      OP_BLTU:  begin opc = 7'h63; f3 = 6; end
      OP_BGEU:  begin opc = 7'h63; f3 = 7; end
      OP_LB:    begin opc = 7'h03; f3 = 0; end
      OP_LH:    begin opc = 7'h03; f3 = 1; end
      OP_LW:    begin opc = 7'h03; f3 = 2; end
      OP_LBU:   begin opc = 7'h03; f3 = 4; end
      OP_LHU:   begin opc = 7'h03; f3 = 5; end
      OP_SB:    begin opc = 7'h23; f3 = 0; end
      OP_SH:    begin opc = 7'h23; f3 = 1; end
      OP_SW:    begin opc = 7'h23; f3 = 2; end
      OP_ADDI:  f3 = 0;
      OP_SLTI:  f3 = 2;
      OP_SLTIU: f3 = 3;
      OP_XORI:  f3 = 4;
      OP_ORI:   f3 = 6;
      OP_ANDI:  f3 = 7;
      OP_SLLI:  f3 = 1;
      OP_SRLI:  f3 = 5;
      OP_SRAI:  begin f3 = 5; f7 = 7'h20; end
      OP_ADD:   begin opc = 7'h33; f3 = 0; end
      OP_SUB:   begin opc = 7'h33; f3 = 0; f7 = 7'h20; end
      OP_SLL:   begin opc = 7'h33; f3 = 1; end
      OP_SLT:   begin opc = 7'h33; f3 = 2; end
      OP_SLTU:  begin opc = 7'h33; f3 = 3; end
      OP_XOR:   begin opc = 7'h33; f3 = 4; end
      OP_SRL:   begin opc = 7'h33; f3 = 5; end
      OP_SRA:   begin opc = 7'h33; f3 = 5; f7 = 7'h20; end
      OP_OR:    begin opc = 7'h33; f3 = 6; end
      OP_AND:   begin opc = 7'h33; f3 = 7; end
      OP_CSRRW:  begin opc = 7'h73; f3 = 1; end
      OP_CSRRS:  begin opc = 7'h73; f3 = 2; end
      OP_CSRRC:  begin opc = 7'h73; f3 = 3; end
      OP_CSRRWI: begin opc = 7'h73; f3 = 5; end
      OP_CSRRSI: begin opc = 7'h73; f3 = 6; end
      OP_CSRRCI: begin opc = 7'h73; f3 = 7; end
      default:  opc = 7'h0f;   // FENCE: not one of the 43
    endcase
  endfunction

  function automatic ctrl_t ctrl_of(input op_e op);
    ctrl_t c;
    c = '{alu: ALU_NOP, mem: MEM_NONE, size: SZ_WORD, xsel: 0, ysel: 1, wr: 1, fmt: "I"};
    case (op)
      OP_LUI:   begin c.alu = ALU_ADD; c.xsel = 2; c.fmt = "U"; end
      OP_AUIPC: begin c.alu = ALU_ADD; c.xsel = 1; c.fmt = "U"; end
      OP_JAL:   begin c.alu = ALU_ADD; c.xsel = 1; c.ysel = 2; c.fmt = "J"; end
      OP_JALR:  begin c.alu = ALU_ADD; c.xsel = 1; c.ysel = 2; end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU:
                begin c.alu = ALU_ADD; c.xsel = 1; c.wr = 0; c.fmt = "B"; end
      OP_LB, OP_LBU: begin c.alu = ALU_ADD; c.mem = MEM_LOAD; c.size = SZ_BYTE; end
      OP_LH, OP_LHU: begin c.alu = ALU_ADD; c.mem = MEM_LOAD; c.size = SZ_HALF; end
      OP_LW:    begin c.alu = ALU_ADD; c.mem = MEM_LOAD; end
      OP_SB:    begin c.alu = ALU_ADD; c.mem = MEM_STORE; c.size = SZ_BYTE; c.wr = 0; c.fmt = "S"; end
      OP_SH:    begin c.alu = ALU_ADD; c.mem = MEM_STORE; c.size = SZ_HALF; c.wr = 0; c.fmt = "S"; end
      OP_SW:    begin c.alu = ALU_ADD; c.mem = MEM_STORE; c.wr = 0; c.fmt = "S"; end
      OP_ADDI:  c.alu = ALU_ADD;
      OP_SLTI:  c.alu = ALU_SLT;
      OP_SLTIU: c.alu = ALU_SLTU;
      OP_XORI:  c.alu = ALU_XOR;
      OP_ORI:   c.alu = ALU_OR;
      OP_ANDI:  c.alu = ALU_AND;
      OP_SLLI:  c.alu = ALU_SLL;
      OP_SRLI:  c.alu = ALU_SRL;
      OP_SRAI:  c.alu = ALU_SRA;
      OP_ADD:   begin c.alu = ALU_ADD;  c.ysel = 0; c.fmt = "R"; end
      OP_SUB:   begin c.alu = ALU_SUB;  c.ysel = 0; c.fmt = "R"; end
      OP_SLL:   begin c.alu = ALU_SLL;  c.ysel = 0; c.fmt = "R"; end
      OP_SLT:   begin c.alu = ALU_SLT;  c.ysel = 0; c.fmt = "R"; end
      OP_SLTU:  begin c.alu = ALU_SLTU; c.ysel = 0; c.fmt = "R"; end
      OP_XOR:   begin c.alu = ALU_XOR;  c.ysel = 0; c.fmt = "R"; end
      OP_SRL:   begin c.alu = ALU_SRL;  c.ysel = 0; c.fmt = "R"; end
      OP_SRA:   begin c.alu = ALU_SRA;  c.ysel = 0; c.fmt = "R"; end
      OP_OR:    begin c.alu = ALU_OR;   c.ysel = 0; c.fmt = "R"; end
      OP_AND:   begin c.alu = ALU_AND;  c.ysel = 0; c.fmt = "R"; end
      OP_INVALID: c.wr = 0;
      default: ;   // CSR: no ALU operation, writes rd
    endcase
    return c;
  endfunction

  // Immediate as a decode stage extracts it (sign-extended).
  function automatic logic [31:0] imm_of(input logic [31:0] w);
    case (w[6:0])
      7'h37, 7'h17: return {w[31:12], 12'b0};
      7'h6f:        return {{12{w[31]}}, w[19:12], w[20], w[30:21], 1'b0};
      7'h63:        return {{20{w[31]}}, w[7], w[30:25], w[11:8], 1'b0};
      7'h23:        return {{21{w[31]}}, w[30:25], w[11:7]};
      default:      return {{21{w[31]}}, w[30:20]};
    endcase
  endfunction

  function automatic logic [31:0] encode(input op_e op, input logic [4:0] rd, rs1, rs2,
                                         input logic [31:0] imm, input logic [11:0] csr);
    logic [6:0] opc, f7;
    logic [2:0] f3;
    ctrl_t      c;
    enc_fields(op, opc, f3, f7);
    c = ctrl_of(op);
    if (op inside {OP_CSRRW, OP_CSRRS, OP_CSRRC, OP_CSRRWI, OP_CSRRSI, OP_CSRRCI})
      return {csr, rs1, f3, rd, opc};
    if (op inside {OP_SLLI, OP_SRLI, OP_SRAI})
      return {f7, imm[4:0], rs1, f3, rd, opc};
    case (c.fmt)
      "R": return {f7, rs2, rs1, f3, rd, opc};
      "S": return {imm[11:5], rs2, rs1, f3, imm[4:0], opc};
      "B": return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], opc};
      "U": return {imm[31:12], rd, opc};
      "J": return {imm[20], imm[10:1], imm[11], imm[19:12], rd, opc};
      default: return {imm[11:0], rs1, f3, rd, opc};
    endcase
  endfunction

  // Random instruction of one of the 43 types (or, rarely, a FENCE).
  function automatic instr_t rand_instr(input int unsigned pct_invalid = 0);
    instr_t     i;
    logic [31:0] r;
    i.op  = op_e'(1 + ($urandom % NUM_OPS));
    if (($urandom % 100) < pct_invalid) i.op = OP_INVALID;
    i.rd  = 5'($urandom);
    i.rs1 = 5'($urandom);
    i.rs2 = 5'($urandom);
    i.csr = 12'($urandom);
    r     = $urandom;
    case (i.op)
      OP_LUI, OP_AUIPC: r = {r[31:12], 12'b0};
      OP_JAL:  r = {22'b0, r[9:2], 2'b00};                   // forward, word aligned
      OP_JALR: begin i.rs1 = 0; r = {20'b0, 1'b0, r[10:2], 2'b00}; end  // absolute, aligned
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU:
               r = {{23{r[31]}}, r[8:2], 2'b00} | 32'h4;             // short, aligned, nonzero
      OP_LB, OP_LBU, OP_SB: begin i.rs1 = 0; r = {22'b0, r[9:0]}; end
      OP_LH, OP_LHU, OP_SH: begin i.rs1 = 0; r = {22'b0, r[9:1], 1'b0}; end
      OP_LW, OP_SW:         begin i.rs1 = 0; r = {22'b0, r[9:2], 2'b00}; end
      OP_SLLI, OP_SRLI:     r = {27'b0, r[4:0]};
      OP_SRAI:              r = {20'b0, 7'h20, r[4:0]};
      default:              r = {{20{r[11]}}, r[11:0]};
    endcase
    if (i.op == OP_INVALID)
      i.word = {4'b0, 4'hf, 4'hf, 5'd0, 3'd0, 5'd0, 7'h0f};   // FENCE
    else
      i.word = encode(i.op, i.rd, i.rs1, i.rs2, r, i.csr);
    i.imm = imm_of(i.word);
    // positional fields, as the decode stage extracts them
    i.rd  = i.word[11:7];
    i.rs1 = i.word[19:15];
    i.rs2 = i.word[24:20];
    i.csr = i.word[31:20];
    return i;
  endfunction

  function automatic logic [31:0] alu_ref(input alu_op_e op, input logic [31:0] x, y);
    case (op)
      ALU_ADD:  return x + y;
      ALU_SUB:  return x - y;
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_SLT:  return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < y) ? 32'd1 : 32'd0;
      ALU_SLL:  return x << y[4:0];
      ALU_SRL:  return x >> y[4:0];
      ALU_SRA:  return 32'($signed(x) >>> y[4:0]);
      default:  return 32'd0;
    endcase
  endfunction

  function automatic bit taken_ref(input op_e op, input logic [31:0] a, b);
    case (op)
      OP_BEQ:  return a == b;
      OP_BNE:  return a != b;
      OP_BLT:  return $signed(a) < $signed(b);
      OP_BGE:  return $signed(a) >= $signed(b);
      OP_BLTU: return a < b;
      OP_BGEU: return a >= b;
      OP_JAL, OP_JALR: return 1;
      default: return 0;
    endcase
  endfunction

  // Reference crc: XOR of the four bytes.
  function automatic logic [7:0] crc_ref(input logic [31:0] d);
    return d[7:0] ^ d[15:8] ^ d[23:16] ^ d[31:24];
  endfunction
endpackage
