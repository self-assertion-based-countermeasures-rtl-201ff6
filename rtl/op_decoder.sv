// op_decoder: the extra decoder placed in the decode stage. It maps a 32-bit
// RV32I instruction word onto one of 43 instruction types (sabc_pkg::op_e):
// the 37 RV32I base instructions and the 6 Zicsr instructions. Anything else
// (FENCE, ECALL, EBREAK, MRET, illegal words) gives OP_INVALID and is not
// checked. The document names the decoder and the count of 43 types; the
// choice of the 43 is this design's. Purely combinational.
module op_decoder
  import sabc_pkg::*;
(
  input  logic [31:0] instr,
  output op_e         op_code
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];

  always_comb begin
    op_code = OP_INVALID;
    unique case (opc)
      7'b0110111: op_code = OP_LUI;
      7'b0010111: op_code = OP_AUIPC;
      7'b1101111: op_code = OP_JAL;
      7'b1100111: if (f3 == 3'b000) op_code = OP_JALR;
      7'b1100011:
        unique case (f3)
          3'b000: op_code = OP_BEQ;
          3'b001: op_code = OP_BNE;
          3'b100: op_code = OP_BLT;
          3'b101: op_code = OP_BGE;
          3'b110: op_code = OP_BLTU;
          3'b111: op_code = OP_BGEU;
          default: op_code = OP_INVALID;
        endcase
      7'b0000011:
        unique case (f3)
          3'b000: op_code = OP_LB;
          3'b001: op_code = OP_LH;
          3'b010: op_code = OP_LW;
          3'b100: op_code = OP_LBU;
          3'b101: op_code = OP_LHU;
          default: op_code = OP_INVALID;
        endcase
      7'b0100011:
        unique case (f3)
          3'b000: op_code = OP_SB;
          3'b001: op_code = OP_SH;
          3'b010: op_code = OP_SW;
          default: op_code = OP_INVALID;
        endcase
      7'b0010011:
        unique case (f3)
          3'b000: op_code = OP_ADDI;
          3'b010: op_code = OP_SLTI;
          3'b011: op_code = OP_SLTIU;
          3'b100: op_code = OP_XORI;
          3'b110: op_code = OP_ORI;
          3'b111: op_code = OP_ANDI;
          3'b001: if (f7 == 7'b0000000) op_code = OP_SLLI;
          default: begin  // 3'b101
            if (f7 == 7'b0000000)      op_code = OP_SRLI;
            else if (f7 == 7'b0100000) op_code = OP_SRAI;
          end
        endcase
      7'b0110011:
        if (f7 == 7'b0000000) begin
          unique case (f3)
            3'b000: op_code = OP_ADD;
            3'b001: op_code = OP_SLL;
            3'b010: op_code = OP_SLT;
            3'b011: op_code = OP_SLTU;
            3'b100: op_code = OP_XOR;
            3'b101: op_code = OP_SRL;
            3'b110: op_code = OP_OR;
            default: op_code = OP_AND;
          endcase
        end else if (f7 == 7'b0100000) begin
          if (f3 == 3'b000)      op_code = OP_SUB;
          else if (f3 == 3'b101) op_code = OP_SRA;
        end
      7'b1110011:
        unique case (f3)
          3'b001: op_code = OP_CSRRW;
          3'b010: op_code = OP_CSRRS;
          3'b011: op_code = OP_CSRRC;
          3'b101: op_code = OP_CSRRWI;
          3'b110: op_code = OP_CSRRSI;
          3'b111: op_code = OP_CSRRCI;
          default: op_code = OP_INVALID;
        endcase
      default: op_code = OP_INVALID;
    endcase
  end
endmodule
