// sabc_track: the checkers' own copy of the pipeline bookkeeping. It keeps the
// instruction word that the fetch stage delivered (the left-hand side of the
// RFI assertion) and carries it, together with the decode-stage op_code and
// immediate, into the execute stage, and then carries the op_code on to the
// memory and write-back stages so that every checker knows which instruction
// type its stage holds.
//
// Stage registers move when 'advance' is high (the monitored pipeline moves as
// one; a stall holds all stages). 'flush' (taken branch or jump in execute)
// kills the two younger instructions: the ones entering decode and execute on
// that edge. A fetch word is taken only when instr_ready is high. Reset clears
// all valid bits. This timing model is this design's assumption about how the
// monitored pipeline is stalled and flushed.
module sabc_track
  import sabc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,
  input  logic            flush,
  input  logic [31:0]     if_instr,
  input  logic            if_ready,
  input  op_e             de_op,
  input  logic [XLEN-1:0] de_imm,
  output logic            ex_valid,
  output logic [31:0]     ex_instr,
  output op_e             ex_op,
  output logic [XLEN-1:0] ex_imm,
  output logic            mem_valid,
  output op_e             mem_op,
  output logic            wb_valid,
  output op_e             wb_op
);
  logic        de_valid;
  logic [31:0] de_instr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_valid  <= 1'b0;
      de_instr  <= '0;
      ex_valid  <= 1'b0;
      ex_instr  <= '0;
      ex_op     <= OP_INVALID;
      ex_imm    <= '0;
      mem_valid <= 1'b0;
      mem_op    <= OP_INVALID;
      wb_valid  <= 1'b0;
      wb_op     <= OP_INVALID;
    end else if (advance) begin
      de_valid  <= if_ready && !flush;
      de_instr  <= if_instr;
      ex_valid  <= de_valid && !flush;
      ex_instr  <= de_instr;
      ex_op     <= de_op;
      ex_imm    <= de_imm;
      mem_valid <= ex_valid;
      mem_op    <= ex_op;
      wb_valid  <= mem_valid;
      wb_op     <= mem_op;
    end
  end
endmodule
