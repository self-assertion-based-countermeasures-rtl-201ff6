// dio_sabc: Derive-Intent-of-Operation checker. The left-hand side is the
// operational state the pipeline actually presents: alu_op, mem_op and
// mem_size of the execute pipeline register and the instruction-memory
// address IMemAddr. The right-hand side is the constant state expected for the
// decoded op_code (sabc_pkg::exp_ctrl, the same table that drives the RFI
// multiplexer). Checks, each cycle:
//   - execute holds a valid decoded instruction: alu_op and mem_op equal the
//     expected constants, and mem_size does too for loads and stores;
//   - fetch delivers an instruction: IMemAddr is word aligned (RV32I without
//     compressed instructions).
// The alignment rule is this design's reading of how IMemAddr is checked
// against a constant; the document names the signals only.
// 'fail' is combinational, 'err' is the sticky flag (reset clears it).
module dio_sabc
  import sabc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] imem_addr,
  input  logic            if_ready,
  input  logic            ex_valid,
  input  op_e             ex_op,
  input  ex_view_t        ex,
  output logic            fail,
  output logic            err
);
  op_ctrl_t c;
  logic     ex_bad, if_bad;

  always_comb begin
    c      = exp_ctrl(ex_op);
    ex_bad = (ex.alu_op != c.alu_op) || (ex.mem_op != c.mem_op) ||
             ((c.mem_op != MEM_NONE) && (ex.mem_size != c.mem_size));
    if_bad = if_ready && (imem_addr[1:0] != 2'b00);
    fail   = (ex_valid && (ex_op != OP_INVALID) && ex_bad) || if_bad;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    err <= 1'b0;
    else if (fail) err <= 1'b1;
endmodule
