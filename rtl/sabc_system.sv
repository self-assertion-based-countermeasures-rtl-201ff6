// sabc_system: the complete countermeasure and test infrastructure around one
// monitored 5-stage RV32I processor. It joins
//   * sabc_top, the four self-assertion checkers plus the counter cell, which
//     watch the processor's pipeline signals, and
//   * fe_engine, the fault-emulation engine that a managing program drives
//     through two 32-bit GPIO words: it runs the processor for a set number of
//     cycles, records its address-bus and serial-port behaviour, shifts the
//     counter cell's scan chains and reports the checkers' error flags.
// The engine's run window enables the transition counter, so a count covers
// exactly the programmed run; the engine samples the instruction address bus
// of the fetch stage.
//
// Interface and timing: the processor-side ports are those of sabc_top (one
// struct per pipeline stage, sampled on the rising edge). core_run is the
// processor's clock enable: the processor must hold its state, and keep
// 'advance' low, while core_run is low. ser_valid/ser_data is the byte stream
// the processor writes to its serial port. gpio_cmd/gpio_rsp follow the
// command protocol described in fe_engine. halt is the fail-safe request and
// stays high until reset.
//
// The split into checkers, counter cell and emulation engine follows the
// document; the wiring between engine and counter cell is this design's choice.
module sabc_system
  import sabc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // monitored processor
  input  logic            advance,
  input  logic            flush,
  input  if_view_t        if_v,
  input  de_view_t        de_v,
  input  ex_view_t        ex_v,
  input  mem_view_t       mem_v,
  input  wb_view_t        wb_v,
  input  logic [XLEN-1:0] rf_rs1_data,
  input  logic [XLEN-1:0] rf_rs2_data,
  input  logic            cnt_node_in,
  output logic            cnt_node_out,
  input  logic            ser_valid,
  input  logic [7:0]      ser_data,
  output logic            core_run,
  // managing program
  input  logic [31:0]     gpio_cmd,
  output logic [31:0]     gpio_rsp,
  // results
  output op_e             de_op_code,
  output sabc_err_t       fail,
  output sabc_err_t       err,
  output logic [2:0]      crc_cause,
  output logic [16:0]     cnt_count,
  output logic            halt
);
  logic       scan_en, cnt_en;
  logic [2:0] scan_in, scan_out;

  sabc_top u_cm (
    .clk, .rst_n, .advance, .flush,
    .if_v, .de_v, .ex_v, .mem_v, .wb_v, .rf_rs1_data, .rf_rs2_data,
    .scan_en, .cnt_en, .scan_in, .scan_out,
    .cnt_node_in, .cnt_node_out, .cnt_count,
    .de_op_code, .fail, .err, .crc_cause, .halt
  );

  fe_engine u_fe (
    .clk, .rst_n, .gpio_cmd, .gpio_rsp,
    .addr_bus(if_v.imem_addr), .ser_valid, .ser_data,
    .sabc_err(err), .halt,
    .core_run, .cnt_en, .scan_en, .scan_in, .scan_out
  );
endmodule
