// fe_engine: the fault-emulation engine that runs the monitored processor for
// one fault-injection experiment and records what the processor did. It is
// driven through a pair of 32-bit GPIO registers by the fault-injection
// manager software (FIM):
//   * it lets the processor run for a programmed number of clock cycles
//     (core_run high), so that a binary search over the run length can find
//     when a fault effect first appears;
//   * it records the instruction addresses of the last HIST_DEPTH changes of
//     the instruction address bus and the first SER_DEPTH bytes the processor
//     writes to its serial port;
//   * it drives the three scan chains of the fault-injection / counter cells
//     one shift per command, returning the bits that fall out;
//   * it reports the run state and the countermeasure error flags.
//
// Command word gpio_cmd (FIM -> engine). A command executes in the first
// clock after bit 31 changes (a toggle, so each write runs exactly once):
//   [31] toggle  [30:28] command  [27:0] argument
//   0 STATUS     data = {ser_cnt[15:0], hist_cnt[5:0], 2'b0, halt, err[3:0], done, running}
//   1 SET_LIMIT  run length in cycles := argument
//   2 START      clear the records and the cycle count, then run
//   3 READ_HIST  data = address[31:1] of the argument-th newest change (0 = newest)
//   4 READ_SER   data = serial byte number 'argument'
//   5 SCAN       scan_in := argument[2:0], one scan shift; data = scan_out before the shift
//   6 CYCLES     data = cycles run so far
//   7 STOP       end the run now
// Response word gpio_rsp (engine -> FIM): {data[30:0], ack}; 'ack' copies the
// toggle bit of the last executed command, so the FIM polls it to know the
// response is valid. The response is registered: it is valid one clock after
// the command executes.
//
// Timing: core_run (the processor's clock enable) and cnt_en are high for
// exactly 'limit' cycles after START. Address changes and serial bytes are
// recorded only while running. The GPIO words are assumed to be in the same
// clock domain as the engine.
//
// The document gives the engine's purpose (state machines that collect serial
// and address-bus data while the processor runs the AES program, a run-cycle
// limit set by the FIM, the 50-entry address history, GPIO-driven scan chains
// and read-out of the assertion flags). The command set, the word layout, the
// toggle handshake and the serial-buffer depth are this design's choices.
module fe_engine #(
  int HIST_DEPTH = 50,
  int SER_DEPTH  = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // GPIO pair
  input  logic [31:0] gpio_cmd,
  output logic [31:0] gpio_rsp,
  // observed processor outputs
  input  logic [31:0] addr_bus,
  input  logic        ser_valid,
  input  logic [7:0]  ser_data,
  input  logic [3:0]  sabc_err,
  input  logic        halt,
  // control of the processor and the counter cells
  output logic        core_run,
  output logic        cnt_en,
  output logic        scan_en,
  output logic [2:0]  scan_in,
  input  logic [2:0]  scan_out
);
  localparam int HW = $clog2(HIST_DEPTH + 1);
  localparam int SW = $clog2(SER_DEPTH);

  typedef enum logic [2:0] {
    C_STATUS, C_SET_LIMIT, C_START, C_READ_HIST, C_READ_SER, C_SCAN, C_CYCLES, C_STOP
  } cmd_e;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e          state;
  logic            tog_q;
  logic [27:0]     limit_q, cycles_q;
  logic [31:0]     hist [HIST_DEPTH];
  logic [HW-1:0]   hist_wp, hist_cnt;
  logic [31:0]     last_addr;
  logic            first_q;
  logic [7:0]      ser [SER_DEPTH];
  logic [15:0]     ser_cnt;
  logic [30:0]     rsp_data;
  logic            ack_q;

  logic            exec;
  cmd_e            cmd;
  logic [27:0]     arg;
  logic            running, addr_chg;
  logic [HW:0]     rd_idx;

  assign cmd     = cmd_e'(gpio_cmd[30:28]);
  assign arg     = gpio_cmd[27:0];
  assign exec    = gpio_cmd[31] != tog_q;
  assign running = state == S_RUN;
  assign addr_chg = running && (first_q || addr_bus != last_addr);

  assign core_run = running;
  assign cnt_en   = running;
  assign scan_en  = exec && cmd == C_SCAN;
  assign scan_in  = scan_en ? arg[2:0] : 3'b000;
  assign gpio_rsp = {rsp_data, ack_q};

  // position of the argument-th newest history entry
  always_comb begin
    rd_idx = (HW + 1)'(hist_wp) + (HW + 1)'(HIST_DEPTH - 1) - (HW + 1)'(arg[HW-1:0]);
    if (rd_idx >= (HW + 1)'(HIST_DEPTH)) rd_idx -= (HW + 1)'(HIST_DEPTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tog_q     <= 1'b0;
      ack_q     <= 1'b0;
      rsp_data  <= '0;
      limit_q   <= '0;
      cycles_q  <= '0;
      hist_wp   <= '0;
      hist_cnt  <= '0;
      last_addr <= '0;
      first_q   <= 1'b0;
      ser_cnt   <= '0;
    end else begin
      tog_q <= gpio_cmd[31];

      // run state machine and recording
      if (running) begin
        cycles_q <= cycles_q + 28'd1;
        first_q  <= 1'b0;
        if (cycles_q + 28'd1 >= limit_q) state <= S_DONE;
        if (addr_chg) begin
          last_addr <= addr_bus;
          hist_wp   <= (hist_wp == HW'(HIST_DEPTH - 1)) ? '0 : hist_wp + 1'b1;
          if (hist_cnt != HW'(HIST_DEPTH)) hist_cnt <= hist_cnt + 1'b1;
        end
        if (ser_valid && ser_cnt != 16'hffff) ser_cnt <= ser_cnt + 16'd1;
      end

      // command execution (a START or STOP overrides the run update above)
      if (exec) begin
        ack_q <= gpio_cmd[31];
        unique case (cmd)
          C_STATUS:    rsp_data <= {ser_cnt, 6'(hist_cnt), 2'b00, halt, sabc_err,
                                    state == S_DONE, running};
          C_SET_LIMIT: begin limit_q <= arg; rsp_data <= 31'(arg); end
          C_START: begin
            cycles_q <= '0;
            hist_wp  <= '0;
            hist_cnt <= '0;
            ser_cnt  <= '0;
            first_q  <= 1'b1;
            state    <= (limit_q == 28'd0) ? S_DONE : S_RUN;
            rsp_data <= '0;
          end
          C_READ_HIST: rsp_data <= (arg < 28'(hist_cnt)) ? hist[rd_idx[HW-1:0]][31:1] : '0;
          C_READ_SER:  rsp_data <= (arg < 28'(ser_cnt) && arg < 28'(SER_DEPTH))
                                   ? 31'(ser[arg[SW-1:0]]) : '0;
          C_SCAN:      rsp_data <= 31'(scan_out);
          C_CYCLES:    rsp_data <= 31'(cycles_q);
          C_STOP: begin
            if (running) state <= S_DONE;
            rsp_data <= 31'(cycles_q);
          end
        endcase
      end
    end
  end

  // record memories (no reset needed: entries are read only below the counts)
  always_ff @(posedge clk) begin
    if (addr_chg) hist[hist_wp] <= addr_bus;
    if (running && ser_valid && ser_cnt < 16'(SER_DEPTH)) ser[ser_cnt[SW-1:0]] <= ser_data;
  end
endmodule
