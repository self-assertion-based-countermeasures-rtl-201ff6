// tb_fe_engine: self-checking test of the fault-emulation engine, driven only
// through its GPIO command/response pair as the managing software would.
// Each of 40 random experiments sets a random run length (1..3000 cycles),
// starts the run and, while core_run is high, moves a random instruction
// address bus (changes on about a third of the cycles, sometimes back to the
// same value) and sends random serial bytes. The test counts the cycles with
// core_run high, then reads back the status, the cycle count, every history
// entry (newest first, including reads past the stored count), every serial
// byte and the error flags, comparing all of them with a reference model.
// SCAN commands are checked for the one-cycle scan_en pulse, the scan_in
// value and the scan_out bit returned; a STOP during a run is checked to end
// it early.
module tb_fe_engine;
  logic        clk = 0, rst_n = 0;
  logic [31:0] gpio_cmd = '0, gpio_rsp;
  logic [31:0] addr_bus = '0;
  logic        ser_valid = 0;
  logic [7:0]  ser_data = '0;
  logic [3:0]  sabc_err = '0;
  logic        halt = 0;
  logic        core_run, cnt_en, scan_en;
  logic [2:0]  scan_in, scan_out = '0;

  fe_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_scan_pulse = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count scan_en pulses and check they carry the commanded value
  logic [2:0] want_scan_in;
  always @(posedge clk) if (scan_en) begin
    n_scan_pulse++;
    check(scan_in == want_scan_in, "scan_in carries the argument");
  end

  // Issue one command and return the 31-bit data of the response.
  task automatic cmd(input logic [2:0] op, input logic [27:0] arg, output logic [30:0] data);
    logic t;
    t = ~gpio_cmd[31];
    @(negedge clk);
    gpio_cmd = {t, op, arg};
    @(posedge clk);                // executes here
    @(negedge clk);
    check(gpio_rsp[0] == t, "ack follows the toggle");
    data = gpio_rsp[31:1];
  endtask

  initial begin
    logic [30:0] d;
    logic [31:0] hist_m [$];
    logic [7:0]  ser_m [$];
    int          limit, ran, nser, nb;
    logic [2:0]  so;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!core_run && !cnt_en && !scan_en, "idle after reset");

    for (int ex = 0; ex < 40; ex++) begin
      // scan shifts between runs
      repeat (4) begin
        so = 3'($urandom);
        want_scan_in = 3'($urandom);
        @(negedge clk) scan_out = so;
        nb = n_scan_pulse;
        cmd(3'd5, {25'b0, want_scan_in}, d);
        check(d == 31'(so), "SCAN returns scan_out before the shift");
        check(n_scan_pulse == nb + 1, "one scan_en pulse per SCAN");
      end

      limit = (ex % 8 == 3) ? 1 : 1 + $urandom_range(0, 2999);
      cmd(3'd1, 28'(limit), d);
      check(d == 31'(limit), "SET_LIMIT echo");
      hist_m.delete();
      ser_m.delete();
      ran  = 0;
      nser = 0;
      @(negedge clk);
      gpio_cmd = {~gpio_cmd[31], 3'd2, 28'd0};    // START
      @(posedge clk);
      #1;
      // the run: inputs change just after each edge, sampled on the next
      while (core_run) begin
        check(cnt_en, "counters enabled while running");
        if (ex % 10 == 7 && ran == limit / 2 && limit > 10) begin
          gpio_cmd = {~gpio_cmd[31], 3'd7, 28'd0};  // STOP halfway
        end
        // engine samples the present values at the next edge
        if (hist_m.size() == 0 || addr_bus != hist_m[$]) hist_m.push_back(addr_bus);
        if (ser_valid) ser_m.push_back(ser_data);
        ran++;
        @(posedge clk);
        #1;
        if ($urandom_range(0, 2) == 0)
          addr_bus = ($urandom_range(0, 3) == 0 && hist_m.size() > 1) ? hist_m[$ - 1]
                                                                       : {30'($urandom_range(0, 4095)), 2'b00};
        ser_valid = $urandom_range(0, 9) == 0;
        ser_data  = 8'($urandom);
      end
      ser_valid = 0;
      if (ex % 10 == 7 && limit > 10) check(ran == limit / 2 + 1, "STOP ends the run");
      else                            check(ran == limit, $sformatf("run length %0d vs %0d", ran, limit));

      sabc_err = 4'($urandom);
      halt     = |sabc_err;
      cmd(3'd0, 28'd0, d);
      check(d[0] == 0 && d[1] == 1, "status: done, not running");
      check(d[5:2] == sabc_err && d[6] == halt, "status: error flags");
      check(int'(d[14:9]) == ((hist_m.size() > 50) ? 50 : hist_m.size()), "status: history count");
      check(int'(d[30:15]) == ser_m.size(), "status: serial count");
      cmd(3'd6, 28'd0, d);
      check(int'(d) == ran, "cycle count");
      for (int k = 0; k < 52; k++) begin
        cmd(3'd3, 28'(k), d);
        if (k < hist_m.size() && k < 50) check(d == hist_m[hist_m.size() - 1 - k][31:1],
                                               $sformatf("history entry %0d", k));
        else                             check(d == '0, "history read past the count");
      end
      for (int k = 0; k < 66; k++) begin
        cmd(3'd4, 28'(k), d);
        if (k < ser_m.size() && k < 64) check(d == 31'(ser_m[k]), $sformatf("serial byte %0d", k));
        else                            check(d == '0, "serial read past the count");
      end
      check(!core_run, "processor held after the run");
    end

    check(n_scan_pulse == 160, "every scan command pulsed once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
