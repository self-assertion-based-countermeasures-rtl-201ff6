// tb_fi_cell: scans each of the four fault types (and the disabled state)
// into the cell over its three chains and checks node_out against the
// expected faulty behaviour for a random node_in sequence; also checks that
// the configuration shifts out of scan_out one clock after it went in.
module tb_fi_cell;
  logic       clk = 0, rst_n = 0, scan_en = 0, node_in = 0, node_out;
  logic [2:0] scan_in = '0, scan_out;
  int checks = 0, failures = 0;

  fi_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    logic [2:0] cfg;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 5; mode++) begin
      // mode 4 = disabled; otherwise enable with type = mode
      cfg = (mode == 4) ? 3'b000 : {2'(mode), 1'b1};
      @(negedge clk); scan_en = 1; scan_in = cfg;
      @(negedge clk); scan_en = 0; scan_in = ~cfg;
      check(scan_out == cfg, "scan_out shows configuration");
      prev = node_in;
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        prev = node_in;          // value during the previous clock period
        node_in = 1'($urandom);
        #1;
        case (mode)
          0: check(node_out == 1'b0, "stuck-at-0");
          1: check(node_out == 1'b1, "stuck-at-1");
          2: check(node_out == prev, "delay");
          3: check(node_out == ~node_in, "inversion");
          default: check(node_out == node_in, "disabled is transparent");
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
