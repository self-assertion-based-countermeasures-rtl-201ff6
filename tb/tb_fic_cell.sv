// tb_fic_cell: runs the counter cell through the document's experiment
// sequence: scan in a fault configuration with scan_en high (which also
// clears the counter), run with cnt_en high while node_in toggles randomly,
// then scan the count out over the three chains, with random idle gaps
// between the shifts, and rebuild it. The count is
// compared with the transitions the testbench counted itself, and the
// injected fault is checked on node_out.
module tb_fic_cell;
  logic        clk = 0, rst_n = 0, scan_en = 0, cnt_en = 0, node_in = 0, node_out;
  logic [2:0]  scan_in = '0, scan_out;
  logic [16:0] count;
  int checks = 0, failures = 0;

  fic_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          exp_cnt, ncyc;
    logic        prev;
    logic [16:0] got;
    logic [2:0]  cfg;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      // inversion on odd runs, disabled on even runs
      cfg = (run % 2) ? 3'b111 : 3'b000;
      @(negedge clk); scan_en = 1; scan_in = cfg;
      @(negedge clk); scan_en = 0; scan_in = '0;
      check(count == 0, "counter cleared by scan_en");
      exp_cnt = 0;
      ncyc    = (run == 5) ? 140000 : 50 + $urandom % 500;   // last run saturates
      prev    = node_in;
      cnt_en  = 1;
      for (int n = 0; n < ncyc; n++) begin
        node_in = (run == 5) ? ~node_in : 1'($urandom);
        #1;
        check(node_out == ((run % 2) ? ~node_in : node_in), "fault on node_out");
        @(posedge clk);
        if (node_in != prev && exp_cnt < 17'h1ffff) exp_cnt++;
        prev = node_in;
        @(negedge clk);
      end
      cnt_en = 0;
      // idle cycles with node toggling must not count
      repeat (3) begin node_in = ~node_in; @(negedge clk); end
      prev = node_in;
      check(count == 17'(exp_cnt), $sformatf("count %0d vs %0d", count, exp_cnt));
      // scan out, least significant bit first: FF[0], FF[8] and FF[16]
      // are visible before the first shift
      check(scan_out[2] == exp_cnt[16], "chain 2 carries FF[16]");
      got = '0;
      got[16] = scan_out[2];
      for (int k = 0; k < 8; k++) begin
        got[k]     = scan_out[0];
        got[8 + k] = scan_out[1];
        scan_en = 1;
        @(negedge clk);
        // idle gaps between shifts (with the node moving) must not disturb the chains
        scan_en = 0;
        repeat ($urandom_range(0, 3)) begin node_in = ~node_in; @(negedge clk); end
        if (k == 0) check(scan_out[2] == cfg[2], "chain 2: configuration follows the count");
      end
      check(got == 17'(exp_cnt), $sformatf("scanned count %0d vs %0d", got, exp_cnt));
      check(scan_out[0] == cfg[0] && scan_out[1] == cfg[1], "chains 0/1: configuration follows the count");
      check(count == 0, "counter cleared while scanning");
      scan_en = 0;
      $display("run %0d: count %0d transitions", run, exp_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
