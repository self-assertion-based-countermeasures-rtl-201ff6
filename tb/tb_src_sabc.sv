// tb_src_sabc: a testbench register file (synchronous read, write-first, x0
// hard-wired to zero) is written and read at random alongside the shadow
// checker. In the first phase it is fault free and 'fail' must stay low. In
// later phases the testbench file is damaged the way the checker is meant to
// catch: a stored bit flipped, a write steered to the wrong register (address
// decoder fault), a bit of the read multiplexer output stuck. Each cycle the
// expected 'fail' is worked out from the true register contents, and the
// sticky 'err' must follow it.
module tb_src_sabc;
  import tb_rv_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        rd_write = 0, rd_en = 0;
  logic [4:0]  rd_addr = '0, rs1_addr = '0, rs2_addr = '0;
  logic [31:0] wb_rd_data = '0, rs1_data, rs2_data;
  logic        fail, err;
  int checks = 0, failures = 0, detections = 0;

  src_sabc dut (.*);

  always #5 clk = ~clk;

  logic [31:0] good [32];   // what was written (reference contents)
  logic [31:0] bad  [32];   // the damaged register file the checker watches
  logic [31:0] good1_q, good2_q, bad1_q, bad2_q;
  int          phase = 0;    // 0 clean, 1 flipped bit, 2 decoder fault, 3 stuck output bit
  logic        exp_err = 0;

  function automatic logic [31:0] rd_good(input logic [4:0] a);
    if (a == 0) return 0;
    if (rd_write && rd_addr == a) return wb_rd_data;
    return good[a];
  endfunction

  function automatic logic [31:0] rd_bad(input logic [4:0] a);
    if (a == 0) return 0;
    if (rd_write && rd_addr == a && phase != 2) return wb_rd_data;
    return bad[a];
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n && rd_en) begin
      good1_q <= rd_good(rs1_addr);
      good2_q <= rd_good(rs2_addr);
      bad1_q  <= rd_bad(rs1_addr);
      bad2_q  <= rd_bad(rs2_addr);
    end
    if (rst_n && rd_write && rd_addr != 0) begin
      good[rd_addr] <= wb_rd_data;
      // decoder fault: address bit 0 inverted on the write
      if (phase == 2) bad[rd_addr ^ 5'd1] <= wb_rd_data;
      else            bad[rd_addr] <= wb_rd_data;
    end
  end

  assign rs1_data = (phase == 3) ? (bad1_q | 32'h0000_0400) : bad1_q;
  assign rs2_data = bad2_q;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t phase=%0d", what, $time, phase);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_fail;
    foreach (good[k]) begin good[k] = 0; bad[k] = 0; end
    good1_q = 0; good2_q = 0; bad1_q = 0; bad2_q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      @(negedge clk);
      phase = p;
      if (p == 1) bad[7] = bad[7] ^ 32'h0001_0000;   // one stored bit flips
      if (p == 2) begin                           // repair, then break the decoder
        foreach (bad[k]) bad[k] = good[k];
        bad1_q = good1_q; bad2_q = good2_q;
      end
      if (p == 3) begin
        foreach (bad[k]) bad[k] = good[k];
        bad1_q = good1_q; bad2_q = good2_q;
      end
      for (int n = 0; n < 3000; n++) begin
        rd_write   = 1'($urandom);
        rd_addr    = 5'($urandom);
        wb_rd_data = $urandom;
        rd_en      = ($urandom % 4) != 0;
        rs1_addr   = 5'($urandom);
        rs2_addr   = 5'($urandom);
        #1;
        exp_fail = (crc_ref(rs1_data) != crc_ref(good1_q)) ||
                   (crc_ref(rs2_data) != crc_ref(good2_q));
        check(fail == exp_fail, $sformatf("fail=%0b expected %0b", fail, exp_fail));
        check(err == exp_err, "sticky err");
        if (fail) detections++;
        @(posedge clk);
        if (exp_fail) exp_err = 1;
        @(negedge clk);
      end
      if (p == 0) check(detections == 0, "no detection while fault free");
      else        check(detections > 0, "fault detected");
      $display("phase %0d: %0d cycles with a detection", p, detections);
      detections = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
