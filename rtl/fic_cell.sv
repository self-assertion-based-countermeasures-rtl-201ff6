// fic_cell: fault-injection cell with counter (FIC), the element of the
// counter-based countermeasure. It wraps one fi_cell and adds
//   - Cnter: a 17-bit saturating counter of the rising and falling
//     transitions of node_in while cnt_en (the program run) is high; it is
//     cleared in any cycle with scan_en high;
//   - ScanCnter: a 17-bit copy of Cnter that follows it while cnt_en is high,
//     shifts while scan_en is high and otherwise holds, so the count can be
//     shifted out one bit per command with any gap between shifts. The three scan chains run through the
//     fi_cell configuration flip-flops and then on into ScanCnter:
//       chain 0: scan_in[0] -> cfg -> FF[7]  ... FF[0]  -> scan_out[0]
//       chain 1: scan_in[1] -> cfg -> FF[15] ... FF[8]  -> scan_out[1]
//       chain 2: scan_in[2] -> cfg -> FF[16]            -> scan_out[2]
// so after a run the count leaves least significant bit first, in 8 clocks on
// chains 0 and 1 and 1 clock on chain 2 (plus one for the fi_cell stage).
// The split of ScanCnter over the chains follows the document's
// description; the 17-bit width is read from the flip-flop numbering FF[0..16];
// saturation and the capture of the next count are this design's choices.
// A host compares the scanned count with a fault-free run: the cell itself
// only counts.
module fic_cell (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_en,
  input  logic             cnt_en,
  input  logic [2:0]       scan_in,
  output logic [2:0]       scan_out,
  input  logic             node_in,
  output logic             node_out,
  output logic [16:0]      count
);
  localparam int CNT_W = 17;   // FF[16:0]

  logic [2:0]       fi_so;
  logic             prev_q;
  logic [CNT_W-1:0] cnt_d, scnt;

  fi_cell u_fi (
    .clk, .rst_n, .scan_en, .scan_in, .scan_out(fi_so), .node_in, .node_out
  );

  always_comb begin
    cnt_d = count;
    if (scan_en)
      cnt_d = '0;
    else if (cnt_en && (node_in != prev_q) && (count != '1))
      cnt_d = count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      prev_q <= 1'b0;
      scnt   <= '0;
    end else begin
      count  <= cnt_d;
      prev_q <= node_in;
      if (scan_en)
        scnt <= {fi_so[2], fi_so[1], scnt[15:9], fi_so[0], scnt[7:1]};
      else if (cnt_en)
        scnt <= cnt_d;
    end
  end

  assign scan_out = {scnt[16], scnt[8], scnt[0]};
endmodule
