// fi_cell: fault-injection element inserted on one circuit node. Three scan
// flip-flops, one on each of three scan chains, hold its configuration:
// chain 0 the enable bit, chains 1 and 2 the fault type
//   {type1,type0} = 00 stuck-at-0, 01 stuck-at-1, 10 delay, 11 inversion.
// When disabled, node_out = node_in (transparent). A delay fault presents the
// value node_in had one clock earlier, i.e. the node misses its setup time.
// While scan_en is high the three configuration flip-flops shift (scan_in ->
// flip-flop -> scan_out on each chain). The three chains, the enable/type
// split and the four fault types follow the document; the type encoding, the
// one-cycle delay model and the asynchronous reset (configuration cleared,
// fault off) are this design's choices.
module fi_cell (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_en,
  input  logic [2:0] scan_in,
  output logic [2:0] scan_out,
  input  logic       node_in,
  output logic       node_out
);
  typedef enum logic [1:0] {F_SA0 = 2'b00, F_SA1 = 2'b01, F_DELAY = 2'b10, F_INV = 2'b11} fault_e;

  logic [2:0] cfg;        // {type1, type0, enable}
  logic       dly_q;
  fault_e     ftype;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       cfg <= '0;
    else if (scan_en) cfg <= scan_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dly_q <= 1'b0;
    else        dly_q <= node_in;

  assign scan_out = cfg;
  assign ftype    = fault_e'(cfg[2:1]);

  always_comb begin
    if (!cfg[0]) node_out = node_in;
    else begin
      unique case (ftype)
        F_SA0:   node_out = 1'b0;
        F_SA1:   node_out = 1'b1;
        F_DELAY: node_out = dly_q;
        default: node_out = ~node_in;
      endcase
    end
  end
endmodule
