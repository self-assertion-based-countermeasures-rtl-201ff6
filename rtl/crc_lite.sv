// crc_lite: the light-weight CRC circuit used by the CRC and shadow-register
// checkers. A W-bit bus is folded onto CW output bits: output bit i is the XOR
// of every input bit whose index is i modulo CW. With the defaults (32 -> 8)
// that is eight 4-input XOR gates per bus, so one checked pair of 32-bit buses
// costs 16 gates, as the document states. The document gives the gate count and
// the 8-bit width; which input bits feed which gate is this design's choice
// (interleaved, so that any single flipped bit, and any burst of up to 8
// adjacent flipped bits, changes the result).
// Purely combinational, no clock.
module crc_lite #(
  parameter int W  = 32,   // bus width
  parameter int CW = 8     // CRC width
) (
  input  logic [W-1:0]  data,
  output logic [CW-1:0] crc
);
  always_comb begin
    crc = '0;
    for (int i = 0; i < W; i++)
      crc[i % CW] ^= data[i];
  end
endmodule
