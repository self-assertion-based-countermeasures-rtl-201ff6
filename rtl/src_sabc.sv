// src_sabc: Shadow-Register-Checker. A second register file, 32 entries of
// 8 bits, holds the light-weight CRC of every value written into the main
// register file. It is written from the same write port signals (wb_rd_data,
// rd_addr, rd_write) and read with the same two read addresses (rs1_addr,
// rs2_addr) as the main file; the CRCs of the main file's read data (rs1_data,
// rs2_data) must equal the shadow entries. A fault in the main file's address
// decoders, storage bits or output multiplexers makes them differ.
//
// Timing follows a register file with synchronous read: addresses are taken
// when 'rd_en' is high (the decode stage advances) and the data is compared in
// the following cycles, until the next read. A write to the address being read
// in the same cycle is passed through (write-first). x0 reads as CRC(0) = 0.
// Reset clears the shadow, so the main file must start at zero as well. The
// document gives the structure and the 32->8 bit width; the read timing and
// reset behaviour are this design's assumptions.
// 'fail' is combinational, 'err' is the sticky flag.
module src_sabc
  import sabc_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_write,
  input  logic [$clog2(NREGS)-1:0] rd_addr,
  input  logic [XLEN-1:0]          wb_rd_data,
  input  logic                     rd_en,
  input  logic [$clog2(NREGS)-1:0] rs1_addr,
  input  logic [$clog2(NREGS)-1:0] rs2_addr,
  input  logic [XLEN-1:0]          rs1_data,
  input  logic [XLEN-1:0]          rs2_data,
  output logic                     fail,
  output logic                     err
);
  localparam int AW = $clog2(NREGS);

  logic [CRCW-1:0] shadow [NREGS];
  logic [CRCW-1:0] crc_wr, crc_rs1, crc_rs2, sh1_q, sh2_q;
  logic            we;

  crc_lite u_crc_wr  (.data(wb_rd_data), .crc(crc_wr));
  crc_lite u_crc_rs1 (.data(rs1_data),   .crc(crc_rs1));
  crc_lite u_crc_rs2 (.data(rs2_data),   .crc(crc_rs2));

  assign we = rd_write && (rd_addr != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) shadow[i] <= '0;
    end else if (we) begin
      shadow[rd_addr] <= crc_wr;
    end
  end

  function automatic logic [CRCW-1:0] rd_port(input logic [AW-1:0] a);
    if (a == '0)               return '0;
    else if (we && a == rd_addr) return crc_wr;
    else                       return shadow[a];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh1_q <= '0;
      sh2_q <= '0;
    end else if (rd_en) begin
      sh1_q <= rd_port(rs1_addr);
      sh2_q <= rd_port(rs2_addr);
    end
  end

  assign fail = (crc_rs1 != sh1_q) || (crc_rs2 != sh2_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    err <= 1'b0;
    else if (fail) err <= 1'b1;
endmodule
