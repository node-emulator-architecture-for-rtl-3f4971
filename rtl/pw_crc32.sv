// pw_crc32: bit-serial CRC generator and checker.
//
// Used by the transmission hardware to compute the checksum appended to a
// packet and by the reception hardware to check an incoming packet. The
// document asks for a hardware CRC but names no polynomial; since its
// example protocol is Ethernet, this block uses the IEEE 802.3 CRC-32
// (polynomial 04C11DB7, register preset to all ones, bits fed least
// significant first, so the register is kept in reflected form with the
// constant EDB88320). One bit is absorbed per clock in which bit_en is high;
// init presets the register. fcs is the complement of the register: the
// value sent after the data, least significant bit first. residue_ok is
// high when the register holds the fixed remainder (DEBB20E3) that results
// after a packet and its correct checksum have been absorbed.
module pw_crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        bit_en,
  input  logic        bit_in,
  output logic [31:0] crc,
  output logic [31:0] fcs,
  output logic        residue_ok
);
  localparam logic [31:0] POLY_R  = 32'hEDB8_8320;
  localparam logic [31:0] RESIDUE = 32'hDEBB_20E3;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      crc <= '1;
    else if (init)   crc <= '1;
    else if (bit_en) crc <= (crc >> 1) ^ ((crc[0] ^ bit_in) ? POLY_R : 32'h0);

  assign fcs        = ~crc;
  assign residue_ok = (crc == RESIDUE);
endmodule
