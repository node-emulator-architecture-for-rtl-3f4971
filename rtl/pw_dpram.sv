// pw_dpram: mailbox memory shared by the host (68010, over the P2 bus) and
// the controller board (68020 and the transmit/receive hardware).
//
// Every exchange between the two boards goes through this memory: packets
// to send, received packets, monitoring records and control messages each
// have their own region (see pw_pkg). The document specifies a dual-port
// RAM; this is a true dual-port synchronous RAM with one read/write port per
// side. Both ports read with one clock of latency. A simultaneous write of
// the same word from both sides is resolved in favour of port B (local
// side); the document avoids such conflicts by giving each region a single
// owner at a time, so this is only a defined fallback.
module pw_dpram #(
  parameter int unsigned AW = pw_pkg::RAM_AW,
  parameter int unsigned DW = pw_pkg::WORD_W
) (
  input  logic          clk,
  // port A: host side
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B: controller side
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
