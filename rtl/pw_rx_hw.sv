// pw_rx_hw: reception hardware (channel to receive queue).
//
// Moves an incoming packet from the data line into the receive queue of the
// mailbox RAM, independently of the transmission hardware so that a node
// can send and receive at the same time. The receive state machine starts
// the capture when it has recognised the start of a packet (go) and ends it
// (stop); the block then reports the start position, the length in bytes and
// the CRC check result, which the 68020 stores with the monitoring data.
//
// The receive queue is a cyclic buffer of RX_WORDS 16-bit words (16K in the
// document). The write pointer belongs to this block; the shadow pointer,
// written by the host, holds the index of the last word the host has read.
// The queue is full when the write pointer reaches the shadow pointer, so
// at most RX_WORDS-1 words are held; words that find it full are dropped and
// set the sticky overflow flag. Bits are assembled least significant bit
// first into bytes, two bytes per word with the first byte in the high half
// (the inverse of pw_tx_hw). A trailing odd byte is stored with a zero low
// half; bits after the last whole byte are discarded. The CRC-32 check runs
// over every captured bit, the received checksum included, and crc_ok is
// true when the fixed remainder is left. done pulses once the last word is
// written. Bit and byte order and the full rule are this design's choices.
//
// Lint note: the CRC register value and the shifted-out byte bit 0 are not
// needed here; only the residue check of the CRC block is used.
module pw_rx_hw #(
  parameter int unsigned AW       = pw_pkg::RAM_AW,
  parameter int unsigned RX_WORDS = pw_pkg::RX_WORDS,
  parameter int unsigned RX_BASE  = pw_pkg::RX_BASE,
  localparam int unsigned QW      = $clog2(RX_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_tick,
  input  logic          rx_bit,
  input  logic          rx_valid,
  // from the receive state machine
  input  logic          go,
  input  logic          stop,
  // queue pointers
  input  logic [QW-1:0] shadow_ptr,
  input  logic          clr_ovf,
  output logic [QW-1:0] wr_ptr,
  output logic          full,
  output logic          overflow,
  // local bus master (write only)
  output logic          bus_req,
  output logic [AW-1:0] bus_addr,
  output logic [15:0]   bus_wdata,
  input  logic          bus_gnt,
  // packet report
  output logic          busy,
  output logic          done,
  output logic [QW-1:0] pkt_start,
  output logic [15:0]   pkt_len,
  output logic          crc_ok
);
  typedef enum logic [1:0] {S_IDLE, S_CAPT, S_FLUSH} state_e;
  state_e       st;
  logic [7:0]   sbyte;
  logic [2:0]   nbit;
  logic [7:0]   hi;
  logic         hi_v;
  logic [15:0]  wbuf;
  logic         wbuf_v;
  logic [15:0]  nbytes;

  logic         crc_init, crc_en;
  logic [31:0]  crc_q, fcs_unused;
  logic         crc_res;

  assign crc_init = go && st == S_IDLE;
  assign crc_en   = st == S_CAPT && rx_tick && rx_valid && !stop;

  pw_crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .bit_en(crc_en), .bit_in(rx_bit),
    .crc(crc_q), .fcs(fcs_unused), .residue_ok(crc_res)
  );

  assign full      = (wr_ptr == shadow_ptr);
  assign busy      = (st != S_IDLE);
  assign bus_req   = wbuf_v && !full;
  assign bus_addr  = AW'(RX_BASE) + AW'(wr_ptr);
  assign bus_wdata = wbuf;

  function automatic logic [QW-1:0] inc(input logic [QW-1:0] p);
    return (p == QW'(RX_WORDS - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; sbyte <= '0; nbit <= '0; hi <= '0; hi_v <= 1'b0;
      wbuf <= '0; wbuf_v <= 1'b0; nbytes <= '0; wr_ptr <= '0; overflow <= 1'b0;
      done <= 1'b0; pkt_start <= '0; pkt_len <= '0; crc_ok <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr_ovf) overflow <= 1'b0;
      // queue write: accepted, or dropped when the queue is full
      if (bus_req && bus_gnt) begin
        wbuf_v <= 1'b0;
        wr_ptr <= inc(wr_ptr);
      end else if (wbuf_v && full) begin
        wbuf_v   <= 1'b0;
        overflow <= 1'b1;
      end

      unique case (st)
        S_IDLE: if (go) begin
          st <= S_CAPT; nbit <= '0; hi_v <= 1'b0; nbytes <= '0;
          pkt_start <= wr_ptr;
        end
        S_CAPT: begin
          if (stop) begin
            st      <= S_FLUSH;
            pkt_len <= nbytes;
            crc_ok  <= crc_res;
          end else if (rx_tick && rx_valid) begin
            sbyte <= {rx_bit, sbyte[7:1]};
            nbit  <= nbit + 1'b1;
            if (nbit == 3'd7) begin
              nbytes <= nbytes + 1'b1;
              if (!hi_v) begin
                hi <= {rx_bit, sbyte[7:1]}; hi_v <= 1'b1;
              end else begin
                hi_v <= 1'b0;
                if (wbuf_v) overflow <= 1'b1;   // previous word still waiting
                else begin
                  wbuf <= {hi, rx_bit, sbyte[7:1]}; wbuf_v <= 1'b1;
                end
              end
            end
          end
        end
        S_FLUSH: begin
          if (!wbuf_v && !(bus_req && bus_gnt)) begin
            if (hi_v) begin
              wbuf <= {hi, 8'h00}; wbuf_v <= 1'b1; hi_v <= 1'b0;
            end else begin
              st <= S_IDLE; done <= 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
