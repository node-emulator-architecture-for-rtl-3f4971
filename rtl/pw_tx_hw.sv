// pw_tx_hw: transmission hardware (packet buffer to channel).
//
// Moves one packet from a transmit buffer of the mailbox RAM to the outgoing
// data line, so that the 68020 is free of the bit-level timing. The 68020
// sets the buffer address, the length in bytes and whether a CRC is to be
// appended; the transmit state machine then starts the transfer (go) and may
// stop it at any time (stop), for instance on a collision. The 68020 can
// also reset the block to prepare a new attempt. After the last bit has been
// sent the block pulses done towards the state machines.
//
// How it works: 16-bit words are read over the local bus one word ahead of
// the bit being sent. Each word is sent high byte first (68000 byte order),
// each byte least significant bit first (Ethernet order); an odd length
// sends only the high byte of the last word. One bit is presented per
// tx_tick. If crc_en is set, the complemented CRC-32 of the data follows,
// least significant bit first; the CRC leaves out the first crc_skip bytes
// (a preamble kept in the buffer). After go the block waits for the first word
// before its first bit, so transmission starts on the first tx_tick after
// the word arrived; the packet then occupies exactly 8*len (+32) ticks and
// done is pulsed at the tick after the last bit. If the next word is not in
// by the time it is needed the packet is abandoned and underrun is set.
// Byte and bit order, the CRC polynomial and the prefetch depth are this
// design's choices; the document gives only the function.
//
// Lint note: the transmitter takes the complemented FCS from the CRC block;
// the raw register and its residue flag are not used here.
module pw_tx_hw #(
  parameter int unsigned AW = pw_pkg::RAM_AW,
  parameter int unsigned LW = 12            // length in bytes, up to one buffer
) (
  input  logic          clk,
  input  logic          rst_n,
  // set-up from the 68020
  input  logic [AW-1:0] start_addr,
  input  logic [LW-1:0] len_bytes,
  input  logic          crc_en,
  input  logic [3:0]    crc_skip,   // leading bytes left out of the CRC
  input  logic          sw_reset,
  // from the transmit state machine
  input  logic          go,
  input  logic          stop,
  input  logic          tx_tick,
  // local bus master (read only)
  output logic          bus_req,
  output logic [AW-1:0] bus_addr,
  input  logic          bus_gnt,
  input  logic          bus_rvalid,
  input  logic [15:0]   bus_rdata,
  // to the channel interface
  output logic          tx_bit,
  output logic          tx_valid,
  // status
  output logic          busy,
  output logic          done,       // one-clock pulse after the last bit
  output logic          aborted,    // sticky: stopped before the end
  output logic          underrun    // sticky: buffer data arrived too late
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;
  state_e        st;

  logic [AW-1:0] faddr;
  logic [LW-1:0] fleft;     // bytes not yet fetched
  logic          pend;
  logic [15:0]   nxt;
  logic          nxt_v;
  logic [31:0]   cur;       // bits still to send, LSB next
  logic [5:0]    cbits;
  logic [LW-1:0] bleft;     // bytes not yet moved to cur
  logic          in_fcs;
  logic [15:0]   bitno;     // data bits sent so far

  logic          crc_bit_en, crc_bit, crc_init;
  logic [31:0]   crc_q, fcs;
  logic          crc_res;

  pw_crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .bit_en(crc_bit_en), .bit_in(crc_bit),
    .crc(crc_q), .fcs, .residue_ok(crc_res)
  );

  assign busy     = (st != S_IDLE);
  assign bus_req  = busy && !nxt_v && !pend && fleft != '0;
  assign bus_addr = faddr;
  assign crc_init = go && !busy;

  // serial order of one word: high byte, then low byte, each LSB first
  function automatic logic [15:0] order(input logic [15:0] w);
    return {w[7:0], w[15:8]};
  endfunction

  always_comb begin
    crc_bit_en = 1'b0;
    crc_bit    = 1'b0;
    if (st == S_SEND && tx_tick && !stop && !sw_reset && !in_fcs
        && bitno >= {9'b0, crc_skip, 3'b0}) begin
      if (cbits != '0) begin
        crc_bit_en = 1'b1; crc_bit = cur[0];
      end else if (bleft != '0 && nxt_v) begin
        crc_bit_en = 1'b1; crc_bit = order(nxt)[0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; faddr <= '0; fleft <= '0; pend <= 1'b0; nxt <= '0; nxt_v <= 1'b0;
      cur <= '0; cbits <= '0; bleft <= '0; in_fcs <= 1'b0; bitno <= '0;
      tx_bit <= 1'b0; tx_valid <= 1'b0; done <= 1'b0; aborted <= 1'b0; underrun <= 1'b0;
    end else begin
      done <= 1'b0;
      // word fetch
      if (bus_req && bus_gnt) begin
        pend  <= 1'b1;
        faddr <= faddr + 1'b1;
        fleft <= (fleft >= LW'(2)) ? fleft - LW'(2) : '0;
      end
      if (bus_rvalid && pend) begin
        pend <= 1'b0;
        if (busy) begin nxt <= bus_rdata; nxt_v <= 1'b1; end
      end

      if (sw_reset) begin
        st <= S_IDLE; tx_valid <= 1'b0; nxt_v <= 1'b0; fleft <= '0;
        aborted <= 1'b0; underrun <= 1'b0;
      end else if (stop && busy) begin
        st <= S_IDLE; tx_valid <= 1'b0; nxt_v <= 1'b0; fleft <= '0; aborted <= 1'b1;
      end else begin
        unique case (st)
          S_IDLE: if (go && !pend) begin
            faddr <= start_addr; fleft <= len_bytes; bleft <= len_bytes;
            cbits <= '0; in_fcs <= 1'b0; nxt_v <= 1'b0; bitno <= '0;
            st    <= S_WAIT;
          end
          S_WAIT: if (nxt_v || (len_bytes == '0)) st <= S_SEND;
          S_SEND: if (tx_tick) begin
            if (cbits != '0) begin
              tx_bit <= cur[0]; tx_valid <= 1'b1;
              if (!in_fcs) bitno <= bitno + 1'b1;
              cur    <= cur >> 1;
              cbits  <= cbits - 1'b1;
            end else if (bleft != '0) begin
              if (!nxt_v) begin
                st <= S_IDLE; tx_valid <= 1'b0; underrun <= 1'b1; aborted <= 1'b1; fleft <= '0;
              end else begin
                tx_bit   <= order(nxt)[0]; tx_valid <= 1'b1;
                bitno    <= bitno + 1'b1;
                nxt_v    <= 1'b0;
                if (bleft >= LW'(2)) begin
                  cur <= {17'b0, order(nxt)[15:1]}; cbits <= 6'd15; bleft <= bleft - LW'(2);
                end else begin
                  cur <= {25'b0, order(nxt)[7:1]};  cbits <= 6'd7;  bleft <= '0;
                end
              end
            end else if (crc_en && !in_fcs) begin
              in_fcs <= 1'b1;
              tx_bit <= fcs[0]; tx_valid <= 1'b1;
              cur    <= {1'b0, fcs[31:1]};
              cbits  <= 6'd31;
            end else begin
              tx_valid <= 1'b0;
              done     <= 1'b1;
              st       <= S_IDLE;
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end
endmodule
