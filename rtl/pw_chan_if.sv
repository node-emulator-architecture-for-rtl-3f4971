// pw_chan_if: interface to the channel emulator.
//
// The channel emulator connects to the node over a few parallel lines: one
// data line in and one out, a valid line with each, the transmit and receive
// bit clocks, the global clock used for time stamps, and control lines. The
// document lists these kinds of lines without widths or timing; here every
// incoming line is synchronised to the board clock with two flip-flops and
// each clock line is turned into a one-clock tick on its rising edge. The
// received bit and its valid flag are sampled at the receive clock edge and
// presented one clock later together with rx_tick.
// The board clock must run at least four times faster than the bit clocks.
//
// The interface also holds the receive-to-transmit coupling of the state
// machines: with couple set, the incoming bit stream is repeated on the
// outgoing data line (as a ring node does); with overwrite also set, bits
// that the transmission hardware is sending replace the repeated ones. The
// outgoing lines are registered and change after a transmit clock tick.
module pw_chan_if (
  input  logic       clk,
  input  logic       rst_n,
  // channel emulator lines
  input  logic       ce_rx_data,
  input  logic       ce_rx_valid,
  input  logic       ce_rx_clk,
  input  logic       ce_tx_clk,
  input  logic       ce_gclk,
  input  logic [1:0] ce_ctl_in,
  output logic       ce_tx_data,
  output logic       ce_tx_valid,
  output logic [1:0] ce_ctl_out,
  // board side
  output logic       rx_tick,     // a received bit is on rx_bit
  output logic       rx_bit,
  output logic       rx_valid,    // valid line, sampled at the receive tick
  output logic       rx_end,      // valid line dropped at this tick
  output logic       tx_tick,     // start of a transmit bit period
  output logic       gtick,
  output logic [1:0] ctl_in,
  input  logic       tx_bit,      // from the transmission hardware
  input  logic       tx_valid,
  input  logic [1:0] ctl_out,     // from the state machines
  input  logic       couple,
  input  logic       overwrite
);
  logic [1:0] s_rxd, s_rxv, s_rxc, s_txc, s_gc;
  logic [1:0] s_ctl0, s_ctl1;
  logic       rxc_d, txc_d, gc_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rxd <= '0; s_rxv <= '0; s_rxc <= '0; s_txc <= '0; s_gc <= '0;
      s_ctl0 <= '0; s_ctl1 <= '0;
      rxc_d <= 1'b0; txc_d <= 1'b0; gc_d <= 1'b0;
    end else begin
      s_rxd  <= {s_rxd[0], ce_rx_data};
      s_rxv  <= {s_rxv[0], ce_rx_valid};
      s_rxc  <= {s_rxc[0], ce_rx_clk};
      s_txc  <= {s_txc[0], ce_tx_clk};
      s_gc   <= {s_gc[0],  ce_gclk};
      s_ctl0 <= {s_ctl0[0], ce_ctl_in[0]};
      s_ctl1 <= {s_ctl1[0], ce_ctl_in[1]};
      rxc_d  <= s_rxc[1];
      txc_d  <= s_txc[1];
      gc_d   <= s_gc[1];
    end
  end

  logic rx_edge;
  assign rx_edge = s_rxc[1] & ~rxc_d;
  assign tx_tick = s_txc[1] & ~txc_d;
  assign gtick   = s_gc[1]  & ~gc_d;
  assign ctl_in  = {s_ctl1[1], s_ctl0[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_bit <= 1'b0; rx_valid <= 1'b0; rx_end <= 1'b0; rx_tick <= 1'b0;
    end else begin
      rx_end  <= 1'b0;
      rx_tick <= rx_edge;
      if (rx_edge) begin
        rx_bit   <= s_rxd[1];
        rx_valid <= s_rxv[1];
        rx_end   <= rx_valid & ~s_rxv[1];
      end
    end
  end

  // outgoing lines: own data, repeated data, or repeated data overwritten
  logic nxt_data, nxt_valid;
  always_comb begin
    if (couple && !(overwrite && tx_valid)) begin
      nxt_data  = rx_bit;
      nxt_valid = rx_valid;
    end else begin
      nxt_data  = tx_bit;
      nxt_valid = tx_valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_tx_data <= 1'b0; ce_tx_valid <= 1'b0; ce_ctl_out <= '0;
    end else begin
      ce_ctl_out <= ctl_out;
      if (tx_tick) begin
        ce_tx_data  <= nxt_data;
        ce_tx_valid <= nxt_valid;
      end
    end
  end
endmodule
