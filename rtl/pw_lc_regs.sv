// pw_lc_regs: local bus decode of the 68020 on the controller board.
//
// The 68020 supervises the dedicated hardware through this block: it sets
// up the transmission hardware, sets the status flags the state machines
// test, loads the delay timers, writes the tables of the pattern recognizer
// and of the two decision machines, collects event records from the event
// FIFO, reads the reception report, and exchanges interrupts with the host.
// Interrupt requests from the two decision machines are held here with their
// codes until the 68020 clears them. Accesses with address bit 15 clear go
// to the mailbox RAM through the local bus arbiter.
//
// Bus: c_req with address, write enable and data is held until c_ack, which
// also qualifies c_rdata on a read. Register accesses take one clock; RAM
// accesses wait for the arbiter. The register map (word addresses, 32-bit
// data) is this design's own:
//   8000 TX_ADDR    8001 TX_LEN     8002 TX_CTRL (b0 crc_en, b7:4 crc_skip, W b1 reset)
//   8003 TX_STAT    {underrun, aborted, busy}
//   8004 FLAGS[3:0] 8005 RUN {tx, rx}  8006 RX timer  8007 TX timer
//   8008 IRQ        R {host_pend, host_msg, tx_pend, tx_code, rx_pend, rx_code}
//                   W b0 clear rx, b1 clear tx, b2 clear host request
//   8009 W: interrupt the host with code data[7:0]
//   800A R {count, overflow, empty, code} of the oldest event
//   800B R time stamp of the oldest event  800C W: pop the oldest event
//   800D W b0 clear event overflow, b1 restart time, b2 clear rx overflow
//   800E R RX {crc_ok, overflow, full, busy}  800F R RX length (bytes)
//   8010 R RX start index   8011 R RX write pointer
//   8012 slot set-up: b3:0 enable, b8:4..b23:19 start of slots 0..3, W b31 arm
//   8014..8017 pattern value low/high, care low/high (staging)
//   8018 W: write pattern entry data[4:0] with next = data[12:8]
//   8019 decision entry bits 31:0 (staging)
//   801A W: write decision entry, bits [34:32] = data[2:0], state = data[12:8],
//        data[16] selects the transmit machine
module pw_lc_regs #(
  parameter int unsigned AW = pw_pkg::RAM_AW,
  parameter int unsigned QW = $clog2(pw_pkg::RX_WORDS),
  parameter int unsigned LW = 12,
  parameter int unsigned FW = 7              // event FIFO count width
) (
  input  logic          clk,
  input  logic          rst_n,
  // 68020 local bus
  input  logic          c_req,
  input  logic          c_we,
  input  logic [15:0]   c_addr,
  input  logic [31:0]   c_wdata,
  output logic [31:0]   c_rdata,
  output logic          c_ack,
  output logic          c_irq,
  // arbiter port for the mailbox RAM
  output logic          m_req,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [15:0]   m_wdata,
  input  logic          m_gnt,
  input  logic          m_rvalid,
  input  logic [15:0]   m_rdata,
  // transmission hardware
  output logic [AW-1:0] tx_addr,
  output logic [LW-1:0] tx_len,
  output logic          tx_crc_en,
  output logic [3:0]    tx_crc_skip,
  output logic          tx_sw_reset,
  input  logic [2:0]    tx_stat,
  // state machines
  output logic [3:0]    flags,
  output logic          rx_run,
  output logic          tx_run,
  output logic [15:0]   rx_tmr_load,
  output logic [15:0]   tx_tmr_load,
  input  logic          rx_irq,
  input  logic [7:0]    rx_code,
  input  logic          tx_irq,
  input  logic [7:0]    tx_code,
  output logic          fsm_we_rx,
  output logic          fsm_we_tx,
  output logic [4:0]    fsm_addr,
  output pw_pkg::fsm_entry_t fsm_data,
  // pattern recognizer
  output logic          pat_we,
  output logic [4:0]    pat_addr,
  output pw_pkg::pat_entry_t pat_data,
  output logic [3:0]    slot_enable,
  output logic [3:0][4:0] slot_start,
  output logic          arm,
  // host interrupts
  input  logic          host_pend,
  input  logic [7:0]    host_msg,
  output logic          host_clr,
  output logic          host_set,
  output logic [7:0]    host_code,
  // event FIFO
  input  pw_pkg::event_t ev_head,
  input  logic          ev_empty,
  input  logic [FW-1:0] ev_count,
  input  logic          ev_ovf,
  output logic          ev_pop,
  output logic          ev_clr_ovf,
  output logic          ts_clear,
  // reception hardware
  input  logic [3:0]    rx_stat,
  input  logic [15:0]   rx_len,
  input  logic [QW-1:0] rx_start,
  input  logic [QW-1:0] rx_wptr,
  output logic          rx_clr_ovf
);
  import pw_pkg::*;

  logic        is_ram, reg_acc, mem_pend;
  logic        rx_pend, tx_pend;
  logic [7:0]  rx_c, tx_c;
  logic [63:0] pv, pc;
  logic [31:0] fsm_lo;
  logic [4:0]  ra;

  assign is_ram  = !c_addr[15];
  assign reg_acc = c_req && !is_ram && !c_ack;
  assign ra      = c_addr[4:0];

  // mailbox RAM path
  assign m_req   = c_req && is_ram && !mem_pend && !c_ack;
  assign m_we    = c_we;
  assign m_addr  = c_addr[AW-1:0];
  assign m_wdata = c_wdata[15:0];

  assign c_irq = rx_pend | tx_pend | host_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_ack <= 1'b0; c_rdata <= '0; mem_pend <= 1'b0;
      tx_addr <= '0; tx_len <= '0; tx_crc_en <= 1'b0; tx_crc_skip <= '0; tx_sw_reset <= 1'b0;
      flags <= '0; rx_run <= 1'b0; tx_run <= 1'b0; rx_tmr_load <= '0; tx_tmr_load <= '0;
      rx_pend <= 1'b0; tx_pend <= 1'b0; rx_c <= '0; tx_c <= '0;
      pv <= '0; pc <= '0; fsm_lo <= '0;
      fsm_we_rx <= 1'b0; fsm_we_tx <= 1'b0; fsm_addr <= '0; fsm_data <= '0;
      pat_we <= 1'b0; pat_addr <= '0; pat_data <= '0;
      slot_enable <= '0; slot_start <= '0; arm <= 1'b0;
      host_clr <= 1'b0; host_set <= 1'b0; host_code <= '0;
      ev_pop <= 1'b0; ev_clr_ovf <= 1'b0; ts_clear <= 1'b0; rx_clr_ovf <= 1'b0;
    end else begin
      // single-clock strobes
      c_ack <= 1'b0; tx_sw_reset <= 1'b0; fsm_we_rx <= 1'b0; fsm_we_tx <= 1'b0;
      pat_we <= 1'b0; arm <= 1'b0; host_clr <= 1'b0; host_set <= 1'b0;
      ev_pop <= 1'b0; ev_clr_ovf <= 1'b0; ts_clear <= 1'b0; rx_clr_ovf <= 1'b0;

      if (rx_irq) begin rx_pend <= 1'b1; rx_c <= rx_code; end
      if (tx_irq) begin tx_pend <= 1'b1; tx_c <= tx_code; end

      // RAM accesses
      if (m_req && m_gnt) begin
        if (c_we) c_ack <= 1'b1;
        else      mem_pend <= 1'b1;
      end
      if (mem_pend && m_rvalid) begin
        mem_pend <= 1'b0; c_ack <= 1'b1; c_rdata <= {16'b0, m_rdata};
      end

      // register accesses
      if (reg_acc) begin
        c_ack <= 1'b1;
        if (c_we) begin
          unique case (ra)
            5'h00: tx_addr <= c_wdata[AW-1:0];
            5'h01: tx_len  <= c_wdata[LW-1:0];
            5'h02: begin tx_crc_en <= c_wdata[0]; tx_sw_reset <= c_wdata[1]; tx_crc_skip <= c_wdata[7:4]; end
            5'h04: flags <= c_wdata[3:0];
            5'h05: begin rx_run <= c_wdata[0]; tx_run <= c_wdata[1]; end
            5'h06: rx_tmr_load <= c_wdata[15:0];
            5'h07: tx_tmr_load <= c_wdata[15:0];
            5'h08: begin
              if (c_wdata[0] && !rx_irq) rx_pend <= 1'b0;
              if (c_wdata[1] && !tx_irq) tx_pend <= 1'b0;
              host_clr <= c_wdata[2];
            end
            5'h09: begin host_set <= 1'b1; host_code <= c_wdata[7:0]; end
            5'h0C: ev_pop <= 1'b1;
            5'h0D: begin ev_clr_ovf <= c_wdata[0]; ts_clear <= c_wdata[1]; rx_clr_ovf <= c_wdata[2]; end
            5'h12: begin
              slot_enable <= c_wdata[3:0];
              for (int s = 0; s < 4; s++) slot_start[s] <= c_wdata[4 + 5*s +: 5];
              arm <= c_wdata[31];
            end
            5'h14: pv[31:0]  <= c_wdata;
            5'h15: pv[63:32] <= c_wdata;
            5'h16: pc[31:0]  <= c_wdata;
            5'h17: pc[63:32] <= c_wdata;
            5'h18: begin
              pat_we   <= 1'b1;
              pat_addr <= c_wdata[4:0];
              pat_data <= '{value: pv, care: pc, next: c_wdata[12:8]};
            end
            5'h19: fsm_lo <= c_wdata;
            5'h1A: begin
              fsm_addr  <= c_wdata[12:8];
              fsm_data  <= fsm_entry_t'({c_wdata[FSM_ENTRY_W-33:0], fsm_lo});
              fsm_we_rx <= !c_wdata[16];
              fsm_we_tx <= c_wdata[16];
            end
            default: ;
          endcase
        end else begin
          unique case (ra)
            5'h00: c_rdata <= 32'(tx_addr);
            5'h01: c_rdata <= 32'(tx_len);
            5'h02: c_rdata <= {24'b0, tx_crc_skip, 3'b0, tx_crc_en};
            5'h03: c_rdata <= {29'b0, tx_stat};
            5'h04: c_rdata <= {28'b0, flags};
            5'h05: c_rdata <= {30'b0, tx_run, rx_run};
            5'h06: c_rdata <= {16'b0, rx_tmr_load};
            5'h07: c_rdata <= {16'b0, tx_tmr_load};
            5'h08: c_rdata <= {5'b0, host_pend, host_msg, tx_pend, tx_c, rx_pend, rx_c};
            5'h0A: c_rdata <= {6'b0, 16'(ev_count), ev_ovf, ev_empty, ev_head.code};
            5'h0B: c_rdata <= 32'(ev_head.ts);
            5'h0E: c_rdata <= {28'b0, rx_stat};
            5'h0F: c_rdata <= {16'b0, rx_len};
            5'h10: c_rdata <= 32'(rx_start);
            5'h11: c_rdata <= 32'(rx_wptr);
            5'h12: c_rdata <= {8'b0, slot_start[3], slot_start[2], slot_start[1], slot_start[0], slot_enable};
            default: c_rdata <= '0;
          endcase
        end
      end
    end
  end
endmodule
