// pw_link_controller: link layer controller board of a Protocol Workroom
// node emulator.
//
// The board sits between the host computer (a 68010 board reached over the
// P2 bus) and the channel emulator, and takes every bit-time-critical part
// of a link layer protocol off its own processor (a 68020, outside this
// module, on the local bus ports). Its blocks, as in the board overview:
//   - mailbox RAM (pw_dpram), shared with the host, holding the transmit
//     buffers, the 16K-word cyclic receive queue and the message mailboxes;
//   - transmission (pw_tx_hw) and reception (pw_rx_hw) hardware moving
//     packets between that RAM and the channel, with CRC-32 generate/check;
//   - the state machines: a pattern recognizer (pw_pattern_matcher) and two
//     table-driven decision machines (pw_decision_fsm), one for transmit and
//     one for receive, each with a delay timer (pw_timer), coupled by one
//     flag each way;
//   - the event FIFO with the global time stamp (pw_event_fifo);
//   - the channel emulator interface with receive-to-transmit coupling
//     (pw_chan_if), the P2 bus port (pw_p2_if) and the 68020 register
//     decode (pw_lc_regs); the local side of the RAM is shared by the
//     reception hardware, the transmission hardware and the 68020 through a
//     fixed-priority arbiter (pw_bus_arb).
//
// Decision machine wiring (this design's choice): condition inputs follow
// pw_pkg::cond_e. "Packet sent" and "timer expired" are presented as levels
// that hold until the machine starts the next transfer or delay, so a
// machine that alternates between tests cannot miss them. The receive machine drives the reception hardware with its
// GO/STOP actions and event port 0, the transmit machine the transmission
// hardware and event port 1; ARM from either machine (or the 68020) re-arms
// the pattern search. Levels 1:0 of both machines are ORed onto the channel
// control lines, level 2 selects coupling and level 3 overwrite. Both timers
// count transmit bit periods.
//
// Timing: one board clock domain; the channel clocks must be at most a
// quarter of the board clock. The 68020 is held in reset (cpu_reset) from
// power-up until the host releases it.
//
// Lint notes: some instance outputs are left unconnected on purpose - the decision
// machines' state numbers, the pattern slots' active/index outputs, the timers'
// expired pulse and running level (the machines test the done level), the
// reception done pulse (the machines see rx_end), the free-running time stamp
// and read-valid of arbiter port 0 (reception only writes). Channel control
// input 1 is brought in and synchronised but no condition uses it; all 16
// condition codes are taken. rst_n is both the asynchronous flop reset and, inside
// the arbiter, the disable of a sampled assertion.
module pw_link_controller #(
  parameter int unsigned RX_WORDS  = pw_pkg::RX_WORDS,
  parameter int unsigned EV_DEPTH  = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // P2 bus to the host board
  input  logic        h_sel,
  input  logic        h_we,
  input  logic [15:0] h_addr,
  input  logic [15:0] h_wdata,
  output logic [15:0] h_rdata,
  output logic        h_rvalid,
  output logic        h_irq,
  // 68020 local bus
  input  logic        c_req,
  input  logic        c_we,
  input  logic [15:0] c_addr,
  input  logic [31:0] c_wdata,
  output logic [31:0] c_rdata,
  output logic        c_ack,
  output logic        c_irq,
  output logic        cpu_reset,
  // channel emulator
  input  logic        ce_rx_data,
  input  logic        ce_rx_valid,
  input  logic        ce_rx_clk,
  input  logic        ce_tx_clk,
  input  logic        ce_gclk,
  input  logic [1:0]  ce_ctl_in,
  output logic        ce_tx_data,
  output logic        ce_tx_valid,
  output logic [1:0]  ce_ctl_out
);
  import pw_pkg::*;
  localparam int unsigned AW = RAM_AW;
  localparam int unsigned QW = $clog2(RX_WORDS);
  localparam int unsigned FW = $clog2(EV_DEPTH) + 1;

  // ---------------- channel interface ----------------
  logic       rx_tick, rx_bit, rx_valid, rx_end, tx_tick, gtick;
  logic [1:0] ctl_in, ctl_out;
  logic       tx_bit, tx_valid, couple, overwrite;

  pw_chan_if u_chan (
    .clk, .rst_n,
    .ce_rx_data, .ce_rx_valid, .ce_rx_clk, .ce_tx_clk, .ce_gclk, .ce_ctl_in,
    .ce_tx_data, .ce_tx_valid, .ce_ctl_out,
    .rx_tick, .rx_bit, .rx_valid, .rx_end, .tx_tick, .gtick, .ctl_in,
    .tx_bit, .tx_valid, .ctl_out, .couple, .overwrite
  );

  // ---------------- mailbox RAM and P2 port ----------------
  logic          a_en, a_we;
  logic [AW-1:0] a_addr;
  logic [15:0]   a_wdata, a_rdata;
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [15:0]   b_wdata, b_rdata;

  logic          cpu_req_pend, host_clr, host_set;
  logic [7:0]    cpu_msg, host_code;
  logic [QW-1:0] shadow_ptr;

  pw_p2_if #(.AW(AW), .QW(QW)) u_p2 (
    .clk, .rst_n,
    .h_sel, .h_we, .h_addr, .h_wdata, .h_rdata, .h_rvalid, .h_irq,
    .ram_en(a_en), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_rdata(a_rdata),
    .cpu_irq(cpu_req_pend), .cpu_msg, .cpu_irq_clr(host_clr),
    .host_irq_set(host_set), .host_msg(host_code),
    .cpu_reset, .shadow_ptr
  );

  pw_dpram #(.AW(AW), .DW(16)) u_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  // ---------------- local bus arbiter: 0 rx, 1 tx, 2 68020 ----------------
  logic [2:0]         m_req, m_we, m_gnt, m_rvalid;
  logic [2:0][AW-1:0] m_addr;
  logic [2:0][15:0]   m_wdata;

  pw_bus_arb #(.N(3), .AW(AW), .DW(16)) u_arb (
    .clk, .rst_n,
    .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .gnt(m_gnt), .rvalid(m_rvalid),
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata)
  );

  // ---------------- state machine actions ----------------
  logic [ACT_W-1:0] rx_act, tx_act;
  logic [7:0]       rx_code, tx_code;
  logic [3:0]       rx_lvl, tx_lvl;
  logic [4:0]       rx_state, tx_state;

  // ---------------- transmission hardware ----------------
  logic [AW-1:0] tx_addr;
  logic [11:0]   tx_len;
  logic [3:0]    tx_crc_skip;
  logic          tx_crc_en, tx_sw_reset, tx_busy, tx_done, tx_aborted, tx_underrun;

  assign m_we[1]    = 1'b0;
  assign m_wdata[1] = '0;

  pw_tx_hw #(.AW(AW), .LW(12)) u_tx (
    .clk, .rst_n,
    .start_addr(tx_addr), .len_bytes(tx_len), .crc_en(tx_crc_en), .crc_skip(tx_crc_skip), .sw_reset(tx_sw_reset),
    .go(tx_act[A_GO]), .stop(tx_act[A_STOP]), .tx_tick,
    .bus_req(m_req[1]), .bus_addr(m_addr[1]), .bus_gnt(m_gnt[1]),
    .bus_rvalid(m_rvalid[1]), .bus_rdata(b_rdata),
    .tx_bit, .tx_valid,
    .busy(tx_busy), .done(tx_done), .aborted(tx_aborted), .underrun(tx_underrun)
  );

  // ---------------- reception hardware ----------------
  logic [QW-1:0] rx_wptr, rx_start;
  logic          rx_full, rx_ovf, rx_busy, rx_done, rx_crc_ok, rx_clr_ovf;
  logic [15:0]   rx_len;

  assign m_we[0] = 1'b1;

  pw_rx_hw #(.AW(AW), .RX_WORDS(RX_WORDS), .RX_BASE(RX_BASE)) u_rx (
    .clk, .rst_n, .rx_tick, .rx_bit, .rx_valid,
    .go(rx_act[A_GO]), .stop(rx_act[A_STOP]),
    .shadow_ptr, .clr_ovf(rx_clr_ovf), .wr_ptr(rx_wptr), .full(rx_full), .overflow(rx_ovf),
    .bus_req(m_req[0]), .bus_addr(m_addr[0]), .bus_wdata(m_wdata[0]), .bus_gnt(m_gnt[0]),
    .busy(rx_busy), .done(rx_done), .pkt_start(rx_start), .pkt_len(rx_len), .crc_ok(rx_crc_ok)
  );

  // ---------------- pattern recognizer ----------------
  logic               pat_we, cpu_arm;
  logic [4:0]         pat_addr;
  pat_entry_t         pat_data;
  logic [3:0]         slot_enable, match, slot_active;
  logic [3:0][4:0]    slot_start, slot_idx;

  pw_pattern_matcher u_pat (
    .clk, .rst_n, .rx_tick, .rx_bit,
    .prog_we(pat_we), .prog_addr(pat_addr), .prog_data(pat_data),
    .slot_enable, .slot_start,
    .arm(cpu_arm | rx_act[A_ARM] | tx_act[A_ARM]),
    .match, .active(slot_active), .slot_idx
  );

  // ---------------- timers ----------------
  logic [15:0] rx_tmr_load, tx_tmr_load;
  logic        rx_tmr_exp, tx_tmr_exp;
  logic        rx_tmr_done, tx_tmr_done, rx_tmr_run, tx_tmr_run;

  pw_timer #(.W(16)) u_rx_tmr (
    .clk, .rst_n, .load(rx_tmr_load), .start(rx_act[A_TMR]), .tick(tx_tick),
    .expired(rx_tmr_exp), .done(rx_tmr_done), .running(rx_tmr_run)
  );
  pw_timer #(.W(16)) u_tx_tmr (
    .clk, .rst_n, .load(tx_tmr_load), .start(tx_act[A_TMR]), .tick(tx_tick),
    .expired(tx_tmr_exp), .done(tx_tmr_done), .running(tx_tmr_run)
  );

  // ---------------- decision machines ----------------
  logic [3:0] flags;
  logic       rx_run, tx_run, fsm_we_rx, fsm_we_tx;
  logic [4:0] fsm_addr;
  fsm_entry_t fsm_data;
  logic       rx_cpl, tx_cpl;     // coupling flag raised by each machine
  logic [15:0] rx_cond, tx_cond;

  logic tx_fin;                   // packet sent, held until the next start

  always_comb begin
    rx_cond = {ctl_in[0], rx_full, flags, tx_cpl, rx_end, rx_valid, tx_fin,
               rx_tmr_done, match, 1'b1};
    tx_cond = {ctl_in[0], rx_full, flags, rx_cpl, rx_end, rx_valid, tx_fin,
               tx_tmr_done, match, 1'b1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cpl <= 1'b0; tx_cpl <= 1'b0; tx_fin <= 1'b0;
    end else begin
      if (tx_done) tx_fin <= 1'b1; else if (tx_act[A_GO] || tx_act[A_STOP]) tx_fin <= 1'b0;
      if (rx_act[A_CPLSET]) rx_cpl <= 1'b1; else if (rx_act[A_CPLCLR]) rx_cpl <= 1'b0;
      if (tx_act[A_CPLSET]) tx_cpl <= 1'b1; else if (tx_act[A_CPLCLR]) tx_cpl <= 1'b0;
    end
  end

  pw_decision_fsm u_rx_fsm (
    .clk, .rst_n, .run(rx_run),
    .prog_we(fsm_we_rx), .prog_addr(fsm_addr), .prog_data(fsm_data),
    .cond_in(rx_cond), .act(rx_act), .code(rx_code), .lvl(rx_lvl), .state(rx_state)
  );
  pw_decision_fsm u_tx_fsm (
    .clk, .rst_n, .run(tx_run),
    .prog_we(fsm_we_tx), .prog_addr(fsm_addr), .prog_data(fsm_data),
    .cond_in(tx_cond), .act(tx_act), .code(tx_code), .lvl(tx_lvl), .state(tx_state)
  );

  assign ctl_out   = rx_lvl[1:0] | tx_lvl[1:0];
  assign couple    = rx_lvl[2] | tx_lvl[2];
  assign overwrite = rx_lvl[3] | tx_lvl[3];

  // ---------------- event FIFO and time stamp ----------------
  event_t        ev_head;
  logic          ev_empty, ev_ovf, ev_pop, ev_clr_ovf, ts_clear;
  logic [FW-1:0] ev_count;
  logic [TS_W-1:0] now;

  pw_event_fifo #(.DEPTH(EV_DEPTH)) u_evt (
    .clk, .rst_n, .gtick, .ts_clear,
    .ev_valid({tx_act[A_EVT], rx_act[A_EVT]}), .ev_code({tx_code, rx_code}),
    .pop(ev_pop), .clr_ovf(ev_clr_ovf),
    .head(ev_head), .empty(ev_empty), .count(ev_count), .overflow(ev_ovf), .now
  );

  // ---------------- 68020 registers ----------------
  pw_lc_regs #(.AW(AW), .QW(QW), .LW(12), .FW(FW)) u_regs (
    .clk, .rst_n,
    .c_req, .c_we, .c_addr, .c_wdata, .c_rdata, .c_ack, .c_irq,
    .m_req(m_req[2]), .m_we(m_we[2]), .m_addr(m_addr[2]), .m_wdata(m_wdata[2]),
    .m_gnt(m_gnt[2]), .m_rvalid(m_rvalid[2]), .m_rdata(b_rdata),
    .tx_addr, .tx_len, .tx_crc_en, .tx_crc_skip, .tx_sw_reset,
    .tx_stat({tx_underrun, tx_aborted, tx_busy}),
    .flags, .rx_run, .tx_run, .rx_tmr_load, .tx_tmr_load,
    .rx_irq(rx_act[A_IRQ]), .rx_code, .tx_irq(tx_act[A_IRQ]), .tx_code,
    .fsm_we_rx, .fsm_we_tx, .fsm_addr, .fsm_data,
    .pat_we, .pat_addr, .pat_data, .slot_enable, .slot_start, .arm(cpu_arm),
    .host_pend(cpu_req_pend), .host_msg(cpu_msg), .host_clr, .host_set, .host_code,
    .ev_head, .ev_empty, .ev_count, .ev_ovf, .ev_pop, .ev_clr_ovf, .ts_clear,
    .rx_stat({rx_crc_ok, rx_ovf, rx_full, rx_busy}), .rx_len, .rx_start, .rx_wptr,
    .rx_clr_ovf
  );
endmodule
