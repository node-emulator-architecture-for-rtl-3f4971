// tb_pw_link_controller: end-to-end run of the link layer controller with
// every parameter at its default (16K-word receive queue).
//
// Around the controller the testbench provides three models:
//   - a host on the P2 bus: it releases the 68020 from reset, writes packets
//     (7 preamble bytes 55h, a start delimiter D5h, then the payload) into
//     its two transmit buffers, posts transmit requests in the control
//     mailbox with a doorbell interrupt, and handles the replies: buffer
//     free, packet received (checked word by word against what it sent,
//     then the shadow pointer is advanced) and receive queue full;
//   - the 68020 program on the local bus: it loads the pattern table (the
//     start delimiter) and the two decision tables, queues transmit requests
//     so that one packet is sent at a time, retries after a collision,
//     collects the event records and reports to the host;
//   - the channel emulator: bit clocks (8 board clocks per bit), a global
//     clock, a loopback of the node's output to its input (a broadcast
//     channel on which the node hears itself), a collision line, and in the
//     last phase an external sender whose bits the node must repeat.
// Phases: normal traffic with double buffering, a collision and retry, the
// host stops reading until the receive queue overflows, then recovers, and
// finally receive-to-transmit coupling. Each mechanism is counted and a
// mechanism that never happened counts as a failure. Packet length on the
// line is checked in bit periods (8 per byte plus 32 CRC bits), and the
// time stamps of the start and end events against that length.
module tb_pw_link_controller;
  import pw_pkg::*;

  logic clk = 0, rst_n = 0;
  logic h_sel = 0, h_we = 0, h_rvalid, h_irq;
  logic [15:0] h_addr = 0, h_wdata = 0, h_rdata;
  logic c_req = 0, c_we = 0, c_ack, c_irq, cpu_reset;
  logic [15:0] c_addr = 0;
  logic [31:0] c_wdata = 0, c_rdata;
  logic ce_rx_data, ce_rx_valid, ce_rx_clk, ce_tx_clk = 0, ce_gclk = 0;
  logic [1:0] ce_ctl_in = 0, ce_ctl_out;
  logic ce_tx_data, ce_tx_valid;

  int checks = 0, failures = 0;

  pw_link_controller dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- channel
  localparam int BITCLK = 8;
  logic inj_mode = 0, inj_data = 0, inj_valid = 0;
  always #(BITCLK * 5) ce_tx_clk = ~ce_tx_clk;
  always #(BITCLK * 10) ce_gclk = ~ce_gclk;          // one global tick per 2 bits
  assign ce_rx_clk   = ~ce_tx_clk;                   // sample in mid bit
  assign ce_rx_data  = inj_mode ? inj_data  : ce_tx_data;
  assign ce_rx_valid = inj_mode ? inj_valid : ce_tx_valid;

  // packets on the line: length in bits and gaps between packets
  int line_bits = 0, n_line_pkts = 0, gap_bits = 0, min_gap = 1 << 30;
  int line_lens[$];
  int collide_at = -1;                               // packet number to collide with
  int n_collisions_driven = 0;
  always @(posedge ce_tx_clk) if (rst_n && !inj_mode) begin
    if (ce_tx_valid) begin
      if (line_bits == 0) begin
        if (n_line_pkts > 0 && gap_bits < min_gap) min_gap = gap_bits;
      end
      line_bits++;
      if (n_line_pkts == collide_at && line_bits == 300) begin
        ce_ctl_in[0] <= 1; n_collisions_driven++;
      end
      if (n_line_pkts == collide_at && line_bits == 304) ce_ctl_in[0] <= 0;
    end else begin
      if (line_bits != 0) begin
        line_lens.push_back(line_bits); n_line_pkts++; gap_bits = 0;
        ce_ctl_in[0] <= 0;
      end
      line_bits = 0; gap_bits++;
    end
  end

  // ---------------------------------------------------------------- shared
  localparam logic [15:0] CTL_H2C = 16'(CTL_BASE);          // host -> 68020 message
  localparam logic [15:0] CTL_C2H = 16'(CTL_BASE + 'h10);   // 68020 -> host message
  localparam logic [15:0] MON     = 16'(MON_BASE);
  localparam int PREAMBLE = 8;

  // mechanism counters
  int n_tx_ok = 0, n_rx_ok = 0, n_rx_bad = 0, n_coll_irq = 0, n_ovf_msg = 0;
  int n_events = 0, n_dbl_buf = 0, n_wrap = 0, n_h2c = 0, n_c2h = 0, n_couple = 0, n_ts_ok = 0;

  // ---------------------------------------------------------------- host
  // two host threads share the bus: one access at a time
  bit h_lock = 0;
  task automatic h_wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    while (h_lock) @(negedge clk);
    h_lock = 1;
    h_sel = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_sel = 0; h_we = 0;
    h_lock = 0;
  endtask
  task automatic h_rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk);
    while (h_lock) @(negedge clk);
    h_lock = 1;
    h_sel = 1; h_we = 0; h_addr = a;
    @(negedge clk); h_sel = 0; d = h_rdata;
    h_lock = 0;
  endtask

  logic [15:0] sent_words [$][$];      // payload+FCS words of packets in flight
  logic        buf_busy [2] = '{0, 0};
  logic        host_reading = 1;
  logic [13:0] last_end = 14'h3FFF;
  int          pkts_sent = 0;
  int          last_start = -1;
  logic        cpu_ready = 0;

  function automatic logic [31:0] fcs_of(input byte unsigned d[$]);
    logic [31:0] r = 32'hFFFF_FFFF;
    foreach (d[i]) for (int b = 0; b < 8; b++) r = (r >> 1) ^ ((r[0] ^ d[i][b]) ? 32'hEDB8_8320 : 0);
    return ~r;
  endfunction

  task automatic host_doorbell(input logic [7:0] code);
    logic [15:0] s;
    do h_rd(16'h8000, s); while (s[1]);      // previous request still pending
    h_wr(16'h8000, {8'h0, code});
    n_h2c++;
  endtask

  task automatic host_send(input int nbytes);
    byte unsigned pay[$];
    logic [15:0] w[$];
    logic [31:0] f;
    int b;
    logic [15:0] base;
    while (buf_busy[0] && buf_busy[1]) @(negedge clk);
    b = buf_busy[0] ? 1 : 0;
    if (buf_busy[1 - b]) n_dbl_buf++;
    buf_busy[b] = 1;
    base = 16'(TX_BASE + (2 + b) * TXBUF_WORDS);    // buffers 2 and 3 belong to the host
    for (int i = 0; i < nbytes; i++) pay.push_back(8'($urandom));
    f = fcs_of(pay);
    for (int i = 0; i < PREAMBLE / 2 - 1; i++) h_wr(base + 16'(i), 16'h5555);
    h_wr(base + 16'(PREAMBLE / 2 - 1), 16'h55D5);
    for (int i = 0; i < nbytes; i += 2)
      h_wr(base + 16'(PREAMBLE / 2 + i / 2), {pay[i], (i + 1 < nbytes) ? pay[i + 1] : 8'h00});
    // expected receive queue contents: payload then the 4 CRC bytes
    for (int k = 0; k < 4; k++) pay.push_back(f[8*k +: 8]);
    for (int i = 0; i < pay.size(); i += 2) w.push_back({pay[i], (i + 1 < pay.size()) ? pay[i + 1] : 8'h00});
    sent_words.push_back(w);
    h_wr(CTL_H2C + 0, base);
    h_wr(CTL_H2C + 1, 16'(nbytes + PREAMBLE));
    host_doorbell(8'h01);
    pkts_sent++;
  endtask

  // host interrupt service
  initial begin
    logic [15:0] s, a, len, crc, d;
    forever begin
      @(negedge clk);
      if (!h_irq) continue;
      h_rd(16'h8001, s);
      h_wr(16'h8001, 0);
      n_c2h++;
      unique case (s[7:0])
        8'h80: cpu_ready = 1;
        8'h81: begin
          h_rd(CTL_C2H + 0, a);
          buf_busy[(a - 16'(TX_BASE)) / 16'(TXBUF_WORDS) - 2] = 0;
        end
        8'h82: begin
          h_rd(CTL_C2H + 0, a); h_rd(CTL_C2H + 1, len); h_rd(CTL_C2H + 2, crc);
          if (last_start >= 0 && int'(a) < last_start) n_wrap++;
          last_start = int'(a);
          if (crc[0]) begin
            logic [15:0] w[$];
            n_rx_ok++;
            if (host_reading && sent_words.size() > 0) begin
              w = sent_words.pop_front();
              chk(int'(len) == 2 * w.size() || int'(len) == 2 * w.size() - 1, "received length");
              foreach (w[i]) begin
                h_rd(16'((int'(a) + i) % RX_WORDS), d);
                chk(d === w[i], $sformatf("received word %0d", i));
              end
            end
          end else n_rx_bad++;
          if (host_reading) begin
            last_end = 14'((int'(a) + (int'(len) + 1) / 2 - 1) % RX_WORDS);
            h_wr(16'h8003, 16'(last_end));
          end
        end
        8'h83: begin
          // receive queue full: drop everything stored so far
          h_rd(CTL_C2H + 0, a);
          n_ovf_msg++;
          last_end = 14'(a) - 14'd1;
          h_wr(16'h8003, 16'(last_end));
          sent_words.delete();
        end
        default: chk(0, "unknown message");
      endcase
      host_doorbell(8'h02);       // reply: mailbox free
    end
  end

  // ---------------------------------------------------------------- 68020
  task automatic c_acc(input logic w, input logic [15:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk); c_req = 1; c_we = w; c_addr = a; c_wdata = d;
    while (!c_ack) @(negedge clk);
    r = c_rdata; c_req = 0;
  endtask
  task automatic c_wr(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] r;
    c_acc(1, a, d, r);
  endtask
  task automatic c_rd(input logic [15:0] a, output logic [31:0] r);
    c_acc(0, a, 0, r);
  endtask

  function automatic logic [34:0] ent(cond_e c, logic inv, int nt, int nf, int act, int lvl, int code);
    fsm_entry_t e;
    e = '{cond: c, inv: inv, next_t: 5'(nt), next_f: 5'(nf), act: ACT_W'(act), lvl: 4'(lvl), code: 8'(code)};
    return 35'(e);
  endfunction
  task automatic load_fsm(input logic tx, input int st, input logic [34:0] e);
    c_wr(16'h8019, e[31:0]);
    c_wr(16'h801A, {15'b0, tx, 3'b0, 5'(st), 5'b0, e[34:32]});
  endtask

  localparam int EV_TX_GO = 'h10, EV_TX_END = 'h11, EV_TX_COLL = 'h1C, EV_RX_GO = 'h20, EV_RX_END = 'h21;

  // outgoing messages to the host wait for its reply
  logic [15:0] out_q [$][$];
  logic        out_busy = 0;
  task automatic c_post(input logic [15:0] m[$]);
    out_q.push_back(m);
  endtask
  task automatic c_flush_out();
    logic [15:0] m[$];
    if (out_busy || out_q.size() == 0) return;
    m = out_q.pop_front();
    for (int i = 1; i < m.size(); i++) c_wr(CTL_C2H + 16'(i - 1), 32'(m[i]));
    c_wr(16'h8009, 32'(m[0]));
    out_busy = 1;
  endtask

  // collect event records; check tx start/end time stamps against the length
  int ev_tx_go_ts = -1;
  int mon_ptr = 0;
  task automatic c_collect_events(input int tx_len_bytes);
    logic [31:0] h, t;
    forever begin
      c_rd(16'h800A, h);
      if (h[8]) break;                 // empty
      c_rd(16'h800B, t);
      c_wr(16'h800C, 0);
      n_events++;
      // monitoring record in the mailbox: code, time
      c_wr(MON + 16'(mon_ptr % 256) * 2, {24'b0, h[7:0]});
      c_wr(MON + 16'(mon_ptr % 256) * 2 + 1, t);
      mon_ptr++;
      if (h[7:0] == 8'(EV_TX_GO)) ev_tx_go_ts = int'(t);
      if (h[7:0] == 8'(EV_TX_END) && ev_tx_go_ts >= 0) begin
        int bits = 8 * tx_len_bytes + 32;
        int dt = int'(t) - ev_tx_go_ts;
        chk(dt >= bits / 2 - 2 && dt <= bits / 2 + 2, $sformatf("tx duration %0d ticks for %0d bits", dt, bits));
        n_ts_ok++;
        ev_tx_go_ts = -1;
      end
    end
  endtask

  logic [15:0] txq_addr [$], txq_len [$];
  logic        tx_active = 0;
  logic [15:0] cur_addr, cur_len;
  task automatic c_start_tx();
    if (tx_active || txq_addr.size() == 0) return;
    cur_addr = txq_addr.pop_front(); cur_len = txq_len.pop_front();
    c_wr(16'h8000, 32'(cur_addr));
    c_wr(16'h8001, 32'(cur_len));
    c_wr(16'h8002, 32'h0000_0081);     // CRC on, skip the 8 preamble bytes
    c_wr(16'h8004, 32'h1);             // FLAG0: packet ready
    tx_active = 1;
  endtask

  logic cpu_done = 0;
  initial begin
    logic [31:0] s, r, st, len, start, wp;
    wait (rst_n && !cpu_reset);
    // pattern 0: last 0x55 byte and the 0xD5 delimiter, in arrival order
    c_wr(16'h8014, 32'h0000_AAAB); c_wr(16'h8015, 0);
    c_wr(16'h8016, 32'h0000_FFFF); c_wr(16'h8017, 0);
    c_wr(16'h8018, 32'h0000_0000);
    // transmit machine
    load_fsm(1, 0, ent(C_FLAG0,  0, 1, 0, (1 << A_GO) | (1 << A_EVT), 0, EV_TX_GO));
    load_fsm(1, 1, ent(C_TXDONE, 0, 2, 4, (1 << A_EVT) | (1 << A_IRQ) | (1 << A_TMR), 0, EV_TX_END));
    load_fsm(1, 4, ent(C_CTLIN,  0, 2, 1, (1 << A_STOP) | (1 << A_EVT) | (1 << A_IRQ) | (1 << A_TMR), 0, EV_TX_COLL));
    load_fsm(1, 2, ent(C_TIMER,  0, 0, 2, 0, 0, 0));
    // receive machine
    load_fsm(0, 0, ent(C_MATCH0,  0, 1, 0, (1 << A_GO) | (1 << A_EVT), 0, EV_RX_GO));
    load_fsm(0, 1, ent(C_RXVALID, 1, 0, 1, (1 << A_STOP) | (1 << A_EVT) | (1 << A_IRQ) | (1 << A_ARM), 0, EV_RX_END));
    c_wr(16'h8007, 32'd96);            // interframe gap in bit periods
    c_wr(16'h8012, 32'h8000_0001);     // slot 0 searches pattern 0, arm
    c_wr(16'h8005, 32'h3);             // run both machines
    c_post('{16'h0080});
    c_flush_out();
    while (!cpu_done) begin
      @(negedge clk);
      if (!c_irq) continue;
      c_rd(16'h8008, s);
      if (s[17]) begin                               // transmit machine
        c_wr(16'h8008, 32'h2);
        c_collect_events(int'(cur_len));
        if (s[16:9] == 8'(EV_TX_END)) begin
          n_tx_ok++;
          c_wr(16'h8004, 0);
          tx_active = 0;
          c_post('{16'h0081, cur_addr});
          c_start_tx();
        end else if (s[16:9] == 8'(EV_TX_COLL)) begin
          n_coll_irq++;
          c_rd(16'h8003, r);
          chk(r[1] == 1'b1, "transmission reported aborted");
          c_wr(16'h8002, 32'h0000_0083);             // reset the transmit hardware
          c_wr(16'h8004, 0);
          c_wr(16'h8004, 32'h1);                     // retry after the gap
        end
      end
      if (s[8]) begin                                // receive machine
        c_wr(16'h8008, 32'h1);
        c_collect_events(int'(cur_len));
        c_rd(16'h800E, st); c_rd(16'h800F, len); c_rd(16'h8010, start); c_rd(16'h8011, wp);
        if (st[2]) begin
          c_wr(16'h800D, 32'h4);
          c_post('{16'h0083, 16'(wp)});
        end else begin
          c_post('{16'h0082, 16'(start), 16'(len), {15'b0, st[3]}});
        end
      end
      if (s[26]) begin                               // host request
        c_wr(16'h8008, 32'h4);
        if (s[25:18] == 8'h01) begin
          c_rd(CTL_H2C + 0, r); txq_addr.push_back(16'(r));
          c_rd(CTL_H2C + 1, r); txq_len.push_back(16'(r));
          c_start_tx();
        end else if (s[25:18] == 8'h02) begin
          out_busy = 0;
        end
      end
      c_flush_out();
    end
  end

  // ---------------------------------------------------------------- scenario
  initial begin
    int n_line_before;
    logic [63:0] pat;
    logic got[$];
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    chk(cpu_reset == 1, "68020 held in reset after power-up");
    h_wr(16'h8002, 0);
    wait (cpu_ready);
    // phase 1: normal traffic, two buffers in use, one collision
    collide_at = 2;
    for (int i = 0; i < 6; i++) host_send($urandom_range(46, 300));
    wait (n_tx_ok == 6 && sent_words.size() == 0);
    repeat (2000) @(negedge clk);
    chk(n_rx_ok == 6, "all packets received intact");
    // phase 2: the host stops reading; large packets fill the receive queue
    $display("%0t: phase 1 done, %0d packets", $time, n_tx_ok);
    host_reading = 0;
    for (int i = 0; i < 20 && n_ovf_msg == 0; i++) host_send(2000);
    wait (n_tx_ok == 26 || (n_ovf_msg > 0 && !buf_busy[0] && !buf_busy[1]));
    wait (!buf_busy[0] && !buf_busy[1]);
    repeat (3000) @(negedge clk);
    host_reading = 1;
    $display("%0t: phase 2 done, %0d packets, %0d full messages", $time, n_tx_ok, n_ovf_msg);
    // after recovery one more packet must arrive intact
    begin
      int n_before;
      n_before = n_rx_ok;
      sent_words.delete();
      host_send(100);
      wait (n_rx_ok == n_before + 1);
    end
    repeat (2000) @(negedge clk);
    $display("%0t: recovery done", $time);
    // phase 3: ring-node coupling, an external packet is repeated
    cpu_done = 1;
    repeat (100) @(negedge clk);
    @(negedge clk); c_wr(16'h8005, 32'h1);          // stop the transmit machine
    load_fsm(1, 0, ent(C_ALWAYS, 0, 0, 0, 0, 4'b0100, 0));
    c_wr(16'h8005, 32'h3);
    repeat (50) @(negedge clk);
    inj_mode = 1;
    pat = {$urandom, $urandom};
    for (int i = 0; i < 64; i++) begin
      @(posedge ce_tx_clk); inj_data <= pat[i]; inj_valid <= 1;
    end
    @(posedge ce_tx_clk); inj_valid <= 0;
    repeat (8) @(posedge ce_tx_clk);
    inj_mode = 0;
    if (rep_hist == pat) n_couple++;
    else $display("repeated %h sent %h", rep_hist, pat);
    // line lengths of every complete packet (the collided one excluded)
    foreach (line_lens[i])
      chk(line_lens[i] > 8 * (PREAMBLE + 46) && ((line_lens[i] - 32) % 8) == 0 || i == collide_at,
          $sformatf("packet %0d has %0d bits", i, line_lens[i]));
    chk(min_gap >= 96, $sformatf("interframe gap %0d bit periods", min_gap));
    $display("tx %0d rx ok %0d rx bad %0d collisions %0d overflow msgs %0d events %0d dbl %0d wraps %0d h2c %0d c2h %0d ts %0d couple %0d gap %0d",
             n_tx_ok, n_rx_ok, n_rx_bad, n_coll_irq, n_ovf_msg, n_events, n_dbl_buf, n_wrap, n_h2c, n_c2h, n_ts_ok, n_couple, min_gap);
    chk(n_tx_ok > 0, "transmission");
    chk(n_rx_ok > 0, "reception with good CRC");
    chk(n_rx_bad > 0, "reception with bad CRC (collided packet)");
    chk(n_coll_irq > 0, "collision stop and retry");
    chk(n_ovf_msg > 0, "receive queue full");
    chk(n_wrap > 0, "receive queue wrap-around");
    chk(n_events > 0, "event records");
    chk(n_ts_ok > 0, "time stamped transmission");
    chk(n_dbl_buf > 0, "second host buffer used while the first is busy");
    chk(n_h2c > 0 && n_c2h > 0, "interrupts both ways");
    chk(n_couple > 0, "receive-to-transmit coupling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coupling check: the injected bits must reappear on the outgoing line
  logic [63:0] rep_hist = 0;
  always @(posedge ce_rx_clk) if (inj_mode) begin
    if (ce_tx_valid) rep_hist = {ce_tx_data, rep_hist[63:1]};
  end
endmodule
