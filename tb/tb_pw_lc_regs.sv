// tb_pw_lc_regs: 68020 accesses to the register block: RAM accesses pass to
// the arbiter port and complete on grant or read data, set-up registers
// reach their outputs and read back, table writes produce one write strobe
// with the assembled entry, state machine interrupts are held with their
// codes until cleared, and event FIFO and host interrupt strobes fire.
module tb_pw_lc_regs;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic c_req = 0, c_we = 0, c_ack, c_irq;
  logic [15:0] c_addr = 0;
  logic [31:0] c_wdata = 0, c_rdata;
  logic m_req, m_we, m_gnt, m_rvalid = 0;
  logic [14:0] m_addr, tx_addr;
  logic [15:0] m_wdata, m_rdata = 0;
  logic [11:0] tx_len;
  logic tx_crc_en, tx_sw_reset;
  logic [3:0] tx_crc_skip, flags, slot_enable;
  logic rx_run, tx_run, rx_irq = 0, tx_irq = 0, fsm_we_rx, fsm_we_tx, pat_we, arm;
  logic [15:0] rx_tmr_load, tx_tmr_load;
  logic [7:0] rx_code = 0, tx_code = 0, host_code;
  logic [4:0] fsm_addr, pat_addr;
  fsm_entry_t fsm_data;
  pat_entry_t pat_data;
  logic [3:0][4:0] slot_start;
  logic host_pend = 0, host_clr, host_set, ev_pop, ev_clr_ovf, ts_clear, rx_clr_ovf;
  logic [7:0] host_msg = 8'h5A;
  event_t ev_head = '{ts: 32'h1234_5678, code: 8'h9C};
  logic [6:0] ev_count = 7'd3;
  logic [13:0] rx_start = 14'd100, rx_wptr = 14'd200;
  int checks = 0, failures = 0;
  int n_fsm_we = 0, n_pat_we = 0, n_pop = 0;
  logic [15:0] ram [int];

  pw_lc_regs dut (
    .clk, .rst_n, .c_req, .c_we, .c_addr, .c_wdata, .c_rdata, .c_ack, .c_irq,
    .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata,
    .tx_addr, .tx_len, .tx_crc_en, .tx_crc_skip, .tx_sw_reset, .tx_stat(3'b010),
    .flags, .rx_run, .tx_run, .rx_tmr_load, .tx_tmr_load,
    .rx_irq, .rx_code, .tx_irq, .tx_code, .fsm_we_rx, .fsm_we_tx, .fsm_addr, .fsm_data,
    .pat_we, .pat_addr, .pat_data, .slot_enable, .slot_start, .arm,
    .host_pend, .host_msg, .host_clr, .host_set, .host_code,
    .ev_head, .ev_empty(1'b0), .ev_count, .ev_ovf(1'b1), .ev_pop, .ev_clr_ovf, .ts_clear,
    .rx_stat(4'b1010), .rx_len(16'd77), .rx_start, .rx_wptr, .rx_clr_ovf
  );
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // arbiter model: grant after a random delay, read data one clock later
  logic gnt_ok;
  always_ff @(posedge clk) gnt_ok <= 1'($urandom);
  assign m_gnt = m_req && gnt_ok;
  always @(posedge clk) begin
    m_rvalid <= m_gnt && !m_we;
    if (m_gnt && !m_we) m_rdata <= ram.exists(int'(m_addr)) ? ram[int'(m_addr)] : 16'h0;
    if (m_gnt && m_we) ram[int'(m_addr)] = m_wdata;
  end
  always @(negedge clk) if (rst_n) begin
    if (fsm_we_rx || fsm_we_tx) n_fsm_we++;
    if (pat_we) n_pat_we++;
    if (ev_pop) n_pop++;
  end

  task automatic acc(input logic w, input logic [15:0] a, input logic [31:0] d, output logic [31:0] r);
    int n = 0;
    @(negedge clk); c_req = 1; c_we = w; c_addr = a; c_wdata = d;
    while (!c_ack) begin @(negedge clk); n++; if (n > 50) break; end
    r = c_rdata; c_req = 0;
  endtask
  task automatic chk(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++; if (g !== e) begin failures++; $display("%s: %h exp %h", what, g, e); end
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) acc(1, 16'h4000 + 16'(i), 32'(16'hA000 + 16'(i)), r);
    for (int i = 0; i < 8; i++) begin acc(0, 16'h4000 + 16'(i), 0, r); chk(r, 32'(16'hA000 + 16'(i)), "ram"); end
    acc(1, 16'h8000, 32'h4400, r); chk(32'(tx_addr), 32'h4400, "tx_addr");
    acc(1, 16'h8001, 32'd123, r);  chk(32'(tx_len), 32'd123, "tx_len");
    acc(1, 16'h8002, 32'h81, r);   chk({tx_crc_skip, tx_crc_en}, 5'h11, "tx_ctrl");
    acc(0, 16'h8003, 0, r);        chk(r, 32'h2, "tx_stat");
    acc(1, 16'h8004, 32'h9, r);    chk(32'(flags), 32'h9, "flags");
    acc(1, 16'h8005, 32'h3, r);    chk({tx_run, rx_run}, 2'b11, "run");
    acc(1, 16'h8006, 32'd50, r);   chk(32'(rx_tmr_load), 32'd50, "timer");
    // interrupts from the machines
    @(negedge clk); rx_irq = 1; rx_code = 8'h21; @(negedge clk); rx_irq = 0;
    chk(32'(c_irq), 1, "irq");
    acc(0, 16'h8008, 0, r); chk(r, {5'b0, 1'b0, 8'h5A, 1'b0, 8'h00, 1'b1, 8'h21}, "irq status");
    acc(1, 16'h8008, 32'h1, r); chk(32'(c_irq), 0, "irq clear");
    acc(1, 16'h8009, 32'h77, r); chk(32'(host_code), 32'h77, "host code");
    acc(0, 16'h800A, 0, r); chk(r, {6'b0, 16'd3, 1'b1, 1'b0, 8'h9C}, "event head");
    acc(0, 16'h800B, 0, r); chk(r, 32'h1234_5678, "event time");
    acc(1, 16'h800C, 0, r); acc(1, 16'h800C, 0, r);
    acc(0, 16'h800F, 0, r); chk(r, 32'd77, "rx len");
    acc(0, 16'h8010, 0, r); chk(r, 32'd100, "rx start");
    // pattern and decision table writes
    acc(1, 16'h8014, 32'hDEAD_BEEF, r); acc(1, 16'h8015, 32'h0123_4567, r);
    acc(1, 16'h8016, 32'hFFFF_0000, r); acc(1, 16'h8017, 32'h0000_FFFF, r);
    acc(1, 16'h8018, 32'h0000_0305, r);
    chk(32'(pat_addr), 5, "pat addr"); chk(32'(pat_data.next), 3, "pat next");
    checks++; if (pat_data.value !== 64'h0123_4567_DEAD_BEEF || pat_data.care !== 64'h0000_FFFF_FFFF_0000) begin failures++; $display("pattern"); end
    acc(1, 16'h8019, 32'hCAFE_F00D, r); acc(1, 16'h801A, 32'h0001_0705, r);
    checks++; if (fsm_addr !== 5'd7 || fsm_data !== fsm_entry_t'({3'b101, 32'hCAFE_F00D})) begin failures++; $display("fsm entry"); end
    acc(1, 16'h8012, 32'h8000_0000 | (32'd9 << 4) | 32'h5, r);
    chk({slot_enable, 27'(slot_start[0])}, {4'h5, 27'd9}, "slots");
    chk(32'(n_fsm_we), 1, "one fsm write"); chk(32'(n_pat_we), 1, "one pattern write"); chk(32'(n_pop), 2, "pops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
