// tb_pw_tx_hw: serves the transmission hardware's word reads from a memory
// model with random bus delays, collects the bits it sends at each transmit
// tick, and compares them with the buffer bytes (high byte of each word
// first, each byte LSB first) followed by a reference CRC-32 over the bytes
// after the skipped preamble. Also checks the packet length in bit periods
// (8 per byte plus 32 for the CRC, done one tick after the last bit), odd
// lengths, sending without CRC, a stop in mid-packet and a software reset.
module tb_pw_tx_hw;
  localparam int AW = 15;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] start_addr = 0, bus_addr;
  logic [11:0] len_bytes = 0;
  logic crc_en = 0, sw_reset = 0, go = 0, stop = 0, tx_tick = 0;
  logic [3:0] crc_skip = 0;
  logic bus_req, bus_gnt, bus_rvalid = 0;
  logic [15:0] bus_rdata = 0;
  logic tx_bit, tx_valid, busy, done, aborted, underrun;
  int checks = 0, failures = 0;
  logic [15:0] mem [logic [AW-1:0]];
  logic got[$];
  int ticks_valid, ndone;

  pw_tx_hw #(.AW(AW), .LW(12)) dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // bus: grant with a random delay, data one clock after the grant
  logic [AW-1:0] rd_addr;
  logic gnt_ok;
  always_ff @(posedge clk) gnt_ok <= ($urandom % 3) != 0;
  assign bus_gnt = bus_req && gnt_ok;
  always_ff @(posedge clk) begin
    bus_rvalid <= bus_req && bus_gnt;
    if (bus_req && bus_gnt) bus_rdata <= mem.exists(bus_addr) ? mem[bus_addr] : 16'h0;
  end

  // one transmit tick every 8 clocks
  int div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 7) ? 0 : div + 1;
    tx_tick <= (div == 7);
  end
  always @(negedge clk) if (rst_n) begin
    if (done) ndone++;
    if (tx_tick && tx_valid) ticks_valid++;
  end
  // sample the bit presented for the period just started
  always @(posedge clk) if (rst_n && tx_tick) begin
    #1; if (tx_valid) got.push_back(tx_bit);
  end

  function automatic logic [31:0] ref_fcs(input byte unsigned d[$]);
    logic [31:0] r = 32'hFFFF_FFFF;
    foreach (d[i]) for (int b = 0; b < 8; b++) r = (r >> 1) ^ ((r[0] ^ d[i][b]) ? 32'hEDB8_8320 : 0);
    return ~r;
  endfunction

  task automatic send_packet(input int len, input logic crc, input int skip);
    byte unsigned bytes[$], cbytes[$];
    logic expb[$];
    logic [AW-1:0] base;
    logic [31:0] f;
    int t0, t1;
    base = AW'('h4000 + $urandom_range(0, 3) * 1024);
    for (int i = 0; i < len; i++) bytes.push_back(8'($urandom));
    for (int w = 0; w < (len + 1) / 2; w++)
      mem[base + AW'(w)] = {bytes[2*w], (2*w + 1 < len) ? bytes[2*w + 1] : 8'h00};
    foreach (bytes[i]) begin
      for (int b = 0; b < 8; b++) expb.push_back(bytes[i][b]);
      if (i >= skip) cbytes.push_back(bytes[i]);
    end
    f = ref_fcs(cbytes);
    if (crc) for (int b = 0; b < 32; b++) expb.push_back(f[b]);
    got.delete(); ticks_valid = 0; ndone = 0;
    @(negedge clk);
    start_addr = base; len_bytes = 12'(len); crc_en = crc; crc_skip = 4'(skip); go = 1;
    @(negedge clk); go = 0;
    t0 = $time;
    wait (done); @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != expb.size()) begin
      failures++; $display("len %0d crc %0d: %0d bits, expected %0d", len, crc, got.size(), expb.size());
    end else begin
      foreach (expb[i]) if (got[i] !== expb[i]) begin failures++; $display("bit %0d differs (len %0d)", i, len); break; end
    end
    checks++;
    if (ndone != 1 || ticks_valid != expb.size() || busy || aborted || underrun) begin
      failures++; $display("done %0d ticks %0d busy %b ab %b ur %b", ndone, ticks_valid, busy, aborted, underrun);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    send_packet(9, 1, 0);
    send_packet(1, 0, 0);
    send_packet(64, 1, 8);
    send_packet(1500, 1, 8);
    for (int i = 0; i < 6; i++) send_packet($urandom_range(1, 120), 1'($urandom), $urandom_range(0, 3));
    // stop in mid-packet
    @(negedge clk); start_addr = AW'('h4400); len_bytes = 12'd100; crc_en = 1; go = 1;
    @(negedge clk); go = 0;
    repeat (200) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    repeat (20) @(negedge clk);
    checks++; if (busy || tx_valid || !aborted) begin failures++; $display("stop ignored"); end
    @(negedge clk); sw_reset = 1; @(negedge clk); sw_reset = 0;
    checks++; if (aborted) begin failures++; $display("reset ignored"); end
    send_packet(20, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
