// tb_pw_rx_hw: sends packets (random bytes followed by their CRC-32) into the
// reception hardware one bit per receive tick, grants its writes after
// random delays, and checks the words in the cyclic queue (first byte in
// the high half), the reported start, length and CRC result, wrap-around of
// the queue, a corrupted packet, and the full/overflow behaviour when the
// host's shadow pointer does not move. The queue is shortened to 64 words.
module tb_pw_rx_hw;
  localparam int AW = 15, RXW = 64, QW = 6;
  logic clk = 0, rst_n = 0, rx_tick = 0, rx_bit = 0, rx_valid = 0, go = 0, stop = 0, clr_ovf = 0;
  logic [QW-1:0] shadow_ptr = QW'(RXW - 1), wr_ptr, pkt_start;
  logic full, overflow, bus_req, bus_gnt, busy, done, crc_ok;
  logic [AW-1:0] bus_addr;
  logic [15:0] bus_wdata, pkt_len;
  int checks = 0, failures = 0;
  logic [15:0] mem [RXW];
  int ndone = 0;

  pw_rx_hw #(.AW(AW), .RX_WORDS(RXW), .RX_BASE(0)) dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic gnt_ok;
  always_ff @(posedge clk) gnt_ok <= ($urandom % 3) != 0;
  assign bus_gnt = bus_req && gnt_ok;
  always_ff @(posedge clk) if (bus_req && bus_gnt) mem[bus_addr[QW-1:0]] <= bus_wdata;
  always @(negedge clk) if (rst_n && done) ndone++;

  function automatic logic [31:0] ref_fcs(input byte unsigned d[$]);
    logic [31:0] r = 32'hFFFF_FFFF;
    foreach (d[i]) for (int b = 0; b < 8; b++) r = (r >> 1) ^ ((r[0] ^ d[i][b]) ? 32'hEDB8_8320 : 0);
    return ~r;
  endfunction

  task automatic bit_out(input logic b, input logic v);
    @(negedge clk); rx_tick = 1; rx_bit = b; rx_valid = v;
    @(negedge clk); rx_tick = 0;
    repeat (6) @(negedge clk);
  endtask

  task automatic packet(input int len, input logic corrupt, input logic expect_ovf);
    byte unsigned bytes[$];
    logic [31:0] f;
    logic [QW-1:0] start;
    int n0;
    for (int i = 0; i < len; i++) bytes.push_back(8'($urandom));
    f = ref_fcs(bytes);
    for (int k = 0; k < 4; k++) bytes.push_back(f[8*k +: 8]);
    if (corrupt) bytes[0] ^= 8'h01;
    start = wr_ptr; n0 = ndone;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    foreach (bytes[i]) for (int b = 0; b < 8; b++) bit_out(bytes[i][b], 1);
    bit_out(0, 0);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    wait (ndone == n0 + 1); @(negedge clk);
    checks++;
    if (pkt_len != 16'(len + 4) || pkt_start != start || crc_ok !== !corrupt) begin
      failures++; $display("len %0d/%0d start %0d/%0d crc %b", pkt_len, len + 4, pkt_start, start, crc_ok);
    end
    if (!expect_ovf) begin
      for (int w = 0; w < (len + 5) / 2; w++) begin
        logic [15:0] e;
        e = {bytes[2*w], (2*w + 1 < len + 4) ? bytes[2*w + 1] : 8'h00};
        checks++;
        if (mem[(int'(start) + w) % RXW] !== e) begin failures++; $display("word %0d %h exp %h", w, mem[(int'(start) + w) % RXW], e); end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    packet(10, 0, 0);
    // host reads everything: shadow pointer to the last written word
    shadow_ptr = wr_ptr - 1'b1;
    packet(17, 0, 0);
    shadow_ptr = wr_ptr - 1'b1;
    packet(40, 1, 0);      // wraps around the queue, bad CRC
    shadow_ptr = wr_ptr - 1'b1;
    checks++; if (overflow) begin failures++; $display("unexpected overflow"); end
    // host stops reading: queue fills and overflows
    packet(60, 0, 1);
    packet(60, 0, 1);
    checks++; if (!full || !overflow) begin failures++; $display("no overflow: full %b ovf %b", full, overflow); end
    checks++; if (wr_ptr != shadow_ptr) begin failures++; $display("write pointer passed the shadow pointer"); end
    @(negedge clk); clr_ovf = 1; @(negedge clk); clr_ovf = 0;
    shadow_ptr = wr_ptr - 1'b1;
    packet(8, 0, 0);
    checks++; if (overflow) begin failures++; $display("overflow stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
