// tb_pw_pattern_matcher: programs five patterns (a 16-bit start delimiter,
// a pattern with don't-care bits, a two-pattern chain and a full 64-bit
// pattern), runs four slots at once over a random bit stream with the
// patterns inserted, and compares every match pulse with a model that keeps
// the bits each slot has seen since it was armed or last matched. Each
// match must appear within one bit period.
module tb_pw_pattern_matcher;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, rx_tick = 0, rx_bit = 0, prog_we = 0, arm = 0;
  logic [4:0] prog_addr = 0;
  pat_entry_t prog_data = '0;
  logic [3:0] slot_enable = 0, match, active;
  logic [3:0][4:0] slot_start = 0, slot_idx;
  int checks = 0, failures = 0;
  int n_match [4] = '{0, 0, 0, 0};

  pw_pattern_matcher dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  pat_entry_t tbl [32];
  // model state
  int m_idx [4];
  logic m_seen [4][$];

  task automatic load_pat(input int a, input logic [63:0] v, input logic [63:0] c, input int nx);
    tbl[a] = '{value: v, care: c, next: 5'(nx)};
    @(negedge clk); prog_we = 1; prog_addr = 5'(a); prog_data = tbl[a];
    @(negedge clk); prog_we = 0;
  endtask

  function automatic logic model_hit(int s);
    int n = m_seen[s].size();
    for (int i = 0; i < 64; i++) begin
      if (tbl[m_idx[s]].care[i]) begin
        if (i >= n) return 0;
        if (m_seen[s][n - 1 - i] !== tbl[m_idx[s]].value[i]) return 0;
      end
    end
    return 1;
  endfunction

  task automatic send(input logic b);
    logic [3:0] exp, got;
    @(negedge clk); rx_tick = 1; rx_bit = b;
    @(negedge clk); rx_tick = 0;
    got = 0;
    repeat (3) begin @(posedge clk); #1; got |= match; end
    exp = 0;
    for (int s = 0; s < 4; s++) begin
      if (!slot_enable[s]) continue;
      m_seen[s].push_back(b);
      if (m_seen[s].size() > 64) void'(m_seen[s].pop_front());
      if (model_hit(s)) begin
        exp[s] = 1; m_idx[s] = tbl[m_idx[s]].next; m_seen[s].delete();
      end
    end
    checks++;
    if (got !== exp) begin failures++; $display("bit %b got %b exp %b", b, got, exp); end
    for (int s = 0; s < 4; s++) if (got[s]) n_match[s]++;
  endtask

  task automatic send_pat(input logic [63:0] v, input int len);
    for (int i = len - 1; i >= 0; i--) send(v[i]);
  endtask

  initial begin
    logic [63:0] big;
    big = {$urandom, $urandom};
    repeat (3) @(negedge clk); rst_n = 1;
    load_pat(0, 64'hAAAB, 64'hFFFF, 0);                 // start delimiter, repeated
    load_pat(1, 64'b1000_0001, 64'b1100_0011, 1);       // 8 bits, middle don't care
    load_pat(2, 64'hF0, 64'hFF, 3);                     // chain: F0 then 0F
    load_pat(3, 64'h0F, 64'hFF, 2);
    load_pat(4, big, '1, 4);                            // full 64-bit pattern
    @(negedge clk);
    slot_enable = 4'b1111;
    slot_start[0] = 0; slot_start[1] = 1; slot_start[2] = 2; slot_start[3] = 4;
    arm = 1;
    @(negedge clk); arm = 0;
    for (int s = 0; s < 4; s++) begin m_idx[s] = slot_start[s]; m_seen[s].delete(); end
    for (int r = 0; r < 30; r++) begin
      for (int i = 0; i < 20; i++) send(1'($urandom));
      case (r % 5)
        0: send_pat(64'hAAAB, 16);
        1: send_pat(64'b10_1101_01, 8);
        2: begin send_pat(64'hF0, 8); send_pat(64'h0F, 8); end
        3: send_pat(big, 64);
        4: send_pat(64'h5555_AAAB, 32);
      endcase
    end
    checks++;
    if (n_match[0] < 12 || n_match[1] < 6 || n_match[2] < 6 || n_match[3] < 6) begin
      failures++; $display("matches %0d %0d %0d %0d", n_match[0], n_match[1], n_match[2], n_match[3]);
    end
    $display("matches per slot %0d %0d %0d %0d", n_match[0], n_match[1], n_match[2], n_match[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
