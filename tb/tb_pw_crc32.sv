// tb_pw_crc32: checks the bit-serial CRC-32 against the standard check value
// (CRC-32 of "123456789" is CBF43926) and against a reference computed in
// the testbench with the non-reflected MSB-first formulation on random
// packets; then feeds the checksum back and expects the fixed remainder.
module tb_pw_crc32;
  logic clk = 0, rst_n = 0, init = 0, bit_en = 0, bit_in = 0;
  logic [31:0] crc, fcs;
  logic residue_ok;
  int checks = 0, failures = 0;

  pw_crc32 dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // reference: MSB-first CRC with bit-reversed bytes, reflected result
  function automatic logic [31:0] ref_crc(input byte unsigned d[], input int n);
    logic [31:0] r = 32'hFFFF_FFFF;
    for (int i = 0; i < n; i++)
      for (int b = 0; b < 8; b++) begin
        logic fb = r[31] ^ d[i][b];
        r = {r[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
      end
    return ~{<<{r}};
  endfunction

  task automatic send_bit(input logic b);
    bit_en <= 1; bit_in <= b; @(posedge clk); bit_en <= 0; @(posedge clk);
  endtask
  task automatic send_bytes(input byte unsigned d[], input int n);
    init <= 1; @(posedge clk); init <= 0;
    for (int i = 0; i < n; i++) for (int b = 0; b < 8; b++) send_bit(d[i][b]);
  endtask

  initial begin
    byte unsigned d[];
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    d = new[9];
    foreach (d[i]) d[i] = 8'(8'h31 + i);
    send_bytes(d, 9);
    checks++; if (fcs !== 32'hCBF4_3926) begin failures++; $display("check value %h", fcs); end
    checks++; if (ref_crc(d, 9) !== 32'hCBF4_3926) begin failures++; $display("ref broken"); end
    for (int t = 0; t < 20; t++) begin
      int n;
      logic [31:0] f;
      n = 1 + $urandom_range(0, 40);
      d = new[n];
      foreach (d[i]) d[i] = 8'($urandom);
      send_bytes(d, n);
      checks++; if (fcs !== ref_crc(d, n)) begin failures++; $display("pkt %0d fcs %h ref %h", t, fcs, ref_crc(d, n)); end
      f = fcs;
      for (int b = 0; b < 32; b++) send_bit(f[b]);
      checks++; if (!residue_ok) begin failures++; $display("residue %h", crc); end
      // a corrupted packet must not leave the remainder
      send_bytes(d, n); f = fcs ^ 32'h0000_0100;
      for (int b = 0; b < 32; b++) send_bit(f[b]);
      checks++; if (residue_ok) begin failures++; $display("bad packet accepted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
