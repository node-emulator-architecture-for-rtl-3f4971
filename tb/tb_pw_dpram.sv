// tb_pw_dpram: random reads and writes on both ports of the mailbox RAM,
// compared with a model; a word written on one side must be readable on the
// other, and read data appears one clock after the access.
module tb_pw_dpram;
  localparam int AW = 15;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;

  pw_dpram #(.AW(AW), .DW(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [AW-1:0] addrs [64];
    logic [15:0] v;
    foreach (addrs[i]) addrs[i] = AW'($urandom);
    addrs[0] = '0; addrs[1] = '1;
    // write everything from alternating sides
    foreach (addrs[i]) begin
      @(negedge clk);
      v = 16'($urandom);
      model[addrs[i]] = v;
      a_en = 0; a_we = 0; b_en = 0; b_we = 0;
      if (i % 2 == 0) begin a_en = 1; a_we = 1; a_addr = addrs[i]; a_wdata = v; end
      else            begin b_en = 1; b_we = 1; b_addr = addrs[i]; b_wdata = v; end
    end
    // read back from both sides at once
    foreach (addrs[i]) begin
      @(negedge clk);
      a_we = 0; b_we = 0; a_en = 1; b_en = 1; a_addr = addrs[i]; b_addr = addrs[63 - i];
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata !== model[addrs[i]]) begin failures++; $display("A %h: %h vs %h", addrs[i], a_rdata, model[addrs[i]]); end
      if (b_rdata !== model[addrs[63 - i]]) begin failures++; $display("B %h", addrs[63 - i]); end
    end
    // simultaneous write of one word from both sides: the local side wins
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = 15'h123; a_wdata = 16'hAAAA;
    b_en = 1; b_we = 1; b_addr = 15'h123; b_wdata = 16'h5555;
    @(negedge clk);
    a_we = 0; b_en = 0; b_we = 0;
    @(negedge clk);
    a_en = 0;
    checks++; if (a_rdata !== 16'h5555) begin failures++; $display("collision %h", a_rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
