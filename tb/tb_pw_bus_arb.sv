// tb_pw_bus_arb: random requests from three masters; checks that the highest
// priority requester is granted, that its address and data reach the RAM
// port and that rvalid follows a read grant by one clock.
module tb_pw_bus_arb;
  localparam int AW = 15;
  logic clk = 0, rst_n = 0;
  logic [2:0] req = 0, we = 0, gnt, rvalid;
  logic [2:0][AW-1:0] addr;
  logic [2:0][15:0] wdata;
  logic m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [15:0] m_wdata;
  int checks = 0, failures = 0;

  pw_bus_arb #(.N(3), .AW(AW), .DW(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [2:0] exp_rv = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int w;
      @(negedge clk);
      checks++; if (rvalid !== exp_rv) begin failures++; $display("rvalid %b exp %b", rvalid, exp_rv); end
      req = 3'($urandom); we = 3'($urandom);
      for (int i = 0; i < 3; i++) begin addr[i] = AW'($urandom); wdata[i] = 16'($urandom); end
      #1;
      w = req[0] ? 0 : req[1] ? 1 : req[2] ? 2 : -1;
      checks++;
      if (w < 0) begin
        if (gnt !== 0 || m_en) begin failures++; $display("grant without request"); end
        exp_rv = 0;
      end else begin
        if (gnt !== 3'(1 << w) || !m_en || m_we !== we[w] || m_addr !== addr[w] || m_wdata !== wdata[w]) begin
          failures++; $display("req %b gnt %b", req, gnt);
        end
        exp_rv = we[w] ? 3'b0 : 3'(1 << w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
