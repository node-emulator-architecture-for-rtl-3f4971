// tb_pw_p2_if: host accesses through the P2 port: RAM reads and writes reach
// port A with the right address and data, the doorbell to the 68020 sets
// its interrupt and message until cleared, an interrupt from the 68020 is
// seen by the host and acknowledged, the 68020 reset starts asserted and is
// released, and the shadow pointer is written and read back.
module tb_pw_p2_if;
  logic clk = 0, rst_n = 0, h_sel = 0, h_we = 0, h_rvalid, h_irq;
  logic [15:0] h_addr = 0, h_wdata = 0, h_rdata;
  logic ram_en, ram_we;
  logic [14:0] ram_addr;
  logic [15:0] ram_wdata, ram_rdata;
  logic cpu_irq, cpu_irq_clr = 0, host_irq_set = 0, cpu_reset;
  logic [7:0] cpu_msg, host_msg = 0;
  logic [13:0] shadow_ptr;
  int checks = 0, failures = 0;

  pw_p2_if dut (.*);
  pw_dpram #(.AW(15), .DW(16)) ram (
    .clk, .a_en(ram_en), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata), .a_rdata(ram_rdata),
    .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata()
  );
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); h_sel = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_sel = 0; h_we = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); h_sel = 1; h_we = 0; h_addr = a;
    @(negedge clk); h_sel = 0;
    if (!h_rvalid) begin failures++; $display("no rvalid"); end
    d = h_rdata;
  endtask
  task automatic expect_eq(input logic [15:0] g, input logic [15:0] e, input string what);
    checks++; if (g !== e) begin failures++; $display("%s: %h exp %h", what, g, e); end
  endtask

  initial begin
    logic [15:0] d;
    logic [15:0] vals [16];
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    expect_eq(16'(cpu_reset), 1, "reset after power-up");
    foreach (vals[i]) begin vals[i] = 16'($urandom); wr(16'h4000 + 16'(i), vals[i]); end
    foreach (vals[i]) begin rd(16'h4000 + 16'(i), d); expect_eq(d, vals[i], "ram"); end
    wr(16'h8002, 0);
    expect_eq(16'(cpu_reset), 0, "reset release");
    wr(16'h8000, 16'h00A5);
    expect_eq({cpu_irq, 7'b0, cpu_msg}, 16'h80A5, "doorbell");
    rd(16'h8000, d); expect_eq(d, 16'h0002, "status");
    @(negedge clk); cpu_irq_clr = 1; @(negedge clk); cpu_irq_clr = 0;
    expect_eq(16'(cpu_irq), 0, "doorbell clear");
    @(negedge clk); host_irq_set = 1; host_msg = 8'h3C; @(negedge clk); host_irq_set = 0;
    expect_eq(16'(h_irq), 1, "host irq");
    rd(16'h8001, d); expect_eq(d, 16'h803C, "host message");
    wr(16'h8001, 0);
    expect_eq(16'(h_irq), 0, "host ack");
    wr(16'h8003, 16'h1234);
    expect_eq(16'(shadow_ptr), 16'h1234, "shadow");
    rd(16'h8003, d); expect_eq(d, 16'h1234, "shadow read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
