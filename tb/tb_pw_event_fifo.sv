// tb_pw_event_fifo: records events from both machines while the global
// clock advances, then pops them and checks code, time stamp and order
// (receive before transmit when both report in one clock), the count, the
// overflow flag on a full FIFO, and the time restart.
module tb_pw_event_fifo;
  import pw_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, gtick = 0, ts_clear = 0, pop = 0, clr_ovf = 0;
  logic [1:0] ev_valid = 0;
  logic [1:0][7:0] ev_code = 0;
  event_t head;
  logic empty, overflow;
  logic [3:0] count;
  logic [31:0] now;
  int checks = 0, failures = 0;
  event_t q[$];
  int t_model = 0;

  pw_event_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic step(input logic [1:0] v, input logic [7:0] c0, input logic [7:0] c1, input logic p, input logic g);
    @(negedge clk);
    ev_valid = v; ev_code[0] = c0; ev_code[1] = c1; pop = p; gtick = g;
    if (p && q.size() > 0) begin
      checks++;
      if (head !== q[0]) begin failures++; $display("head %h/%0d exp %h/%0d", head.code, head.ts, q[0].code, q[0].ts); end
      void'(q.pop_front());
    end
    if (v[0] && q.size() < D) q.push_back('{ts: 32'(t_model), code: c0});
    if (v[1] && q.size() < D) q.push_back('{ts: 32'(t_model), code: c1});
    if (g) t_model++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    step(2'b01, 8'h10, 8'h00, 0, 1);
    step(2'b00, 0, 0, 0, 1);
    step(2'b11, 8'h21, 8'h22, 0, 0);
    step(2'b10, 8'h00, 8'h33, 0, 1);
    step(2'b00, 0, 0, 0, 0);
    checks++; if (count != 4 || empty) begin failures++; $display("count %0d", count); end
    for (int i = 0; i < 4; i++) step(2'b00, 0, 0, 1, 0);
    step(2'b00, 0, 0, 0, 0);
    checks++; if (!empty) begin failures++; $display("not empty"); end
    // random traffic with simultaneous pop
    for (int i = 0; i < 300; i++) step(2'($urandom), 8'($urandom), 8'($urandom), ($urandom % 3) == 0, 1'($urandom));
    while (q.size() > 0) step(2'b00, 0, 0, 1, 0);
    // fill beyond depth: overflow
    for (int i = 0; i < D + 2; i++) step(2'b01, 8'(i), 0, 0, 0);
    step(2'b00, 0, 0, 0, 0);
    checks++; if (!overflow || count != D) begin failures++; $display("overflow %b count %0d", overflow, count); end
    @(negedge clk); clr_ovf = 1; @(negedge clk); clr_ovf = 0;
    checks++; if (overflow) begin failures++; $display("overflow not cleared"); end
    while (q.size() > 0) step(2'b00, 0, 0, 1, 0);
    @(negedge clk); ts_clear = 1; @(negedge clk); ts_clear = 0;
    checks++; if (now != 0) begin failures++; $display("time not cleared"); end
    checks++; if (t_model < 10) begin failures++; $display("too few ticks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
