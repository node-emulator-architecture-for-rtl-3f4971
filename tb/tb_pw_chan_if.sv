// tb_pw_chan_if: drives the channel emulator lines with slow bit clocks and
// checks the synchronised ticks and sampled bits, the end-of-valid pulse,
// the global tick, and the outgoing line in the three coupling modes: own
// data, repeated receive data, and repeated data overwritten by own data.
module tb_pw_chan_if;
  logic clk = 0, rst_n = 0;
  logic ce_rx_data = 0, ce_rx_valid = 0, ce_rx_clk = 0, ce_tx_clk = 0, ce_gclk = 0;
  logic [1:0] ce_ctl_in = 0, ce_ctl_out, ctl_in, ctl_out = 0;
  logic ce_tx_data, ce_tx_valid;
  logic rx_tick, rx_bit, rx_valid, rx_end, tx_tick, gtick;
  logic tx_bit = 0, tx_valid = 0, couple = 0, overwrite = 0;
  int checks = 0, failures = 0;
  int n_rx = 0, n_tx = 0, n_g = 0, n_end = 0;
  logic exp_bits[$];
  logic sent[$];

  pw_chan_if dut (.*);
  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // receive and transmit bit clocks: 8 board clocks per bit
  always begin #40 ce_rx_clk = 1; #40 ce_rx_clk = 0; end
  always begin #40 ce_tx_clk = 1; #40 ce_tx_clk = 0; end
  always begin #400 ce_gclk = 1; #400 ce_gclk = 0; end

  // present a new bit in the middle of the low phase
  task automatic rx_send(input logic b, input logic v);
    @(negedge ce_rx_clk); #20; ce_rx_data = b; ce_rx_valid = v;
    if (v) exp_bits.push_back(b);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rx_tick) begin
      n_rx++;
      if (rx_valid && exp_bits.size() > 0) begin
        checks++;
        if (rx_bit !== exp_bits[0]) begin failures++; $display("rx bit mismatch"); end
        void'(exp_bits.pop_front());
      end
    end
    if (rx_end && rst_n) n_end++;
    if (tx_tick) n_tx++;
    if (gtick) n_g++;
  end

  // outgoing line check: record what the line carries after each tx tick
  task automatic expect_line(input logic d, input logic v);
    @(posedge clk iff tx_tick);
    @(posedge clk iff tx_tick);
    @(negedge clk);
    checks++;
    if (ce_tx_data !== d || ce_tx_valid !== v) begin
      failures++; $display("line %b/%b exp %b/%b (couple %b ovw %b)", ce_tx_data, ce_tx_valid, d, v, couple, overwrite);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) rx_send(1'($urandom), 1);
    rx_send(0, 0); rx_send(0, 0);
    repeat (20) @(negedge clk);
    checks++; if (exp_bits.size() != 0 || n_end != 1) begin failures++; $display("left %0d ends %0d", exp_bits.size(), n_end); end
    // control lines
    @(negedge clk); ce_ctl_in = 2'b10; ctl_out = 2'b01; repeat (4) @(negedge clk);
    checks++; if (ctl_in !== 2'b10 || ce_ctl_out !== 2'b01) begin failures++; $display("ctl lines"); end
    // own data
    @(negedge clk); tx_bit = 1; tx_valid = 1; couple = 0;
    expect_line(1, 1);
    // coupled: repeat the receive line (held at 0, valid)
    fork rx_send(0, 1); join_none
    @(negedge clk); couple = 1; tx_bit = 1; tx_valid = 0;
    repeat (3) @(posedge clk iff rx_tick);
    expect_line(0, 1);
    // coupled with overwrite while own data is valid
    @(negedge clk); overwrite = 1; tx_valid = 1; tx_bit = 1;
    expect_line(1, 1);
    @(negedge clk); tx_valid = 0;
    expect_line(0, 1);
    checks++; if (n_g < 5 || n_tx < 40 || n_rx < 40) begin failures++; $display("ticks %0d %0d %0d", n_g, n_tx, n_rx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
