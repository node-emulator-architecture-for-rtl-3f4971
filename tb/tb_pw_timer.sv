// tb_pw_timer: starts the delay timer with several loads, ticks it every
// few clocks and checks that it expires after exactly 'load' ticks, that the
// done level follows, that a restart reloads it and that a zero load expires
// at once.
module tb_pw_timer;
  logic clk = 0, rst_n = 0, start = 0, tick = 0;
  logic [15:0] load = 0;
  logic expired, done, running;
  int checks = 0, failures = 0;
  int ticks;

  pw_timer #(.W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_one(input int n);
    load <= 16'(n); start <= 1; @(posedge clk); start <= 0;
    ticks = 0;
    if (n == 0) begin
      #1; checks++; if (!expired || !done) begin failures++; $display("zero load"); end
      return;
    end
    forever begin
      repeat (3) @(posedge clk);
      #1;
      checks++; if (expired || done) begin failures++; $display("early expiry n=%0d at %0d", n, ticks); break; end
      tick <= 1; @(posedge clk); tick <= 0; ticks++;
      #1;
      if (expired) break;
      if (ticks > n + 2) break;
    end
    checks++; if (ticks != n || !done || running) begin failures++; $display("n=%0d expired after %0d", n, ticks); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run_one(1); run_one(5); run_one(0); run_one(37);
    // restart while running
    load <= 16'd10; start <= 1; @(posedge clk); start <= 0;
    repeat (4) begin tick <= 1; @(posedge clk); tick <= 0; @(posedge clk); end
    run_one(6);
    repeat (5) run_one($urandom_range(1, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
