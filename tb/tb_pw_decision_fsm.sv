// tb_pw_decision_fsm: loads a random 32-entry table, drives random condition
// inputs and the run control, and compares state, actions, code and levels
// every clock with a model of the table walk. A short hand-written
// protocol fragment (wait for a flag, start a transfer, wait for a match,
// wait out a timer, interrupt) is then run and its action order checked.
module tb_pw_decision_fsm;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, prog_we = 0;
  logic [4:0] prog_addr = 0, state;
  fsm_entry_t prog_data = '0;
  logic [15:0] cond_in = 0;
  logic [ACT_W-1:0] act;
  logic [7:0] code;
  logic [3:0] lvl;
  int checks = 0, failures = 0;
  fsm_entry_t tbl [32];
  logic [4:0] m_state;
  logic [3:0] m_lvl;

  pw_decision_fsm dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic load(input int a, input fsm_entry_t e);
    tbl[a] = e;
    @(negedge clk); prog_we = 1; prog_addr = 5'(a); prog_data = e;
    @(negedge clk); prog_we = 0;
  endtask

  function automatic fsm_entry_t ent(cond_e c, logic inv, int nt, int nf, logic [7:0] a, logic [3:0] l, logic [7:0] cd);
    return '{cond: c, inv: inv, next_t: 5'(nt), next_f: 5'(nf), act: a, lvl: l, code: cd};
  endfunction

  // one clock: set inputs at negedge, check outputs, then model the edge
  task automatic cycle(input logic r, input logic [15:0] ci);
    logic c;
    logic [ACT_W-1:0] ea;
    @(negedge clk); run = r; cond_in = ci; #1;
    c  = ((tbl[m_state].cond == C_ALWAYS) ? 1'b1 : ci[tbl[m_state].cond]) ^ tbl[m_state].inv;
    ea = (r && c) ? tbl[m_state].act : '0;
    checks++;
    if (state !== m_state || act !== ea || lvl !== m_lvl || (ea != 0 && code !== tbl[m_state].code)) begin
      failures++; $display("state %0d/%0d act %h/%h lvl %h/%h", state, m_state, act, ea, lvl, m_lvl);
    end
    if (!r) begin m_state = 0; m_lvl = 0; end
    else if (c) begin m_lvl = tbl[m_state].lvl; m_state = tbl[m_state].next_t; end
    else m_state = tbl[m_state].next_f;
  endtask

  initial begin
    int seen_go = 0, seen_irq = 0, seen_tmr = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 32; a++) load(a, fsm_entry_t'({$urandom, $urandom}));
    m_state = 0; m_lvl = 0;
    for (int i = 0; i < 3000; i++) cycle(($urandom % 50) != 0, 16'($urandom));
    // a protocol fragment
    cycle(0, 0);
    load(0, ent(C_FLAG0,  0, 1, 0, 8'(1 << A_GO) | 8'(1 << A_EVT), 4'b0001, 8'h11));
    load(1, ent(C_MATCH0, 0, 2, 1, 8'(1 << A_TMR), 4'b0001, 8'h12));
    load(2, ent(C_TIMER,  1, 2, 3, 8'h00, 4'b0001, 8'h00));
    load(3, ent(C_ALWAYS, 0, 0, 0, 8'(1 << A_IRQ) | 8'(1 << A_STOP), 4'b0000, 8'h33));
    cycle(0, 0);
    for (int i = 0; i < 40; i++) begin
      logic [15:0] ci;
      ci = 0;
      if (i == 3) ci[C_FLAG0] = 1;
      if (i == 10) ci[C_MATCH0] = 1;
      if (i < 20) ci[C_TIMER] = 0; else ci[C_TIMER] = 1;
      cycle(1, ci);
      if (act[A_GO])  begin seen_go = i;  end
      if (act[A_TMR]) begin seen_tmr = i; end
      if (act[A_IRQ]) begin seen_irq = i; checks++; if (code !== 8'h33) failures++; end
    end
    checks++;
    if (seen_go != 3 || seen_tmr != 10 || seen_irq != 21) begin
      failures++; $display("sequence go %0d tmr %0d irq %0d", seen_go, seen_tmr, seen_irq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
