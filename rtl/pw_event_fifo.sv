// pw_event_fifo: event FIFO and time stamp circuit.
//
// The state machines report each MAC event with an event code; this block
// stores the code together with the current global time in a FIFO, from
// which the 68020 later collects the records of a packet. The global time is
// a counter advanced by the global clock of the channel emulator (gtick), so
// that time stamps taken on different nodes are comparable. Both decision
// machines (receive and transmit) may report in the same clock; the two
// write ports are then stored in one clock, receive first. The 68020 sees
// the oldest record on head and removes it with pop. An event that finds the
// FIFO full is dropped and sets the sticky overflow flag, cleared with
// clr_ovf. The depth and the time stamp width are this design's choices.
module pw_event_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned TS_W  = pw_pkg::TS_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      gtick,      // global clock tick
  input  logic                      ts_clear,   // restart global time
  input  logic [1:0]                ev_valid,   // [0] receive machine, [1] transmit machine
  input  logic [1:0][pw_pkg::CODE_W-1:0] ev_code,
  input  logic                      pop,
  input  logic                      clr_ovf,
  output pw_pkg::event_t            head,
  output logic                      empty,
  output logic [$clog2(DEPTH):0]    count,
  output logic                      overflow,
  output logic [TS_W-1:0]           now
);
  import pw_pkg::*;
  localparam int unsigned PW = $clog2(DEPTH);

  event_t          mem [DEPTH];
  logic [PW-1:0]   rp, wp;
  logic [PW:0]     free_n;
  logic            do_pop;
  logic [1:0]      acc;        // which reports are accepted
  logic [PW:0]     nacc;

  assign do_pop = pop && count != '0;
  assign free_n = (PW+1)'(DEPTH) - count + (do_pop ? (PW+1)'(1) : '0);

  always_comb begin
    acc = '0;
    if (ev_valid[0] && free_n != '0) acc[0] = 1'b1;
    if (ev_valid[1] && free_n > (acc[0] ? (PW+1)'(1) : (PW+1)'(0))) acc[1] = 1'b1;
    nacc = (PW+1)'(acc[0]) + (PW+1)'(acc[1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0;
    end else if (ts_clear) begin
      now <= '0;
    end else if (gtick) begin
      now <= now + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (acc[0]) mem[wp] <= '{ts: now, code: ev_code[0]};
    if (acc[1]) mem[acc[0] ? wp + 1'b1 : wp] <= '{ts: now, code: ev_code[1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      wp    <= wp + PW'(nacc);
      if (do_pop) rp <= rp + 1'b1;
      count <= count + nacc - (do_pop ? (PW+1)'(1) : '0);
      if ((ev_valid & ~acc) != '0) overflow <= 1'b1;
      else if (clr_ovf)            overflow <= 1'b0;
    end
  end

  assign head  = mem[rp];
  assign empty = (count == '0);
endmodule
