// pw_pattern_matcher: pattern recognition state machine.
//
// This is the first of the two kinds of state machine of the controller: it
// watches the bit stream coming from the channel and reports when a
// programmed pattern has gone by. As the document requires, a pattern is up
// to 64 bits long and may contain don't-care bits, four patterns are
// searched at the same time, and a table of 32 patterns lets a search move
// through a sequence of different patterns.
//
// How it works: the last 64 received bits are kept in a shift register,
// newest bit in position 0. Each table entry holds a value, a care mask
// (0 = don't care; a pattern shorter than 64 bits simply has no care bits
// above its length) and the index of the next pattern. Each of the four
// search slots points at one table entry and compares it with the shift
// register after every received bit; only bits received since the slot was
// armed or last matched take part, so consecutive patterns do not overlap.
// On a match the slot pulses match[s] for one clock and moves to the entry's
// next index (an entry pointing to itself is searched repeatedly). arm
// restarts every slot whose enable bit is set at its start index. The slot
// and table organisation is this design's reading of the document's list.
//
// Timing: match[s] is high in the clock after the rx_tick that delivered the
// last bit of the pattern, well within one bit period.
//
// Lint note: the comparison reads only value and care of a table entry; its
// next field (bits 4:0) is read where the slot advances.
module pw_pattern_matcher #(
  parameter int unsigned W     = pw_pkg::PAT_W,
  parameter int unsigned N     = pw_pkg::PAT_N,
  parameter int unsigned SLOTS = pw_pkg::PAT_SLOTS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              rx_tick,
  input  logic                              rx_bit,
  // programming, from the 68020
  input  logic                              prog_we,
  input  logic [$clog2(N)-1:0]              prog_addr,
  input  pw_pkg::pat_entry_t                prog_data,
  input  logic [SLOTS-1:0]                  slot_enable,
  input  logic [SLOTS-1:0][$clog2(N)-1:0]   slot_start,
  input  logic                              arm,
  // results
  output logic [SLOTS-1:0]                  match,
  output logic [SLOTS-1:0]                  active,
  output logic [SLOTS-1:0][$clog2(N)-1:0]   slot_idx
);
  import pw_pkg::*;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(W) + 1;

  pat_entry_t         table_q [N];
  logic [W-1:0]       shreg;
  logic [SLOTS-1:0][CW-1:0] fill;   // bits seen by each slot, saturating at W

  always_ff @(posedge clk)
    if (prog_we) table_q[prog_addr] <= prog_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       shreg <= '0;
    else if (rx_tick) shreg <= {shreg[W-2:0], rx_bit};

  // compare against the register contents after the tick
  logic [SLOTS-1:0] hit;
  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      pat_entry_t   e;
      logic [W-1:0] seen;
      e    = table_q[slot_idx[s]];
      seen = (fill[s] >= CW'(W)) ? '1 : ((W'(1) << fill[s]) - W'(1));
      hit[s] = active[s] && ((e.care & ~seen) == '0)
               && (((shreg ^ e.value) & e.care) == '0);
    end
  end

  // rx_tick shifts in this cycle; the comparison runs one cycle later
  logic tick_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_d <= 1'b0; match <= '0; active <= '0; slot_idx <= '0; fill <= '0;
    end else begin
      tick_d <= rx_tick;
      match  <= '0;
      for (int s = 0; s < SLOTS; s++) begin
        if (arm) begin
          active[s]   <= slot_enable[s];
          slot_idx[s] <= slot_start[s];
          fill[s]     <= '0;
        end else begin
          if (rx_tick && fill[s] < CW'(W)) fill[s] <= fill[s] + 1'b1;
          if (tick_d && hit[s]) begin
            match[s]    <= 1'b1;
            slot_idx[s] <= table_q[slot_idx[s]].next[IW-1:0];
            fill[s]     <= rx_tick ? CW'(1) : '0;
          end
        end
      end
    end
  end
endmodule
