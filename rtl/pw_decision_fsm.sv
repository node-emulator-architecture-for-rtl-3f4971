// pw_decision_fsm: programmable decision state machine.
//
// The second kind of state machine of the controller: it takes the results
// of the pattern search, the flags set by the 68020, timer expiry and the
// channel lines, and decides what the node does next (start or stop the
// data transfer hardware, record an event, interrupt the 68020, drive the
// channel control lines). The controller holds two of them, one for
// transmission and one for reception, each with its own table, coupled only
// through one flag each way, as the document asks.
//
// How it works: the machine is a table of up to 32 entries, one per state,
// written by the 68020 (so that every MAC protocol is just a new table).
// Every clock the entry of the current state selects one of 16 condition
// inputs (see pw_pkg::cond_e, input 0 is constant true), optionally
// inverted. If the condition holds, the machine goes to next_t, fires the
// entry's action pulses with its code and loads the entry's levels;
// otherwise it goes to next_f and does nothing else. While run is low the machine rests in state 0 with no
// actions and its levels cleared. The table layout, the number of
// conditions and the actions are this design's choices.
//
// Timing: one decision per clock. The actions and the code are driven
// combinationally from the current entry in the clock in which the
// condition holds, so the hardware they start reacts at the same clock edge
// at which the machine changes state; the levels change one clock later.
// Both are far inside one bit period.
module pw_decision_fsm #(
  parameter int unsigned STATES = pw_pkg::FSM_STATES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  input  logic                       prog_we,
  input  logic [$clog2(STATES)-1:0]  prog_addr,
  input  pw_pkg::fsm_entry_t         prog_data,
  input  logic [15:0]                cond_in,
  output logic [pw_pkg::ACT_W-1:0]   act,
  output logic [7:0]                 code,
  output logic [3:0]                 lvl,
  output logic [$clog2(STATES)-1:0]  state
);
  import pw_pkg::*;
  localparam int unsigned SW = $clog2(STATES);

  fsm_entry_t prog_q [STATES];
  fsm_entry_t cur;
  logic       c;

  always_ff @(posedge clk)
    if (prog_we) prog_q[prog_addr] <= prog_data;

  assign cur = prog_q[state];
  assign c    = ((cur.cond == C_ALWAYS) ? 1'b1 : cond_in[cur.cond]) ^ cur.inv;
  assign act  = (run && c) ? cur.act : '0;
  assign code = cur.code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0; lvl <= '0;
    end else if (!run) begin
      state <= '0; lvl <= '0;
    end else begin
      if (c) begin
        state <= cur.next_t[SW-1:0];
        lvl   <= cur.lvl;
      end else begin
        state <= cur.next_f[SW-1:0];
      end
    end
  end
endmodule
