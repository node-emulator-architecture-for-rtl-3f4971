// pw_pkg: types and constants shared by the link layer controller blocks.
//
// The controller keeps every buffer in one mailbox RAM of 16-bit words
// (the width of the 68010 host bus). The word map below places the 16K-word
// cyclic receive queue first, then the pool of four transmit buffers, then
// the monitoring and control mailboxes. The receive queue size and the four
// transmit buffers follow the document; the transmit buffer size, the word
// width and the positions of the regions are this design's choices.
//
// The decision state machines are table driven: each table entry names one
// condition to test, the next state for either outcome, the actions fired
// when the condition holds and the levels held on output lines.
package pw_pkg;

  // ---------------- mailbox RAM ----------------
  localparam int unsigned WORD_W      = 16;
  localparam int unsigned RAM_AW      = 15;           // 32K words
  localparam int unsigned RX_WORDS    = 16384;        // receive cyclic queue
  localparam int unsigned RX_BASE     = 'h0000;
  localparam int unsigned TXBUF_WORDS = 1024;         // one transmit buffer
  localparam int unsigned TXBUF_N     = 4;            // 2 for the 68020, 2 for the host
  localparam int unsigned TX_BASE     = 'h4000;
  localparam int unsigned MON_BASE    = 'h5000;       // monitoring mailbox
  localparam int unsigned CTL_BASE    = 'h7000;       // control message mailboxes

  // ---------------- pattern recognizer ----------------
  localparam int unsigned PAT_W     = 64;   // longest pattern
  localparam int unsigned PAT_N     = 32;   // chained patterns held
  localparam int unsigned PAT_SLOTS = 4;    // patterns searched at once

  typedef struct packed {
    logic [PAT_W-1:0] value;  // bit i compares with the bit received i bits ago
    logic [PAT_W-1:0] care;   // 0 = don't care
    logic [4:0]       next;   // pattern searched by the slot after this one matches
  } pat_entry_t;

  // ---------------- decision state machines ----------------
  localparam int unsigned FSM_STATES = 32;

  // condition inputs, selected by a table entry
  typedef enum logic [3:0] {
    C_ALWAYS   = 4'd0,
    C_MATCH0   = 4'd1,
    C_MATCH1   = 4'd2,
    C_MATCH2   = 4'd3,
    C_MATCH3   = 4'd4,
    C_TIMER    = 4'd5,   // own delay timer expired
    C_TXDONE   = 4'd6,   // last bit of a packet sent
    C_RXVALID  = 4'd7,   // valid data on the incoming data line
    C_RXEND    = 4'd8,   // incoming valid line just dropped
    C_COUPLED  = 4'd9,   // coupling flag of the other machine
    C_FLAG0    = 4'd10,  // status flags set by the 68020
    C_FLAG1    = 4'd11,
    C_FLAG2    = 4'd12,
    C_FLAG3    = 4'd13,
    C_RXFULL   = 4'd14,  // receive queue full
    C_CTLIN    = 4'd15   // control line 0 from the channel emulator
  } cond_e;

  // actions, one bit each, fired when the tested condition is true
  localparam int unsigned A_EVT     = 0;  // store event code + time stamp in the FIFO
  localparam int unsigned A_IRQ     = 1;  // interrupt the 68020 with the code
  localparam int unsigned A_TMR     = 2;  // start the delay timer
  localparam int unsigned A_GO      = 3;  // start data transfer hardware
  localparam int unsigned A_STOP    = 4;  // stop data transfer hardware
  localparam int unsigned A_ARM     = 5;  // (re)arm the pattern search
  localparam int unsigned A_CPLSET  = 6;  // raise coupling flag to the other machine
  localparam int unsigned A_CPLCLR  = 7;  // drop coupling flag
  localparam int unsigned ACT_W     = 8;

  typedef struct packed {
    cond_e              cond;
    logic               inv;      // test the inverted condition
    logic [4:0]         next_t;   // next state when condition true
    logic [4:0]         next_f;   // next state when condition false
    logic [ACT_W-1:0]   act;      // actions (pulses) on the true branch
    logic [3:0]         lvl;      // levels held from the true branch on
    logic [7:0]         code;     // event / interrupt code
  } fsm_entry_t;

  localparam int unsigned FSM_ENTRY_W = $bits(fsm_entry_t);

  // ---------------- event recording ----------------
  localparam int unsigned TS_W   = 32;   // global time stamp
  localparam int unsigned CODE_W = 8;

  typedef struct packed {
    logic [TS_W-1:0]   ts;
    logic [CODE_W-1:0] code;
  } event_t;

endpackage
