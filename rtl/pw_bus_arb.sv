// pw_bus_arb: arbiter for the controller side of the mailbox RAM.
//
// Three masters share port B: the reception hardware (highest priority,
// because incoming bits cannot be held back), the transmission hardware and
// the 68020. A master raises req with its address, write enable and data and
// holds them until gnt; the access happens in the gnt cycle and read data is
// valid on rdata with rvalid one clock later. Fixed priority is this
// design's choice; at a 10 Mb/s bit rate each stream needs one word every 16
// bit periods, so the lower masters are never starved for long.
//
// Lint note: rst_n also appears in the one-hot grant assertion, which samples it
// on the clock; only the rvalid flop uses it as an asynchronous reset, so the
// mixed use is in the check, not in the circuit.
module pw_bus_arb #(
  parameter int unsigned N  = 3,
  parameter int unsigned AW = pw_pkg::RAM_AW,
  parameter int unsigned DW = pw_pkg::WORD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,      // index 0 has highest priority
  input  logic [N-1:0]         we,
  input  logic [N-1:0][AW-1:0] addr,
  input  logic [N-1:0][DW-1:0] wdata,
  output logic [N-1:0]         gnt,
  output logic [N-1:0]         rvalid,
  // to the RAM port
  output logic                 m_en,
  output logic                 m_we,
  output logic [AW-1:0]        m_addr,
  output logic [DW-1:0]        m_wdata
);
  always_comb begin
    gnt     = '0;
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt     = '0;
        gnt[i]  = 1'b1;
        m_en    = 1'b1;
        m_we    = we[i];
        m_addr  = addr[i];
        m_wdata = wdata[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rvalid <= '0;
    else        rvalid <= gnt & ~we;

  // at most one grant per cycle
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
