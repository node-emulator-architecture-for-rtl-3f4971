// pw_p2_if: controller end of the P2 private bus to the host (68010) board.
//
// The host reaches the controller only through this port: it reads and
// writes the mailbox RAM directly, and a handful of registers let it
// interrupt the 68020, receive and acknowledge the 68020's interrupts, hold
// the 68020 in reset while it reconfigures the board, and update the shadow
// pointer of the receive queue. That is the request/reply scheme of the
// document: data and message bodies go in the mailboxes, the interrupt says
// "look". The register map and the bus handshake are this design's choices:
//
//   address bit 15 = 0 : mailbox RAM word address [14:0]
//   8000h  W: interrupt the 68020, message code in data[7:0]
//          R: {14'b0, cpu_irq pending, host_irq pending}
//   8001h  R: {host_irq pending, 7'b0, code from the 68020}
//          W: acknowledge (clear) the interrupt from the 68020
//   8002h  R/W: bit 0 = hold the 68020 in reset (set after power-up)
//   8003h  R/W: shadow pointer (index of the last receive word read)
//
// Bus timing: h_sel strobes one access for one clock; read data is valid
// with h_rvalid one clock later. Writes take effect at that clock edge.
module pw_p2_if #(
  parameter int unsigned AW = pw_pkg::RAM_AW,
  parameter int unsigned QW = $clog2(pw_pkg::RX_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // P2 bus
  input  logic          h_sel,
  input  logic          h_we,
  input  logic [15:0]   h_addr,
  input  logic [15:0]   h_wdata,
  output logic [15:0]   h_rdata,
  output logic          h_rvalid,
  output logic          h_irq,          // interrupt to the host
  // mailbox RAM port A
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [15:0]   ram_wdata,
  input  logic [15:0]   ram_rdata,
  // towards the 68020
  output logic          cpu_irq,        // host request pending
  output logic [7:0]    cpu_msg,
  input  logic          cpu_irq_clr,
  input  logic          host_irq_set,   // 68020 reply/request to the host
  input  logic [7:0]    host_msg,
  output logic          cpu_reset,
  output logic [QW-1:0] shadow_ptr
);
  logic        is_ram, rd_ram_q;
  logic [15:0] reg_rdata;
  logic [7:0]  host_code;

  assign is_ram    = !h_addr[15];
  assign ram_en    = h_sel && is_ram;
  assign ram_we    = h_we;
  assign ram_addr  = h_addr[AW-1:0];
  assign ram_wdata = h_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_irq <= 1'b0; cpu_msg <= '0; h_irq <= 1'b0; host_code <= '0;
      cpu_reset <= 1'b1; shadow_ptr <= '1;
      h_rvalid <= 1'b0; rd_ram_q <= 1'b0; reg_rdata <= '0;
    end else begin
      h_rvalid <= h_sel && !h_we;
      rd_ram_q <= is_ram;
      if (cpu_irq_clr) cpu_irq <= 1'b0;
      if (host_irq_set) begin h_irq <= 1'b1; host_code <= host_msg; end
      if (h_sel && !is_ram) begin
        if (h_we) begin
          unique case (h_addr[1:0])
            2'd0: begin cpu_irq <= 1'b1; cpu_msg <= h_wdata[7:0]; end
            2'd1: if (!host_irq_set) h_irq <= 1'b0;
            2'd2: cpu_reset  <= h_wdata[0];
            2'd3: shadow_ptr <= h_wdata[QW-1:0];
            default: ;
          endcase
        end else begin
          unique case (h_addr[1:0])
            2'd0: reg_rdata <= {14'b0, cpu_irq, h_irq};
            2'd1: reg_rdata <= {h_irq, 7'b0, host_code};
            2'd2: reg_rdata <= {15'b0, cpu_reset};
            2'd3: reg_rdata <= 16'(shadow_ptr);
            default: reg_rdata <= '0;
          endcase
        end
      end
    end
  end

  assign h_rdata = rd_ram_q ? ram_rdata : reg_rdata;
endmodule
