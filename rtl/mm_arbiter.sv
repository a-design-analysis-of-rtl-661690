// Arbiter for the 64-bit main memory bus, shared by the processor's memory port
// (master 0) and the DMA channel (master 1). A master holds its request, with its
// command, until the one-cycle acknowledge. When both request while the bus is free,
// the processor wins; a granted master keeps the bus until its acknowledge, so a
// DMA transfer that has started is never cut off. The grant is decided in the cycle of
// the request (no added latency). Both masters and the conflict between them are part
// of the design's loading analysis; the fixed priority is this design's choice.
module mm_arbiter
  import dll_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req   [2],
  input  logic             we    [2],
  input  logic [MM_AW-1:0] addr  [2],
  input  logic [63:0]      wdata [2],
  input  logic [7:0]       be    [2],
  output logic             ack   [2],
  // to main memory
  output logic             m_req,
  output logic             m_we,
  output logic [MM_AW-1:0] m_addr,
  output logic [63:0]      m_wdata,
  output logic [7:0]       m_be,
  input  logic             m_ack,
  output logic             conflict   // both masters want the bus in this cycle
);
  logic owner_v, owner;
  logic sel;

  always_comb begin
    if (owner_v) sel = owner;
    else         sel = req[0] ? 1'b0 : 1'b1;
    m_req   = req[sel];
    m_we    = we[sel];
    m_addr  = addr[sel];
    m_wdata = wdata[sel];
    m_be    = be[sel];
    ack[0]  = m_ack && (sel == 1'b0);
    ack[1]  = m_ack && (sel == 1'b1);
  end

  assign conflict = req[0] && req[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_v <= 1'b0;
      owner   <= 1'b0;
    end else if (m_req && m_ack) begin
      owner_v <= 1'b0;
    end else if (m_req) begin
      owner_v <= 1'b1;
      owner   <= sel;
    end
  end
endmodule
