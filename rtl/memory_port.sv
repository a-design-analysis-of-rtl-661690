// Main memory access port of the microprocessor: memory address register (MAR, 32-bit
// byte address), data buffer register (DBR, one byte), a one-line cache holding the
// 8-byte (64-bit) main memory word last read, a byte selector that picks the byte
// MAR[2:0] of that line, and the memory access control.
//
// A microinstruction reaches MAR (four byte addresses) and DBR through the bus address
// fields; the address it uses may also carry an access control {modify, op}: modify is
// nothing, increment or decrement MAR, op is nothing, read only, write only or
// read-write. Read-write means "reference": it writes DBR to memory when the same
// microinstruction writes DBR, and reads into DBR otherwise. The control acts at the end
// of the microcycle (commit): first MAR is modified, then the read or write uses the new
// MAR. A read that hits the cache line loads DBR at that same edge; a miss fetches the
// 64-bit word over the main memory bus, fills the line and loads DBR when the word
// arrives. Writes go through to main memory with a byte enable and update the line on
// a hit. While a transfer is outstanding, busy is high and the register being filled is
// not valid: a microinstruction that touches MAR or DBR must then be delayed, which the
// datapath does by stalling the cycle (busy feeds that decision).
//
// Main memory bus: mm_req is held with mm_we/mm_addr/mm_wdata/mm_be until the one-cycle
// mm_ack; read data arrive on mm_rdata with the ack.
// MAR, DBR, the 8-byte cache, the byte selector, the increment/decrement/read/write
// controls and the delay of the microcycle follow the design. The 32-bit MAR, the one
// line, write-through and the meaning of read-write are this design's choices.
module memory_port
  import dll_pkg::*;
#(
  parameter int unsigned AW = MM_AW   // main memory word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          commit,
  input  logic          mar_we,
  input  logic [1:0]    mar_byte,
  input  logic          dbr_we,
  input  logic [7:0]    wdata,
  input  logic          ctl_v,
  input  logic [3:0]    ctl,
  output logic [31:0]   mar,
  output logic [7:0]    dbr,
  output logic          busy,
  // main memory bus
  output logic          mm_req,
  output logic          mm_we,
  output logic [AW-1:0] mm_addr,
  output logic [63:0]   mm_wdata,
  output logic [7:0]    mm_be,
  input  logic          mm_ack,
  input  logic [63:0]   mm_rdata
);
  logic [63:0]   line;
  logic [AW-1:0] line_tag;
  logic          line_v;
  logic [2:0]    rd_byte;

  logic [31:0]   mar_w, mar_n;
  logic [7:0]    dbr_n;
  logic [1:0]    op;
  logic [AW-1:0] word_n;
  logic          hit_n;

  always_comb begin
    mar_w = mar;
    if (mar_we) mar_w[8*mar_byte +: 8] = wdata;
    mar_n = mar_w;
    if (ctl_v && ctl[3:2] == MOD_INC) mar_n = mar_w + 32'd1;
    if (ctl_v && ctl[3:2] == MOD_DEC) mar_n = mar_w - 32'd1;
    dbr_n = dbr_we ? wdata : dbr;
    op    = ctl_v ? ctl[1:0] : MOP_NONE;
    if (op == MOP_RW) op = dbr_we ? MOP_WRITE : MOP_READ;
    word_n = mar_n[AW+2:3];
    hit_n  = line_v && (line_tag == word_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar      <= '0;
      dbr      <= '0;
      line     <= '0;
      line_tag <= '0;
      line_v   <= 1'b0;
      rd_byte  <= '0;
      mm_req   <= 1'b0;
      mm_we    <= 1'b0;
      mm_addr  <= '0;
      mm_wdata <= '0;
      mm_be    <= '0;
    end else begin
      if (mm_req && mm_ack) begin
        mm_req <= 1'b0;
        if (!mm_we) begin
          line     <= mm_rdata;
          line_tag <= mm_addr;
          line_v   <= 1'b1;
          dbr      <= mm_rdata[8*rd_byte +: 8];
        end
      end
      if (commit) begin
        mar <= mar_n;
        if (dbr_we) dbr <= wdata;   // otherwise a fill arriving now must not be overwritten
        unique case (op)
          MOP_READ: begin
            if (hit_n) begin
              dbr <= line[8*mar_n[2:0] +: 8];
            end else begin
              mm_req  <= 1'b1;
              mm_we   <= 1'b0;
              mm_addr <= word_n;
              mm_be   <= 8'hFF;
              rd_byte <= mar_n[2:0];
            end
          end
          MOP_WRITE: begin
            mm_req   <= 1'b1;
            mm_we    <= 1'b1;
            mm_addr  <= word_n;
            mm_wdata <= {8{dbr_n}};
            mm_be    <= 8'(1) << mar_n[2:0];
            if (hit_n) line[8*mar_n[2:0] +: 8] <= dbr_n;
          end
          default: ;
        endcase
      end
    end
  end

  assign busy = mm_req;

  // The datapath never lets a microinstruction touch the port while a transfer is open
  a_no_op_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
    commit && busy |-> !(ctl_v || mar_we || dbr_we));
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    mm_req && !mm_ack |=> mm_req && $stable(mm_addr) && $stable(mm_we));
endmodule
