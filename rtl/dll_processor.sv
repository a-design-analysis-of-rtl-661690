// Microprogrammed processor with dynamic linking and loading of microprograms.
//
// The control store is addressed through segment-offset addresses: microprograms are
// variable-length segments (up to 256 of up to 256 words), the segment table maps each
// segment to its place in a writable 4,096 x 64-bit control store, and a DMA channel
// loads, relocates and stores segments while microprograms keep running. A reference to
// a segment that is not resident vectors to the missing-segment fault handler, segment
// 0, which can load the segment with the DMA channel, update the segment table and jump
// to the saved target. Segments can therefore be swapped in as they are needed, giving
// a control store that looks larger than it is.
//
// Blocks: microsequencer (successor function, both forms of the microprogram counter,
// fault vector) with its return stack and the segment table; datapath (8-bit A, B, F
// buses, ALU, shifter, local store, special registers); memory port (MAR, DBR, 8-byte
// cache line); DMA channel; control store; main memory arbiter.
//
// Timing: one microinstruction per clock while nothing stalls. The processor is held
// (stall) while a microinstruction touches MAR or DBR during an open main memory transfer,
// and for each cycle in which the DMA channel uses the control store port.
// Main memory is outside: a 64-bit request/acknowledge bus (m_req held with its command
// until the one-cycle m_ack, read data with the ack). The control store is not reset; it
// must be initialised (segment 0 at least) before reset is released.
module dll_processor
  import dll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        switches,
  input  logic              intr,
  // main memory bus
  output logic              m_req,
  output logic              m_we,
  output logic [MM_AW-1:0]  m_addr,
  output logic [63:0]       m_wdata,
  output logic [7:0]        m_be,
  input  logic              m_ack,
  input  logic [63:0]       m_rdata,
  // state for observation
  output logic [SEG_W-1:0]  pc_seg,
  output logic [OFF_W-1:0]  pc_off,
  output logic [CS_AW-1:0]  pc_abs,
  output logic [7:0]        status_byte,
  output logic              stall,
  output logic              mem_stall,
  output logic              dma_steal,
  output logic              dma_busy,
  output logic              seg_fault,
  output logic              global_go,
  output logic              mm_conflict,
  output logic [31:0]       machine_pc,
  output logic [7:0]        ir_out,
  output logic              stack_error  // return stack overflowed or underflowed
);
  // control store
  logic [CS_AW-1:0] cs_addr, seq_cs_addr, dma_cs_addr;
  logic             cs_we, dma_cs_we;
  logic [63:0]      cs_rdata, dma_cs_wdata;

  // sequencer <-> datapath
  microinst_t       mir;
  logic             exec_valid, rep, ctl_en;
  flags_t           status, cur;
  logic             fault_bit;
  logic [7:0]       xmask, ir;
  logic [SEG_W-1:0] seg, fseg, lk_seg;
  logic [OFF_W-1:0] off, foff;
  logic [CS_AW-1:0] zbase;
  logic [31:0]      pc;
  seg_entry_t       lk_entry;
  logic             push, pop;
  logic [15:0]      push_data, stack_top;
  logic             stk_ovf, stk_unf;

  // datapath <-> segment table, DMA, memory port
  logic [7:0]       st_rdata [5];
  logic [7:0]       dma_rdata [6];
  logic             st_we, dma_we, mar_we, dbr_we, mctl_v, mem_busy;
  logic [2:0]       st_byte, dma_sel;
  logic [1:0]       mar_byte;
  logic [3:0]       mctl;
  logic [7:0]       fbus, dbr;
  logic [31:0]      mar;

  // main memory masters
  logic             mreq [2], mwe [2], mack [2];
  logic [MM_AW-1:0] maddr [2];
  logic [63:0]      mwdata [2];
  logic [7:0]       mbe [2];

  assign stall = mem_stall || dma_steal;

  microsequencer u_seq (
    .clk, .rst_n, .stall,
    .cs_addr(seq_cs_addr), .cs_rdata,
    .mir, .exec_valid, .rep, .ctl_en,
    .status, .cur, .intr, .dma_busy,
    .xmask, .jv_seg(seg), .jv_off(off), .zbase,
    .lk_seg, .lk_entry,
    .push, .pop, .push_data, .stack_top,
    .fault(seg_fault), .fseg, .foff,
    .pc_seg, .pc_off, .pc_abs, .global_go
  );

  micro_stack u_stack (
    .clk, .rst_n, .push, .pop, .din(push_data), .top(stack_top),
    .empty(), .overflow(stk_ovf), .underflow(stk_unf)
  );

  segment_table u_st (
    .clk, .rst_n, .lk_seg, .lk_entry,
    .bus_idx(seg), .bus_we(st_we), .bus_byte(st_byte), .bus_wdata(fbus),
    .bus_rdata(st_rdata)
  );

  datapath u_dp (
    .clk, .rst_n, .mir, .exec_valid, .rep, .ctl_en, .stall, .mem_stall,
    .status, .cur, .fault_bit, .fault(seg_fault), .switches, .ir, .xmask,
    .seg, .off, .zbase, .pc, .fseg, .foff,
    .st_rdata, .st_we, .st_byte,
    .dma_rdata, .dma_we, .dma_sel,
    .mar, .dbr, .mem_busy, .mar_we, .mar_byte, .dbr_we, .mctl_v, .mctl,
    .fbus
  );

  memory_port u_mp (
    .clk, .rst_n, .commit(exec_valid && !stall),
    .mar_we, .mar_byte, .dbr_we, .wdata(fbus), .ctl_v(mctl_v), .ctl(mctl),
    .mar, .dbr, .busy(mem_busy),
    .mm_req(mreq[0]), .mm_we(mwe[0]), .mm_addr(maddr[0]), .mm_wdata(mwdata[0]),
    .mm_be(mbe[0]), .mm_ack(mack[0]), .mm_rdata(m_rdata)
  );

  dma_channel u_dma (
    .clk, .rst_n,
    .bus_we(dma_we), .bus_sel(dma_sel), .bus_wdata(fbus), .bus_rdata(dma_rdata),
    .busy(dma_busy),
    .cs_req(dma_steal), .cs_we(dma_cs_we), .cs_addr(dma_cs_addr), .cs_wdata(dma_cs_wdata),
    .cs_rdata,
    .mm_req(mreq[1]), .mm_we(mwe[1]), .mm_addr(maddr[1]), .mm_wdata(mwdata[1]),
    .mm_be(mbe[1]), .mm_ack(mack[1]), .mm_rdata(m_rdata)
  );

  // The DMA channel steals the control store port; the sequencer waits meanwhile
  assign cs_addr = dma_steal ? dma_cs_addr : seq_cs_addr;
  assign cs_we   = dma_steal && dma_cs_we;

  control_store u_cs (
    .clk, .addr(cs_addr), .we(cs_we), .wdata(dma_cs_wdata), .rdata(cs_rdata)
  );

  mm_arbiter u_arb (
    .clk, .rst_n,
    .req(mreq), .we(mwe), .addr(maddr), .wdata(mwdata), .be(mbe), .ack(mack),
    .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_ack, .conflict(mm_conflict)
  );

  assign machine_pc  = pc;
  assign ir_out      = ir;
  assign stack_error = stk_ovf || stk_unf;

  assign status_byte = {1'b0, fault_bit, status.u, status.v, status.n,
                        status.z, status.s, status.c};
endmodule
