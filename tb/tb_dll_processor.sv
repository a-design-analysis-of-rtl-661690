// End-to-end test of the processor at its default sizes. Segment 0 holds a boot
// program (offset 0x80) and a missing-segment fault handler (offset 0). The boot program
// defines segment 5 (image in main memory, 8 words, not resident) and calls it: the call
// faults, the handler loads the segment with the DMA channel, enters it in the segment
// table and jumps to the saved target; segment 5 increments a 4-byte number in the local
// store with one repeated extended-precision microinstruction and returns. The boot program
// then calls it again (now resident), reads and writes main memory through MAR/DBR,
// relocates segment 5 inside the control store with the DMA channel, calls it at its new
// place, runs a counted loop with an offset branch and halts.
// Checked: the results in the local store and main memory, the segment table, the moved
// control store words, and that every mechanism happened (fault, DMA load and relocation
// with the expected number of stolen control store cycles, memory stall, memory bus
// conflict, extended repetition, global linkage, offset branch).
module tb_dll_processor;
  import dll_pkg::*;
  import mi_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              m_req, m_we, m_ack;
  logic [MM_AW-1:0]  m_addr;
  logic [63:0]       m_wdata, m_rdata;
  logic [7:0]        m_be, status_byte, ir_out;
  logic [SEG_W-1:0]  pc_seg;
  logic [OFF_W-1:0]  pc_off;
  logic [CS_AW-1:0]  pc_abs;
  logic [31:0]       machine_pc;
  logic stall, mem_stall, dma_steal, dma_busy, seg_fault, global_go, mm_conflict, stack_error;

  dll_processor dut (
    .clk, .rst_n, .switches(8'h00), .intr(1'b0),
    .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_ack, .m_rdata,
    .pc_seg, .pc_off, .pc_abs, .status_byte, .stall, .mem_stall, .dma_steal, .dma_busy,
    .seg_fault, .global_go, .mm_conflict, .machine_pc, .ir_out, .stack_error
  );

  main_memory_model #(.AW(MM_AW), .LAT(4)) u_mm (
    .clk, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .be(m_be),
    .ack(m_ack), .rdata(m_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [10:0] D = 11'(BA_DUMMY);
  logic [63:0] seg5 [8];
  localparam int HALT = 12'h80 + 32;

  task automatic cs(input int a, input logic [63:0] w);
    dut.u_cs.mem[a] = w;
  endtask

  initial begin
    int p;
    #1;  // after the memory model has cleared itself
    // ---- segment 5 image in main memory (word 0x100) ----
    seg5[0] = mi_a(OP_INC, BIT_1, fa(8'd5, Z_INC), D, fa(8'd5, Z_INC), s_cnt(C_NC, SX_STEP, 8'd4), 1'b1);
    seg5[1] = mv(D, D, s_do(SX_RETURN));
    for (int i = 2; i < 8; i++) seg5[i] = mv(D, D, s_do(SX_REPEAT));
    for (int i = 0; i < 8; i++) u_mm.mem[16'h100 + i] = seg5[i];
    u_mm.mem[2] = 64'h8877_6655_4433_2211;
    for (int i = 0; i < 4096; i++) cs(i, mv(D, D, s_do(SX_REPEAT)));

    // ---- fault handler: segment 0, offset 0 ----
    p = 0;
    cs(p++, mv(fa(BA_FSEG), fa(BA_SEG)));
    cs(p++, mv(fa(BA_ST0 + 8'd3), fa(BA_DMA0 + 8'd1)));
    cs(p++, mv(fa(BA_ST0 + 8'd4), fa(BA_DMA0 + 8'd2)));
    cs(p++, mv(fa(8'd10), fa(BA_DMA0 + 8'd3)));
    cs(p++, mv(fa(8'd11), fa(BA_DMA0 + 8'd4)));
    cs(p++, mv(fa(BA_ST0 + 8'd2), fa(BA_DMA0)));
    cs(p++, mv(fc(8'h03), fa(BA_DMA0 + 8'd5)));                 // load MM -> CS
    cs(p++, mv(fc(8'h18), fa(mar_a(0, MOD_NONE, MOP_READ))));   // memory read during the load
    cs(p++, mv(D, D, s2(C_DMA, SX_REPEAT)));                    // wait for the DMA channel
    cs(p++, mv(fa(8'd10), fa(BA_ST0)));
    cs(p++, mi_l(L_OR, fa(8'd11), fc(8'hC0), fa(BA_ST0 + 8'd1), s_step()));
    cs(p++, mi_a(OP_ADD, BIT_1, fa(8'd10), fa(BA_ST0 + 8'd2), fa(8'd10), s_step()));
    cs(p++, mi_a(OP_INC, BIT_FLAG, fa(8'd11), D, fa(8'd11), s_step()));
    cs(p++, mv(fc(8'h00), fa(BA_STATUS)));
    cs(p++, mv(fa(BA_FOFF), fa(BA_OFF)));
    cs(p++, mv(D, D, s_do(SX_JUMP)));

    // ---- boot program: segment 0, offset 0x80 ----
    p = 'h80;
    cs(p++, mv(fc(8'hFF), fa(8'd5)));
    cs(p++, mv(fc(8'hFF), fa(8'd6)));
    cs(p++, mv(fc(8'h12), fa(8'd7)));
    cs(p++, mv(fc(8'h00), fa(8'd8)));
    cs(p++, mv(fc(8'h00), fa(8'd10)));                          // free control store: 0x100
    cs(p++, mv(fc(8'h01), fa(8'd11)));
    cs(p++, mv(fc(8'h05), fa(BA_SEG)));                         // define segment 5
    cs(p++, mv(fc(8'h07), fa(BA_ST0 + 8'd2)));
    cs(p++, mv(fc(8'h00), fa(BA_ST0 + 8'd3)));
    cs(p++, mv(fc(8'h01), fa(BA_ST0 + 8'd4)));
    cs(p++, mv(fc(8'h80), fa(BA_ST0 + 8'd1)));
    cs(p++, mv(fc(8'h00), fa(BA_OFF)));
    cs(p++, mv(D, D, s_do(SX_CALL)));                           // 0x8C: faults
    cs(p++, mv(D, D, s_do(SX_CALL)));                           // 0x8D: resident now
    cs(p++, mv(fc(8'h10), fa(mar_a(0, MOD_NONE, MOP_READ))));   // 0x8E
    cs(p++, mv(fa(dbr_a(MOD_INC, MOP_READ)), fa(8'd20)));       // waits for the word
    cs(p++, mv(fa(dbr_a()), fa(8'd21)));
    cs(p++, mv(fc(8'h5A), fa(dbr_a(MOD_NONE, MOP_WRITE))));
    cs(p++, mv(fa(BA_ST0), fa(BA_DMA0 + 8'd1)));                // relocate 5 to 0x200
    cs(p++, mi_l(L_AND, fa(BA_ST0 + 8'd1), fc(8'h0F), fa(BA_DMA0 + 8'd2), s_step()));
    cs(p++, mv(fc(8'h00), fa(BA_DMA0 + 8'd3)));
    cs(p++, mv(fc(8'h02), fa(BA_DMA0 + 8'd4)));
    cs(p++, mv(fa(BA_ST0 + 8'd2), fa(BA_DMA0)));
    cs(p++, mv(fc(8'h01), fa(BA_DMA0 + 8'd5)));
    cs(p++, mv(D, D, s2(C_DMA, SX_REPEAT)));
    cs(p++, mv(fc(8'h00), fa(BA_ST0)));
    cs(p++, mv(fc(8'hC2), fa(BA_ST0 + 8'd1)));
    cs(p++, mv(D, D, s_do(SX_CALL)));                           // runs at 0x200
    cs(p++, mv(fc(8'h03), fa(8'd30)));
    cs(p++, mi_a(OP_DEC, BIT_1, fa(8'd30), D, fa(8'd30), s_step()));
    cs(p++, mv(D, D, s_off(C_Z, SX_STEP, 8'hFF)));              // back one while not zero
    cs(p++, mv(fc(8'hAA), fa(8'd63)));
    cs(p++, mv(D, D, s_do(SX_REPEAT)));                         // halt
    if (p - 1 != HALT) $display("FAIL: program layout");
  end

  // ---- event counters ----
  int n_fault = 0, n_global = 0, n_steal = 0, n_steal_cs2cs = 0, n_steal_mm2cs = 0;
  int n_mstall = 0, n_conflict = 0, n_erep = 0, n_back = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (seg_fault) n_fault++;
    if (global_go) n_global++;
    if (dma_steal) begin
      n_steal++;
      if (dut.u_dma.mode == DMA_CS2CS) n_steal_cs2cs++;
      if (dut.u_dma.mode == DMA_MM2CS) n_steal_mm2cs++;
    end
    if (mem_stall) n_mstall++;
    if (mm_conflict) n_conflict++;
    if (!stall && dut.u_seq.exec_valid && dut.u_seq.kind == 2'd2 && dut.mir.e) n_erep++;
    if (!stall && dut.u_seq.exec_valid && pc_abs == 12'h80 + 30 && dut.u_seq.cs_addr == 12'h80 + 29)
      n_back++;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, pc=%h", pc_abs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (pc_abs == 12'(HALT) && dut.u_seq.exec_valid);
    repeat (4) @(posedge clk);
    // local store results: R5..R8 incremented three times from 0x0012FFFF
    check({dut.u_dp.u_lss.mem[8], dut.u_dp.u_lss.mem[7], dut.u_dp.u_lss.mem[6],
           dut.u_dp.u_lss.mem[5]} == 32'h0013_0002, "R5..R8 = 0x00130002");
    check(dut.u_dp.u_lss.mem[20] == 8'h11, "R20 = byte 0x10 of memory");
    check(dut.u_dp.u_lss.mem[21] == 8'h22, "R21 = byte 0x11 of memory");
    check(u_mm.mem[2] == 64'h8877_6655_4433_5A11, "byte 0x11 written through");
    check(dut.u_dp.u_lss.mem[30] == 8'h00, "loop counter ran down");
    check(dut.u_dp.u_lss.mem[63] == 8'hAA, "halt marker");
    check({dut.u_dp.u_lss.mem[11], dut.u_dp.u_lss.mem[10]} == 16'h0108, "free pointer moved by 8");
    check(dut.u_st.tbl[5].base == 12'h200 && dut.u_st.tbl[5].resident, "segment 5 at 0x200");
    for (int i = 0; i < 8; i++) begin
      check(dut.u_cs.mem[12'h100 + i] == seg5[i], $sformatf("loaded word %0d", i));
      check(dut.u_cs.mem[12'h200 + i] == seg5[i], $sformatf("relocated word %0d", i));
    end
    check(!stack_error, "return stack balanced");
    check(status_byte[6] == 1'b0, "fault status cleared by the handler");
    // mechanisms
    check(n_fault == 1, $sformatf("one missing-segment fault (%0d)", n_fault));
    check(n_global >= 7, $sformatf("global linkages (%0d)", n_global));
    check(n_steal_mm2cs == 8, $sformatf("load of m=8 words steals 8 cycles (%0d)", n_steal_mm2cs));
    check(n_steal_cs2cs == 16, $sformatf("relocation of m=8 words steals 2m cycles (%0d)", n_steal_cs2cs));
    check(n_mstall > 0, $sformatf("memory stall happened (%0d)", n_mstall));
    check(n_conflict > 0, $sformatf("main memory conflict happened (%0d)", n_conflict));
    check(n_erep == 2, $sformatf("extended repetitions (%0d)", n_erep));
    check(n_back == 2, $sformatf("offset branches back (%0d)", n_back));
    $display("cycles=%0d faults=%0d global=%0d steals=%0d mstall=%0d conflict=%0d erep=%0d",
             cycles, n_fault, n_global, n_steal, n_mstall, n_conflict, n_erep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
