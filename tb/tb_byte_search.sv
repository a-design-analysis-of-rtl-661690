// Workload test: searching a byte string in main memory for the first occurrence of a
// reference byte, written as a microprogram and run on the full-size processor.
//
// The microprogram keeps the reference byte in local store byte 0, the remaining length
// as a 4-byte number in bytes 12..15 and the string address in bytes 4..7. It loads MAR
// with one extended move (the read of the first byte starts on its last execution),
// then loops over three microinstructions:
//   L:   4-byte decrement of the length                  (extended, 4 executions)
//        SUB ref - DBR, with MAR+1 and read on DBR;  if the decrement borrowed
//        (length exhausted) branch forward to NOTFOUND, else Step
//        no-op; on Z (the SUB found equal bytes) Step to FOUND, else back to L
// so each byte costs six cycles, and the read of the next byte overlaps the loop. FOUND
// stores MAR - 1 (the address of the match) in bytes 4..7; NOTFOUND stores -1 there.
// Three strings are searched (a match at byte 21 crossing two cache lines, a match at
// the first byte, no match in 30 bytes). Checked: the result, the number of cycles per
// byte from loop entry to the end (at most 6 plus the memory stalls seen), and that the
// loop is exactly six cycles per byte while the cache line holds the next byte.
module tb_byte_search;
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
  localparam int LOOP = 12'h80 + 10, FOUND = LOOP + 3, NOTFOUND = LOOP + 5;
  localparam int HALT_F = FOUND + 1, HALT_N = NOTFOUND + 1;

  task automatic cs(input int a, input logic [63:0] w);
    dut.u_cs.mem[a] = w;
  endtask

  task automatic load_program(input logic [7:0] ref_b, input logic [31:0] len,
                              input logic [31:0] adr);
    int p;
    for (int i = 0; i < 256; i++) cs(i, mv(D, D, s_do(SX_REPEAT)));
    p = 'h80;
    cs(p++, mv(fc(ref_b), fa(8'd0)));
    for (int i = 0; i < 4; i++) cs(p++, mv(fc(len[8*i +: 8]), fa(8'(12 + i))));
    for (int i = 0; i < 4; i++) cs(p++, mv(fc(adr[8*i +: 8]), fa(8'(4 + i))));
    // MAR <- address, read on the last execution
    cs(p++, mi_l(L_A, fa(8'd4, Z_INC), D, fa(mar_a(0, MOD_NONE, MOP_READ), Z_INC),
                 s_cnt(C_NEVER, SX_STEP, 8'd4), 1'b0, 3'd0, 2'd0, 1'b1));
    if (p != LOOP) $display("FAIL: layout");
    cs(p++, mi_a(OP_DEC, BIT_1, fa(8'd12, Z_INC), D, fa(8'd12, Z_INC),
                 s_cnt(C_NEVER, SX_STEP, 8'd4), 1'b1));
    cs(p++, mi_a(OP_SUB, BIT_0, fa(8'd0), fa(dbr_a(MOD_INC, MOP_READ)), D,
                 s_off(C_NC, SX_STEP, 8'(NOTFOUND - (LOOP + 1)))));
    cs(p++, mv(D, D, s_off(C_Z, SX_STEP, 8'hFE)));
    // FOUND: bytes 4..7 <- MAR - 1
    cs(p++, mi_a(OP_DEC, BIT_1, fa(mar_a(0), Z_INC), D, fa(8'd4, Z_INC),
                 s_cnt(C_NEVER, SX_STEP, 8'd4), 1'b1));
    cs(p++, mv(D, D, s_do(SX_REPEAT)));
    // NOTFOUND: bytes 4..7 <- FF
    cs(p++, mi_l(L_ONE, fa(8'd4, Z_INC), D, fa(8'd4, Z_INC), s_cnt(C_NEVER, SX_STEP, 8'd4),
                 1'b0, 3'd0, 2'd0, 1'b1));
    cs(p++, mv(D, D, s_do(SX_REPEAT)));
  endtask

  int loop_cycles, loop_stalls, bytes_seen;

  task automatic run(input logic [7:0] ref_b, input int len, input logic [31:0] adr,
                     input logic [31:0] expect_r, input int expect_bytes, input string name);
    int n;
    logic [31:0] r;
    rst_n = 0;
    load_program(ref_b, 32'(len), adr);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;
    while (pc_abs != 12'(LOOP) && n < 200) begin @(posedge clk); n++; end
    loop_cycles = 0; loop_stalls = 0; bytes_seen = 0;
    while (!(pc_abs == 12'(HALT_F) || pc_abs == 12'(HALT_N)) && n < 2000) begin
      @(posedge clk); #1;
      n++; loop_cycles++;
      if (stall) loop_stalls++;
      if (!stall && pc_abs == 12'(LOOP + 1) && !dut.u_seq.rep) bytes_seen++;
    end
    repeat (8) @(posedge clk);
    for (int i = 0; i < 4; i++) r[8*i +: 8] = dut.u_dp.u_lss.mem[4 + i];
    check(r == expect_r, $sformatf("%s: result %h, expected %h", name, r, expect_r));
    check(bytes_seen == expect_bytes, $sformatf("%s: bytes compared %0d, expected %0d", name,
          bytes_seen, expect_bytes));
    $display("%s: %0d bytes, %0d cycles in the loop (%0d stalled), %0.2f cycles per byte",
             name, bytes_seen, loop_cycles, loop_stalls, real'(loop_cycles) / real'(bytes_seen));
    check(loop_cycles - loop_stalls <= 6 * bytes_seen + 6,
          $sformatf("%s: six cycles per byte plus stalls", name));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] str [64];
    #1;
    for (int i = 0; i < 64; i++) str[i] = 8'h61 + 8'(i % 26);      // a..z, a..
    str[21] = 8'h2A;                                                // '*'
    // string at byte address 0x1003
    for (int i = 0; i < 64; i++) u_mm.mem[16'h200 + (3 + i) / 8][8*((3 + i) % 8) +: 8] = str[i];
    run(8'h2A, 40, 32'h1003, 32'h1003 + 21, 22, "match at byte 21");
    run(8'h61, 40, 32'h1003, 32'h1003, 1, "match at byte 0");
    run(8'h7E, 30, 32'h1003, 32'hFFFF_FFFF, 31, "no match in 30 bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
