// Self-checking test of the microsequencer with models of the control store, the segment
// table and the return stack. A directed microprogram walks through every successor
// form and action: Step, Skip taken on the first and on the second condition, Jump and
// Call through the jump vector, a negative and a positive offset branch, Save&Step,
// Return, Jseg with the X mask, Joff, a missing-segment fault on Jseg and on a Call
// (with the stack push kept and FSEG/FOFF saved), an ordinary Repeat until a condition
// changes, an extended instruction repeated for its full count (checking the in-place
// stepping of its address fields and that its side controls act only on the last
// execution) and one stopped at once by its condition, interrupt and DMA conditions, and
// a stall. After every clock the segment-offset and absolute counters are compared with
// the address worked out from the model segment table.
module tb_microsequencer;
  import dll_pkg::*;
  import mi_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              stall, exec_valid, rep, ctl_en, intr, dma_busy, push, pop, fault, global_go;
  logic [CS_AW-1:0]  cs_addr, zbase, pc_abs;
  logic [63:0]       cs_rdata;
  microinst_t        mir;
  flags_t            status, cur;
  logic [7:0]        xmask;
  logic [SEG_W-1:0]  jv_seg, lk_seg, fseg, pc_seg;
  logic [OFF_W-1:0]  jv_off, foff, pc_off;
  seg_entry_t        lk_entry;
  logic [15:0]       push_data, stack_top;

  logic [63:0]  csm [4096];
  seg_entry_t   st [256];
  logic [15:0]  stk [16];
  int           sp = 0;
  int checks = 0, failures = 0;

  microsequencer dut (.clk, .rst_n, .stall, .cs_addr, .cs_rdata, .mir, .exec_valid, .rep, .ctl_en,
    .status, .cur, .intr, .dma_busy, .xmask, .jv_seg, .jv_off, .zbase, .lk_seg, .lk_entry,
    .push, .pop, .push_data, .stack_top, .fault, .fseg, .foff, .pc_seg, .pc_off, .pc_abs, .global_go);

  assign cs_rdata  = csm[cs_addr];
  assign lk_entry  = st[lk_seg];
  assign stack_top = (sp > 0) ? stk[sp-1] : 16'h0;
  always @(posedge clk) begin
    if (push) begin stk[sp] <= push_data; sp <= sp + 1; end
    if (pop)  sp <= sp - 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam logic [10:0] D = 11'(BA_DUMMY);
  localparam flags_t F0 = '0;
  function automatic flags_t fl(input bit z, input bit c);
    flags_t f; f = '0; f.z = z; f.c = c; return f;
  endfunction

  // one clock with the given condition inputs, then compare the counters
  task automatic go(input flags_t s, input flags_t c, input int eseg, input int eoff,
                    input string what);
    logic [CS_AW-1:0] eabs;
    @(negedge clk); status = s; cur = c;
    @(posedge clk); #1;
    eabs = st[eseg].base + CS_AW'(eoff);
    check(pc_seg == SEG_W'(eseg) && pc_off == OFF_W'(eoff) && pc_abs == eabs,
          $sformatf("%s: pc %0h:%0h (%0h), expected %0h:%0h (%0h)", what, pc_seg, pc_off, pc_abs,
                    eseg, eoff, eabs));
    check(mir == microinst_t'(csm[eabs]) || rep, {what, ": instruction register"});
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pushes = 0, pops = 0, faults = 0;
  always @(posedge clk) begin pushes += int'(push); pops += int'(pop); faults += int'(fault); end

  initial begin
    stall = 0; intr = 0; dma_busy = 0; status = F0; cur = F0; xmask = 8'h04;
    jv_seg = 8'd3; jv_off = 8'h10; zbase = 12'h000;
    for (int i = 0; i < 256; i++) st[i] = '0;
    st[0] = '{defined: 1'b1, resident: 1'b1, base: 12'h000, len_m1: 8'hFF, mm_addr: '0};
    st[3] = '{defined: 1'b1, resident: 1'b1, base: 12'h300, len_m1: 8'h7F, mm_addr: '0};
    st[7] = '{defined: 1'b1, resident: 1'b0, base: 12'h000, len_m1: 8'h0F, mm_addr: 16'h40};
    for (int i = 0; i < 4096; i++) csm[i] = mv(D, D, s_do(SX_REPEAT));
    csm[12'h080] = mv(D, D, s_step());
    csm[12'h081] = mv(D, D, s2(C_Z, SX_SKIP));
    csm[12'h083] = mv(D, D, s2(C_Z, SX_SKIP, C_C, SX_JUMP));
    csm[12'h310] = mv(D, D, s_do(SX_CALL));
    csm[12'h340] = mv(D, D, s_off(C_NEVER, SX_STEP, 8'hFC));
    csm[12'h33C] = mv(D, D, s_do(SX_RETURN));
    csm[12'h311] = mv(D, D, s_do(SX_SAVE));
    csm[12'h312] = mv(D, D, s_jseg(8'h03, 1'b1));                 // 3 | xmask 4 = segment 7
    csm[12'h000] = mv(D, D, s_joff(8'h20));
    csm[12'h320] = mi_a(OP_INC, BIT_1, fa(8'd5, Z_INC), fa(8'd9, Z_DEC), fa(8'd5, Z_INC),
                        s_cnt(C_C, SX_JUMP, 8'd3), 1'b1);
    csm[12'h321] = mi_a(OP_INC, BIT_1, fa(8'd5), D, fa(8'd5), s_cnt(C_C, SX_JUMP, 8'd3), 1'b1);
    csm[12'h090] = mv(D, D, s2(C_NEVER, SX_STEP, C_NZ, SX_REPEAT));
    csm[12'h091] = mv(D, D, s_off(C_NEVER, SX_STEP, 8'h10));
    csm[12'h0A1] = mv(D, D, s_off(C_ALWAYS, SX_SKIP, 8'h10));
    csm[12'h0A3] = mv(D, D, s2(C_NINT, SX_STEP, C_INT, SX_CALL));
    csm[12'h000] = mv(D, D, s_joff(8'h20));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!exec_valid, "no instruction before the first fetch");
    go(F0, F0, 0, 8'h80, "first fetch after reset");
    check(exec_valid, "executing after the first fetch");
    go(F0, F0, 0, 8'h81, "Step");
    go(fl(1, 0), F0, 0, 8'h83, "Skip on first condition");
    go(fl(0, 1), F0, 3, 8'h10, "Jump on second condition");
    jv_off = 8'h40;
    go(F0, F0, 3, 8'h40, "Call");
    check(sp == 1 && stk[0] == 16'h0311, "Call pushes the return address");
    go(F0, F0, 3, 8'h3C, "negative offset");
    go(F0, F0, 3, 8'h11, "Return");
    check(sp == 0, "Return pops");
    go(F0, F0, 3, 8'h12, "Save&Step");
    check(sp == 1 && stk[0] == 16'h0311, "Save&Step pushes its own address");
    // Jseg to segment 7, which is not resident
    check(global_go && fault && lk_seg == 8'd7, "Jseg with X mask looks up segment 7 and faults");
    go(F0, F0, 0, 8'h00, "fault vectors to segment 0 word 0");
    check(fseg == 8'd7 && foff == 8'd0, "fault target saved");
    // stall holds everything
    stall = 1;
    go(F0, F0, 0, 8'h00, "stall 1");
    go(F0, F0, 0, 8'h00, "stall 2");
    check(!global_go, "no global successor during a stall");
    stall = 0;
    go(F0, F0, 3, 8'h20, "Joff to offset 0x20 of segment SEG");
    // extended instruction: full count of 3 executions without carry
    check(!rep && !ctl_en, "first of three executions: controls held");
    check(mir.a.addr == 8'd5 && mir.b.addr == 8'd9, "fields at start");
    go(F0, F0, 3, 8'h20, "E repeat 2");
    check(rep && !ctl_en && mir.a.addr == 8'd6 && mir.b.addr == 8'd8 && mir.f.addr == 8'd6,
          "second execution: fields stepped");
    go(F0, F0, 3, 8'h20, "E repeat 3");
    check(rep && ctl_en && mir.a.addr == 8'd7 && mir.b.addr == 8'd7, "last execution: controls act");
    go(F0, F0, 3, 8'h21, "E count exhausted: Step");
    // extended instruction stopped at once by the current carry
    jv_seg = 8'd0; jv_off = 8'h90;
    cur = fl(0, 1); #1;
    check(ctl_en, "E instruction whose condition holds at once acts");
    go(F0, fl(0, 1), 0, 8'h90, "E condition true: Jump");
    // ordinary repeat until Z
    go(F0, F0, 0, 8'h90, "Repeat while not Z");
    go(F0, F0, 0, 8'h90, "Repeat while not Z");
    go(fl(1, 0), F0, 0, 8'h91, "Z set: Step");
    go(F0, F0, 0, 8'hA1, "positive offset");
    go(F0, F0, 0, 8'hA3, "offset form taken: Skip");
    // Call to an undefined segment while an interrupt is pending
    intr = 1; jv_seg = 8'd9; jv_off = 8'h44;
    go(F0, F0, 0, 8'h00, "Call to undefined segment faults");
    check(fseg == 8'd9 && foff == 8'h44, "fault target of Call saved");
    check(sp == 2 && stk[1] == 16'h00A4, "faulting Call still pushes");
    intr = 0;
    // DMA condition
    csm[12'h020] = mv(D, D, s2(C_DMA, SX_REPEAT));
    jv_seg = 8'd0; jv_off = 8'h20; dma_busy = 1;
    go(F0, F0, 0, 8'h20, "Joff from the handler word");
    go(F0, F0, 0, 8'h20, "wait while the DMA channel is busy");
    dma_busy = 0;
    go(F0, F0, 0, 8'h21, "DMA done: Step");
    check(pushes == 3 && pops == 1 && faults == 2, $sformatf("stack and fault counts %0d %0d %0d",
          pushes, pops, faults));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
