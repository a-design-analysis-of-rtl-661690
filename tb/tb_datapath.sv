// Self-checking test of the datapath. A random phase runs 3000 microinstructions that
// combine local store registers and constants with every ALU function and shift and
// compares the F bus and the status flags with a reference model kept in the testbench
// (which also tracks the local store contents). A directed phase then checks the mask
// registers, the special registers and their read-back, the status register with the
// fault bit, the PC byte addresses and the add-2 addresses, the segment table and DMA
// register strobes, the MAR/DBR strobes with the access control carried in their
// addresses, the memory stall, that side controls are suppressed while an extended
// instruction repeats, the carry and shift-in taken from the previous execution on a
// repetition, the multi-byte zero flag, a constant F field and a global stall.
module tb_datapath;
  import dll_pkg::*;
  import mi_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  microinst_t       mir;
  logic             exec_valid, rep, ctl_en, stall, mem_stall, fault_bit, fault;
  flags_t           status, cur;
  logic [7:0]       switches, ir, xmask, fbus, dbr;
  logic [SEG_W-1:0] seg, fseg;
  logic [OFF_W-1:0] off, foff;
  logic [CS_AW-1:0] zbase;
  logic [31:0]      pc, mar;
  logic [7:0]       st_rdata [5];
  logic [7:0]       dma_rdata [6];
  logic             st_we, dma_we, mem_busy, mar_we, dbr_we, mctl_v;
  logic [2:0]       st_byte, dma_sel;
  logic [1:0]       mar_byte;
  logic [3:0]       mctl;

  datapath dut (.clk, .rst_n, .mir, .exec_valid, .rep, .ctl_en, .stall, .mem_stall, .status, .cur,
    .fault_bit, .fault, .switches, .ir, .xmask, .seg, .off, .zbase, .pc, .fseg, .foff,
    .st_rdata, .st_we, .st_byte, .dma_rdata, .dma_we, .dma_sel, .mar, .dbr, .mem_busy,
    .mar_we, .mar_byte, .dbr_we, .mctl_v, .mctl, .fbus);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam logic [10:0] D = 11'(BA_DUMMY);
  logic [7:0] lss [64];
  flags_t     ms;               // model status

  // reference: one non-repeated microinstruction on local store / constant operands
  task automatic model(input logic [63:0] w, output logic [7:0] y, output flags_t f);
    microinst_t m;
    logic [7:0] a, b, r;
    logic [8:0] s;
    logic ci, si, so;
    m = microinst_t'(w);
    a = (m.a.z == Z_CONST) ? m.a.addr : lss[m.a.addr[5:0]];
    b = (m.b.z == Z_CONST) ? m.b.addr : lss[m.b.addr[5:0]];
    ci = m.fn[1:0] == 2'd0 ? 1'b0 : m.fn[1:0] == 2'd1 ? 1'b1 : m.fn[1:0] == 2'd2 ? ms.c : ~ms.c;
    si = m.ssel == 2'd0 ? 1'b0 : m.ssel == 2'd1 ? 1'b1 : m.ssel == 2'd2 ? ms.s : ~ms.s;
    f = '0;
    if (m.t) begin
      case (m.fn[3:2])
        2'd0: s = a + ci;
        2'd1: s = a - ci;
        2'd2: s = a + b + ci;
        default: s = a - b - ci;
      endcase
      r = s[7:0];
      f.c = s[8];
      f.u = m.fn[2] ? s[8] : 1'b0;         // DEC and SUB
      case (m.fn[3:2])
        2'd0:    f.v = (a == 8'h7F) && ci;
        2'd1:    f.v = (a == 8'h80) && ci;
        2'd2:    f.v = (a[7] == b[7]) && (r[7] != a[7]);
        default: f.v = (a[7] != b[7]) && (r[7] != a[7]);
      endcase
    end else begin
      for (int i = 0; i < 8; i++) r[i] = m.fn[{a[i], b[i]}];
      f.c = ms.c;
    end
    y = r; so = ms.s;
    for (int i = 0; i < int'(m.samt); i++) begin
      if (m.sdir) begin so = y[0]; y = {si, y[7:1]}; end
      else        begin so = y[7]; y = {y[6:0], si}; end
    end
    f.s = so; f.z = (y == 8'h00); f.n = y[7];
  endtask

  // apply one microinstruction for one clock; value of F bus before the edge returned
  task automatic exec(input logic [63:0] w, output logic [7:0] fb);
    @(negedge clk); mir = microinst_t'(w); #1 fb = fbus;
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] y, fb;
    flags_t     f;
    logic [63:0] w;
    mir = '0; exec_valid = 1; rep = 0; ctl_en = 1; stall = 0; fault = 0; switches = 8'hA5;
    fseg = 8'h12; foff = 8'h34; mar = 32'hDEAD_BEEF; dbr = 8'h77; mem_busy = 0;
    for (int i = 0; i < 5; i++) st_rdata[i] = 8'h60 + 8'(i);
    for (int i = 0; i < 6; i++) dma_rdata[i] = 8'h90 + 8'(i);
    ms = '0;
    for (int i = 0; i < 64; i++) lss[i] = 8'h00;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ---------------- random phase ----------------
    for (int n = 0; n < 3000; n++) begin
      logic [10:0] fa_, fb_, ff_;
      fa_ = $urandom_range(0, 3) == 0 ? fc(8'($urandom)) : fa(8'($urandom_range(0, 63)));
      fb_ = $urandom_range(0, 3) == 0 ? fc(8'($urandom)) : fa(8'($urandom_range(0, 63)));
      ff_ = fa(8'($urandom_range(0, 63)));
      w = {1'b0, 1'($urandom), 4'($urandom), 2'($urandom), 1'($urandom),
           ($urandom_range(0, 2) == 0) ? 3'($urandom) : 3'd0, fa_, fb_, ff_, s_step()};
      model(w, y, f);
      exec(w, fb);
      check(fb == y, $sformatf("F bus %h expected %h for %h", fb, y, w));
      check(status == f, $sformatf("status %b expected %b for %h", status, f, w));
      lss[ff_[5:0]] = y; ms = f;
    end
    // ---------------- masks ----------------
    exec(mv(fc(8'h55), fa(8'h13)), fb); lss[8'h13] = 8'h55;
    exec(mv(fc(8'h03), fa(BA_AMASK)), fb);
    exec(mv(fa(8'h10, Z_SAME, 1'b1), fa(8'h20)), fb);
    check(fb == 8'h55, "A mask ORed into the A field");
    exec(mv(fc(8'h01), fa(BA_FMASK)), fb);
    exec(mv(fc(8'h66), fa(8'h20, Z_SAME, 1'b1)), fb);
    exec(mv(fa(8'h21), fa(8'h22)), fb);
    check(fb == 8'h66, "F mask ORed into the F field");
    exec(mv(fc(8'h02), fa(BA_BMASK)), fb);
    exec(mi_l(L_B, D, fa(8'h20, Z_SAME, 1'b1), fa(8'h23), s_step()), fb);
    check(fb == 8'h66, "B mask ORed into the B field (0x20|2 = 0x22)");
    // ---------------- special registers ----------------
    exec(mv(fc(8'h3C), fa(BA_IR)), fb);
    exec(mv(fc(8'h0F), fa(BA_XMASK)), fb);
    exec(mv(fc(8'h05), fa(BA_SEG)), fb);
    exec(mv(fc(8'h9A), fa(BA_OFF)), fb);
    exec(mv(fc(8'hBC), fa(BA_ZBASE_LO)), fb);
    exec(mv(fc(8'hFA), fa(BA_ZBASE_HI)), fb);
    check(ir == 8'h3C && xmask == 8'h0F && seg == 8'h05 && off == 8'h9A && zbase == 12'hABC,
          "special register writes");
    exec(mv(fa(BA_IR), D), fb);       check(fb == 8'h3C, "IR read");
    exec(mv(fa(BA_SWITCH), D), fb);   check(fb == 8'hA5, "switches read");
    exec(mv(fa(BA_FSEG), D), fb);     check(fb == 8'h12, "FSEG read");
    exec(mv(fa(BA_FOFF), D), fb);     check(fb == 8'h34, "FOFF read");
    exec(mv(fa(BA_ZBASE_HI), D), fb); check(fb == 8'h0A, "ZBASE high read");
    exec(mv(fa(BA_SEG), D), fb);      check(fb == 8'h05, "SEG read");
    // ---------------- status and fault bit ----------------
    exec(mv(fc(8'h2B), fa(BA_STATUS)), fb);
    check(status == flags_t'(6'h2B) && !fault_bit, "status write");
    @(negedge clk); fault = 1; mir = microinst_t'(mv(D, D)); @(posedge clk); #1 fault = 0;
    check(fault_bit, "fault sets the F status bit");
    exec(mv(fa(BA_STATUS), D), fb);  check(fb[6], "F bit visible in STATUS");
    exec(mv(fc(8'h00), fa(BA_STATUS)), fb); check(!fault_bit, "writing STATUS clears F");
    // ---------------- PC ----------------
    exec(mv(fc(8'h10), fa(BA_PC)), fb);
    exec(mv(fc(8'h32), fa(BA_PC + 8'd1)), fb);
    exec(mv(fc(8'h54), fa(BA_PC + 8'd2)), fb);
    exec(mv(fc(8'h76), fa(BA_PC + 8'd3)), fb);
    check(pc == 32'h7654_3210, "PC bytes");
    exec(mv(fa(BA_PC + 8'd4), fa(8'h30)), fb);
    check(fb == 8'h10 && pc == 32'h7654_3212, "reference with add 2");
    ctl_en = 0;
    exec(mv(fa(BA_PC + 8'd5), fa(8'h30)), fb);
    check(pc == 32'h7654_3212, "no add 2 while an E instruction repeats");
    ctl_en = 1;
    exec(mv(fc(8'hFF), fa(BA_PC + 8'd4)), fb);
    check(pc == 32'h7654_3301, "write with add 2");
    // ---------------- segment table and DMA strobes ----------------
    @(negedge clk); mir = microinst_t'(mv(fc(8'h11), fa(BA_ST0 + 8'd2))); #1;
    check(st_we && st_byte == 3'd2 && fbus == 8'h11 && !dma_we && !mar_we, "segment table strobe");
    @(posedge clk); #1;
    exec(mv(fa(BA_ST0 + 8'd4), D), fb); check(fb == 8'h64, "segment table read");
    @(negedge clk); mir = microinst_t'(mv(fc(8'h03), fa(BA_DMA5))); #1;
    check(dma_we && dma_sel == 3'd5 && !st_we, "DMA register strobe");
    @(posedge clk); #1;
    exec(mv(fa(BA_DMA0 + 8'd1), D), fb); check(fb == 8'h91, "DMA register read");
    // ---------------- memory port ----------------
    @(negedge clk); mir = microinst_t'(mv(fc(8'h40), fa(mar_a(2, MOD_INC, MOP_READ)))); #1;
    check(mar_we && mar_byte == 2'd2 && mctl_v && mctl == {MOD_INC, MOP_READ} && !mem_stall,
          "MAR write with access control");
    @(posedge clk); #1;
    exec(mv(fa(mar_a(1)), D), fb); check(fb == 8'hBE, "MAR byte read");
    @(negedge clk); mir = microinst_t'(mv(fa(8'h13), fa(dbr_a(MOD_NONE, MOP_WRITE)))); #1;
    check(dbr_we && mctl_v && mctl == {MOD_NONE, MOP_WRITE} && fbus == 8'h55, "DBR write");
    @(posedge clk); #1;
    @(negedge clk); mir = microinst_t'(mv(fa(dbr_a(MOD_DEC, MOP_READ)), fa(8'h31))); #1;
    check(!dbr_we && mctl_v && mctl == {MOD_DEC, MOP_READ} && fbus == 8'h77,
          "DBR read with access control on the A field");
    ctl_en = 0; #1;
    check(!mctl_v, "memory control held while an E instruction repeats");
    ctl_en = 1;
    @(posedge clk); #1;
    mem_busy = 1;
    @(negedge clk); mir = microinst_t'(mv(fa(dbr_a()), fa(8'h31))); #1;
    check(mem_stall, "DBR reference while the port is busy stalls");
    mir = microinst_t'(mv(fa(8'h13), fa(8'h31))); #1;
    check(!mem_stall, "no stall without a memory reference");
    mem_busy = 0;
    @(posedge clk); #1;
    // ---------------- repetition ----------------
    exec(mv(fc(8'h00), fa(8'h31)), fb);
    exec(mi_a(OP_ADD, BIT_1, fc(8'hFF), fc(8'h00), fa(8'h31), s_step()), fb);
    check(status.c && fb == 8'h00, "carry out");
    rep = 1;
    exec(mi_a(OP_ADD, BIT_0, fc(8'h10), fc(8'h00), fa(8'h31), s_step()), fb);
    check(fb == 8'h11, "repetition takes the previous carry");
    rep = 0;
    exec(mi_l(L_A, fc(8'h01), D, fa(8'h31), s_step(), 1'b1, 3'd1), fb);
    check(status.s && fb == 8'h00, "shift-out to S");
    rep = 1;
    exec(mi_l(L_A, fc(8'h00), D, fa(8'h31), s_step(), 1'b1, 3'd1, 2'd0), fb);
    check(fb == 8'h80, "repeated one-place shift takes the previous shift-out");
    rep = 0;
    exec(mi_l(L_A, fc(8'h01), D, fa(8'h31), s_step(), 1'b0, 3'd0, 2'd0, 1'b1), fb);
    check(!status.z, "nonzero byte");
    rep = 1;
    exec(mi_l(L_A, fc(8'h00), D, fa(8'h31), s_step(), 1'b0, 3'd0, 2'd0, 1'b1), fb);
    check(!status.z, "extended zero flag keeps an earlier nonzero byte");
    rep = 0;
    // ---------------- constant F field and stall ----------------
    exec(mv(fc(8'h5A), fa(8'h33)), fb);
    exec(mv(fc(8'hA5), fc(8'h33)), fb);
    exec(mv(fa(8'h33), D), fb); check(fb == 8'h5A, "constant F field stores nothing");
    stall = 1;
    exec(mv(fc(8'hEE), fa(BA_IR)), fb);
    stall = 0;
    check(ir == 8'h3C, "stall: nothing committed");
    exec_valid = 0;
    exec(mv(fc(8'hEE), fa(BA_IR)), fb);
    check(ir == 8'h3C, "no instruction: nothing committed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
