// Microsequencer: evaluates the successor function of the microinstruction being
// executed and fetches the next one, addressing the control store through segment-offset
// addresses.
//
// The microprogram counter is kept in two forms, segment-offset (pc_seg, pc_off) and
// absolute (pc_abs). Local successors - Step, Skip, Repeat, Save&Step and the +/-OFFSET
// form - are counter relative and simply update both forms. Global successors - Jump
// and Call (to SEG:OFF, the jump vector registers), Return (to the popped stack entry),
// Jseg (to word 0 of segment X) and Joff (to offset X in segment SEG) - look the target
// segment up in the segment table and add the offset to its base. When the segment is
// undefined or not resident, a missing-segment fault is taken instead: the target is
// saved in FSEG/FOFF, the fault output pulses (the datapath sets the fault status bit)
// and control goes to word 0 of segment 0, whose absolute address is kept in the ZBASE
// register. Stack effects of a faulting Call or Return still happen, so the handler
// only has to load the segment and jump to FSEG:FOFF.
//
// Successor forms (see dll_pkg): "on c1 do x, else on c2 do y, else Step"; "on c do x,
// else +/-OFFSET"; with the E bit, "on c do x, else repeat up to count times, then
// Step"; and "on any" followed by Jseg/Joff. The X value of the last three is the 8-bit
// field, ORed with the X mask register when its M bit is set.
//
// Timing: one microinstruction per clock. The microinstruction register (mir) holds the
// instruction at pc; the next address is formed combinationally and the control store
// word there is captured at the clock edge. As in the overlapped machine, conditions of
// the ordinary forms test the status left by the previous microinstruction. The E form
// tests the flags of the current execution instead, because its repetition must stop as
// soon as the current result meets the condition (a repeated increment that stops on
// carry 0). A repetition does not refetch: the register keeps the instruction and steps
// its A, B and F address fields as their Z modifiers ask. stall holds everything.
// After reset the first cycle only fetches the word at segment 0, offset RESET_OFF.
// The forms, successor actions, segment-offset counter, segment-table linking and the
// fault vector to segment 0 follow the design; the bit codes, the reset address and the
// use of current flags by the E form are this design's choices.
module microsequencer
  import dll_pkg::*;
#(
  parameter logic [OFF_W-1:0] RESET_OFF = 8'h80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall,
  // control store
  output logic [CS_AW-1:0]  cs_addr,
  input  logic [MI_W-1:0]   cs_rdata,
  // microinstruction being executed
  output microinst_t        mir,
  output logic              exec_valid,
  output logic              rep,       // this execution repeats the previous one
  output logic              ctl_en,    // side controls act (not an E repeat that goes on)
  // conditions
  input  flags_t            status,    // left by the previous microinstruction
  input  flags_t            cur,       // of the current execution (E form only)
  input  logic              intr,
  input  logic              dma_busy,
  // registers of the datapath
  input  logic [7:0]        xmask,
  input  logic [SEG_W-1:0]  jv_seg,
  input  logic [OFF_W-1:0]  jv_off,
  input  logic [CS_AW-1:0]  zbase,
  // segment table lookup
  output logic [SEG_W-1:0]  lk_seg,
  input  seg_entry_t        lk_entry,
  // return stack
  output logic              push,
  output logic              pop,
  output logic [15:0]       push_data,
  input  logic [15:0]       stack_top,
  // fault reporting and state
  output logic              fault,
  output logic [SEG_W-1:0]  fseg,
  output logic [OFF_W-1:0]  foff,
  output logic [SEG_W-1:0]  pc_seg,
  output logic [OFF_W-1:0]  pc_off,
  output logic [CS_AW-1:0]  pc_abs,
  output logic              global_go   // a global successor is being taken
);
  typedef enum logic [1:0] {K_LOCAL, K_GLOBAL, K_REPEAT} kind_e;

  kind_e            kind;
  logic [7:0]       delta;
  logic [SEG_W-1:0] tseg;
  logic [OFF_W-1:0] toff;
  logic [7:0]       xval, rem_now, rep_cnt, rep_cnt_n;
  logic             e_rep, miss, push_c, pop_c;
  logic [SEG_W-1:0] nseg;
  logic [OFF_W-1:0] noff;
  logic [CS_AW-1:0] nabs;
  microinst_t       mir_mod;

  logic [5:0]  c1, c2;
  logic [2:0]  x1, y1;

  function automatic logic cond(input logic [5:0] c, input flags_t f,
                                input logic irq, input logic dbusy);
    unique case (c)
      C_ALWAYS: cond = 1'b1;
      C_Z:      cond = f.z;   C_NZ:   cond = ~f.z;
      C_N:      cond = f.n;   C_NN:   cond = ~f.n;
      C_C:      cond = f.c;   C_NC:   cond = ~f.c;
      C_V:      cond = f.v;   C_NV:   cond = ~f.v;
      C_U:      cond = f.u;   C_NU:   cond = ~f.u;
      C_S:      cond = f.s;   C_NS:   cond = ~f.s;
      C_INT:    cond = irq;   C_NINT: cond = ~irq;
      C_DMA:    cond = dbusy; C_NDMA: cond = ~dbusy;
      default:  cond = 1'b0;
    endcase
  endfunction

  function automatic busfield_t step_field(input busfield_t f);
    step_field = f;
    if (f.z == Z_INC) step_field.addr = f.addr + 8'd1;
    if (f.z == Z_DEC) step_field.addr = f.addr - 8'd1;
  endfunction

  always_comb begin
    c1   = mir.succ[17:12];
    x1   = mir.succ[11:9];
    c2   = mir.succ[8:3];
    y1   = mir.succ[2:0];
    xval = mir.succ[7:0] | (mir.succ[8] ? xmask : 8'h00);

    kind      = K_LOCAL;
    delta     = 8'd1;
    tseg      = jv_seg;
    toff      = jv_off;
    push_c    = 1'b0;
    pop_c     = 1'b0;
    push_data = {pc_seg, pc_off + 8'd1};
    e_rep     = 1'b0;
    rem_now   = rep ? rep_cnt : xval - 8'd1;
    rep_cnt_n = rep_cnt;

    if (!exec_valid) begin
      delta = 8'd0;                       // first fetch after reset
    end else begin
      logic       take;
      logic [2:0] act;
      take = 1'b0;
      act  = SX_STEP;
      if (!mir.e && c1 == C_ONANY) begin
        kind = K_GLOBAL;
        if (mir.succ[11]) begin tseg = jv_seg; toff = xval;  end  // Joff
        else              begin tseg = xval;   toff = 8'd0;  end  // Jseg
      end else if (mir.e) begin
        if (cond(c1, cur, intr, dma_busy)) begin
          take = 1'b1; act = x1;
        end else if (rem_now != 8'd0) begin
          kind      = K_REPEAT;
          e_rep     = 1'b1;
          rep_cnt_n = rem_now - 8'd1;
        end
      end else if (!mir.succ[18]) begin
        if (cond(c1, status, intr, dma_busy))      begin take = 1'b1; act = x1; end
        else if (cond(c2, status, intr, dma_busy)) begin take = 1'b1; act = y1; end
      end else begin
        if (cond(c1, status, intr, dma_busy)) begin take = 1'b1; act = x1; end
        else delta = xval;                                         // +/-OFFSET
      end

      if (take) begin
        unique case (succ_e'(act))
          SX_STEP:   delta = 8'd1;
          SX_SKIP:   delta = 8'd2;
          SX_REPEAT: kind  = K_REPEAT;
          SX_JUMP:   kind  = K_GLOBAL;
          SX_CALL:   begin kind = K_GLOBAL; push_c = 1'b1; end
          SX_SAVE:   begin push_c = 1'b1; push_data = {pc_seg, pc_off}; delta = 8'd1; end
          SX_RETURN: begin kind = K_GLOBAL; pop_c = 1'b1;
                           tseg = stack_top[15:8]; toff = stack_top[7:0]; end
          default:   delta = 8'd1;
        endcase
      end
    end

    lk_seg = tseg;
    miss   = !(lk_entry.defined && lk_entry.resident);
    unique case (kind)
      K_GLOBAL: begin
        nseg = miss ? '0 : tseg;
        noff = miss ? '0 : toff;
        nabs = miss ? zbase : lk_entry.base + CS_AW'(toff);
      end
      K_REPEAT: begin
        nseg = pc_seg;
        noff = pc_off;
        nabs = pc_abs;
      end
      default: begin
        nseg = pc_seg;
        noff = pc_off + delta;
        nabs = pc_abs + {{(CS_AW-8){delta[7]}}, delta};
      end
    endcase

    mir_mod   = mir;
    mir_mod.a = step_field(mir.a);
    mir_mod.b = step_field(mir.b);
    mir_mod.f = step_field(mir.f);
  end

  assign cs_addr   = nabs;
  assign ctl_en    = !e_rep;
  assign push      = push_c && !stall;
  assign pop       = pop_c  && !stall;
  assign global_go = exec_valid && kind == K_GLOBAL && !stall;
  assign fault     = global_go && miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mir        <= '0;
      exec_valid <= 1'b0;
      rep        <= 1'b0;
      rep_cnt    <= '0;
      pc_seg     <= '0;
      pc_off     <= RESET_OFF;
      pc_abs     <= CS_AW'(RESET_OFF);
      fseg       <= '0;
      foff       <= '0;
    end else if (!stall) begin
      exec_valid <= 1'b1;
      if (kind == K_REPEAT) begin
        mir     <= mir_mod;
        rep     <= 1'b1;
        rep_cnt <= rep_cnt_n;
      end else begin
        mir    <= microinst_t'(cs_rdata);
        rep    <= 1'b0;
        pc_seg <= nseg;
        pc_off <= noff;
        pc_abs <= nabs;
      end
      if (fault) begin
        fseg <= tseg;
        foff <= toff;
      end
    end
  end
endmodule
