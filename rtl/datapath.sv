// Data structure of the microprocessor: the A and B operand buses, the F result bus,
// the ALU and shifter, the local store scratchpad and the special registers, all
// steered by the bus address fields of the microinstruction.
//
// Each of the A, B and F fields names one of 256 bus addresses (map in dll_pkg). The
// field's M bit ORs the field with that bus's mask register (AMASK, BMASK, FMASK), and a
// Z modifier of C makes the A or B field an 8-bit constant operand instead of an address
// (a constant F field stores nothing). In one microcycle the A and B operands are read,
// the ALU and then the shifter form the result, and at the clock edge the result is
// written to the register named by F and the status flags are updated. Registers that
// answer to several addresses use them for their bytes (MAR, PC) or for commands: MAR
// and DBR addresses carry a memory access control, the second set of PC addresses adds
// 2 to PC after the reference. The memory control of the F field is used first, then A,
// then B.
//
// Repetition: when the sequencer repeats an instruction (rep), the carry-in is the
// previous carry-out, a one-place shift takes the previous shift-out as its shift-in,
// and an extended precision (E) operation keeps the zero flag only if every byte so far
// was zero. Memory and PC controls of an E instruction act only on its last execution,
// so that a multi-byte transfer into MAR starts one fetch with the complete address.
//
// Status register (bus address STATUS): {0, F, U, V, N, Z, S, C}; F is set by a
// missing-segment fault and cleared by writing the register. A microinstruction that
// touches MAR or DBR while the memory port is busy raises mem_stall and is held.
// The buses, their width, the registers, masks, constants, Z modifiers, the status
// conditions and the delay on an invalid register follow the design; the bus address
// map, register widths (PC and MAR 32 bits) and flag coding are this design's choices.
module datapath
  import dll_pkg::*;
#(
  parameter int unsigned LSS_WORDS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  microinst_t        mir,
  input  logic              exec_valid,
  input  logic              rep,
  input  logic              ctl_en,
  input  logic              stall,        // global hold (memory or DMA)
  output logic              mem_stall,
  output flags_t            status,
  output flags_t            cur,
  output logic              fault_bit,
  input  logic              fault,
  input  logic [7:0]        switches,
  output logic [7:0]        ir,
  output logic [7:0]        xmask,
  output logic [SEG_W-1:0]  seg,
  output logic [OFF_W-1:0]  off,
  output logic [CS_AW-1:0]  zbase,
  output logic [31:0]       pc,
  input  logic [SEG_W-1:0]  fseg,
  input  logic [OFF_W-1:0]  foff,
  // segment table bus port
  input  logic [7:0]        st_rdata [5],
  output logic              st_we,
  output logic [2:0]        st_byte,
  // DMA channel registers
  input  logic [7:0]        dma_rdata [6],
  output logic              dma_we,
  output logic [2:0]        dma_sel,
  // memory port
  input  logic [31:0]       mar,
  input  logic [7:0]        dbr,
  input  logic              mem_busy,
  output logic              mar_we,
  output logic [1:0]        mar_byte,
  output logic              dbr_we,
  output logic              mctl_v,
  output logic [3:0]        mctl,
  // result bus
  output logic [7:0]        fbus
);
  localparam int unsigned LAW = $clog2(LSS_WORDS);

  logic [7:0] amask, bmask, fmask;
  logic [7:0] a_eff, b_eff, f_eff, abus, bbus;
  logic [7:0] lss_a, lss_b, alu_y;
  logic       commit, fwrite, cin, sin, alu_c, alu_v, alu_u, alu_z, alu_n, sout;
  logic       pc_inc;

  assign commit = exec_valid && !stall;

  always_comb begin
    a_eff = mir.a.addr | (mir.a.m ? amask : 8'h00);
    b_eff = mir.b.addr | (mir.b.m ? bmask : 8'h00);
    f_eff = mir.f.addr | (mir.f.m ? fmask : 8'h00);
  end

  function automatic logic [7:0] rd(input logic [7:0] ad, input logic [7:0] lss);
    rd = 8'h00;
    if (ad <= BA_LSS_LAST)                      rd = lss;
    else if (ad >= BA_ST0 && ad <= BA_ST4)      rd = st_rdata[3'(ad - BA_ST0)];
    else if (ad >= BA_DMA0 && ad <= BA_DMA5)    rd = dma_rdata[3'(ad - BA_DMA0)];
    else if (ad[7:6] == 2'b10)                  rd = mar[8*ad[1:0] +: 8];
    else if (ad[7:4] == 4'hC)                   rd = dbr;
    else if (ad[7:3] == 5'b11010)               rd = pc[8*ad[1:0] +: 8];
    else begin
      unique case (ad)
        BA_STATUS:   rd = {1'b0, fault_bit, status.u, status.v, status.n,
                           status.z, status.s, status.c};
        BA_SWITCH:   rd = switches;
        BA_IR:       rd = ir;
        BA_AMASK:    rd = amask;
        BA_BMASK:    rd = bmask;
        BA_FMASK:    rd = fmask;
        BA_XMASK:    rd = xmask;
        BA_SEG:      rd = seg;
        BA_OFF:      rd = off;
        BA_FSEG:     rd = fseg;
        BA_FOFF:     rd = foff;
        BA_ZBASE_LO: rd = zbase[7:0];
        BA_ZBASE_HI: rd = 8'(zbase[CS_AW-1:8]);
        default:     rd = 8'h00;
      endcase
    end
  endfunction

  function automatic logic is_mem(input logic [7:0] ad);
    is_mem = (ad[7:6] == 2'b10) || (ad[7:4] == 4'hC);
  endfunction

  function automatic logic [3:0] ctl_of(input logic [7:0] ad);
    ctl_of = (ad[7:6] == 2'b10) ? ad[5:2] : (ad[7:4] == 4'hC) ? ad[3:0] : 4'h0;
  endfunction

  local_store #(.WORDS(LSS_WORDS)) u_lss (
    .clk, .rst_n,
    .ra_addr(LAW'(a_eff)), .ra_data(lss_a),
    .rb_addr(LAW'(b_eff)), .rb_data(lss_b),
    .we(fwrite && f_eff <= BA_LSS_LAST), .wa_addr(LAW'(f_eff)), .wa_data(fbus)
  );

  assign abus = (mir.a.z == Z_CONST) ? a_eff : rd(a_eff, lss_a);
  assign bbus = (mir.b.z == Z_CONST) ? b_eff : rd(b_eff, lss_b);

  always_comb begin
    if (rep && mir.t) cin = status.c;
    else begin
      unique case (bitsel_e'(mir.fn[1:0]))
        BIT_0:     cin = 1'b0;
        BIT_1:     cin = 1'b1;
        BIT_FLAG:  cin = status.c;
        default:   cin = ~status.c;
      endcase
    end
    if (rep && mir.samt == 3'd1) sin = status.s;
    else begin
      unique case (mir.ssel)
        BIT_0:     sin = 1'b0;
        BIT_1:     sin = 1'b1;
        BIT_FLAG:  sin = status.s;
        default:   sin = ~status.s;
      endcase
    end
  end

  alu #(.W(8)) u_alu (
    .t(mir.t), .fn(mir.fn), .a(abus), .b(bbus), .cin,
    .y(alu_y), .cout(alu_c), .ovf(alu_v), .unf(alu_u), .zero(alu_z), .neg(alu_n)
  );

  shifter #(.W(8)) u_shift (
    .d(alu_y), .right(mir.sdir), .amt(mir.samt), .sin, .q(fbus), .sout
  );

  always_comb begin
    cur.c = mir.t ? alu_c : status.c;
    cur.v = mir.t ? alu_v : 1'b0;
    cur.u = mir.t ? alu_u : 1'b0;
    cur.n = fbus[7];
    cur.z = (fbus == 8'h00) && !(rep && mir.e && !status.z);
    cur.s = (mir.samt != 3'd0) ? sout : status.s;
  end

  // Side effects of the F field and of commands carried by bus addresses
  assign fwrite   = commit && (mir.f.z != Z_CONST);
  assign st_we    = fwrite && f_eff >= BA_ST0 && f_eff <= BA_ST4;
  assign st_byte  = 3'(f_eff - BA_ST0);
  assign dma_we   = fwrite && f_eff >= BA_DMA0 && f_eff <= BA_DMA5;
  assign dma_sel  = 3'(f_eff - BA_DMA0);
  assign mar_we   = fwrite && f_eff[7:6] == 2'b10;
  assign mar_byte = f_eff[1:0];
  assign dbr_we   = fwrite && f_eff[7:4] == 4'hC;

  logic a_mem, b_mem, f_mem;
  always_comb begin
    f_mem = (mir.f.z != Z_CONST) && is_mem(f_eff);
    a_mem = (mir.a.z != Z_CONST) && is_mem(a_eff);
    b_mem = (mir.b.z != Z_CONST) && is_mem(b_eff);
    mctl  = f_mem && ctl_of(f_eff) != 4'h0 ? ctl_of(f_eff) :
            a_mem && ctl_of(a_eff) != 4'h0 ? ctl_of(a_eff) : ctl_of(b_eff);
    mctl_v    = commit && ctl_en && (mctl != 4'h0) && (f_mem || a_mem || b_mem);
    mem_stall = exec_valid && mem_busy && (f_mem || a_mem || b_mem);
    pc_inc    = ctl_en && (((mir.a.z != Z_CONST) && a_eff[7:2] == 6'b110101) ||
                           ((mir.b.z != Z_CONST) && b_eff[7:2] == 6'b110101) ||
                           ((mir.f.z != Z_CONST) && f_eff[7:2] == 6'b110101));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status    <= '0;
      fault_bit <= 1'b0;
      ir        <= '0;
      amask     <= '0;
      bmask     <= '0;
      fmask     <= '0;
      xmask     <= '0;
      seg       <= '0;
      off       <= '0;
      zbase     <= '0;
      pc        <= '0;
    end else if (commit) begin
      logic [31:0] pc_n;
      status <= cur;
      if (fault) fault_bit <= 1'b1;
      pc_n = pc;
      if (fwrite && f_eff[7:3] == 5'b11010) pc_n[8*f_eff[1:0] +: 8] = fbus;
      if (pc_inc) pc_n = pc_n + 32'd2;
      pc <= pc_n;
      if (fwrite) begin
        unique case (f_eff)
          BA_STATUS: begin
            status    <= flags_t'(fbus[5:0]);
            fault_bit <= fbus[6] | fault;
          end
          BA_IR:       ir    <= fbus;
          BA_AMASK:    amask <= fbus;
          BA_BMASK:    bmask <= fbus;
          BA_FMASK:    fmask <= fbus;
          BA_XMASK:    xmask <= fbus;
          BA_SEG:      seg   <= fbus;
          BA_OFF:      off   <= fbus;
          BA_ZBASE_LO: zbase[7:0]       <= fbus;
          BA_ZBASE_HI: zbase[CS_AW-1:8] <= fbus[CS_AW-9:0];
          default: ;
        endcase
      end
    end
  end
endmodule
