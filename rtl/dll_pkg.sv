// Shared types and constants of the dynamically linked microprogrammed processor.
//
// The microinstruction is 64 bits wide and is split, most significant bit first, into
// a 12-bit ALU/shifter part, three 11-bit bus address fields (A, B, F) and a 19-bit
// successor part. The field widths (12 + 33 + 19) and their order follow the published
// format; the bit codes inside the fields (logic function truth table, condition
// numbers, successor codes, bus addresses of the registers) are this design's own
// choices, since only the field names and sizes are given.
//
//   [63]     E    extended precision (changes the meaning of the successor part)
//   [62]     T    0: logic function, 1: arithmetic
//   [61:58]  T=0: logic function truth table f[{a,b}]
//            T=1: {op[1:0], carry select[1:0]}  op: INC, DEC, ADD, SUB
//   [57:56]  shift-in (S) select: 0, 1, S, not S
//   [55:52]  {direction (1 = right), count[2:0]}, count 0 means no shift
//   [51:41]  A field {M, Z[1:0], addr[7:0]}
//   [40:30]  B field {M, Z[1:0], addr[7:0]}
//   [29:19]  F field {M, Z[1:0], addr[7:0]}
//   [18:0]   successor
//            form 0 : {0, cond1[5:0], x[2:0], cond2[5:0], y[2:0]}
//            form 1 : {1, cond[5:0], x[2:0], M, offset[7:0]}     (two's complement)
//            E set  : {-, cond[5:0], x[2:0], M, count[7:0]}
//            on any : {-, 6'h3F, sel, 2'b00, M, value[7:0]}      sel 0 = Jseg, 1 = Joff
package dll_pkg;

  localparam int unsigned MI_W     = 64;   // microinstruction width
  localparam int unsigned CS_AW    = 12;   // control store address: 4,096 words
  localparam int unsigned SEG_W    = 8;    // 256 segments
  localparam int unsigned OFF_W    = 8;    // of at most 256 words
  localparam int unsigned MM_AW    = 16;   // main memory word address (64-bit words)

  // Z modifier of a bus address field
  typedef enum logic [1:0] {
    Z_SAME  = 2'd0,   // "/"
    Z_INC   = 2'd1,   // "+"
    Z_DEC   = 2'd2,   // "-"
    Z_CONST = 2'd3    // "C" : the eight bits are a constant operand
  } zmod_e;

  typedef struct packed {
    logic       m;
    zmod_e      z;
    logic [7:0] addr;
  } busfield_t;

  typedef enum logic [1:0] {
    OP_INC = 2'd0, OP_DEC = 2'd1, OP_ADD = 2'd2, OP_SUB = 2'd3
  } arith_e;

  // Carry-in and shift-in selection
  typedef enum logic [1:0] {
    BIT_0 = 2'd0, BIT_1 = 2'd1, BIT_FLAG = 2'd2, BIT_NFLAG = 2'd3
  } bitsel_e;

  typedef struct packed {
    logic       e;
    logic       t;
    logic [3:0] fn;
    bitsel_e    ssel;
    logic       sdir;      // 1 = right
    logic [2:0] samt;
    busfield_t  a;
    busfield_t  b;
    busfield_t  f;
    logic [18:0] succ;
  } microinst_t;

  // Successor actions ("x" and "y" codes)
  typedef enum logic [2:0] {
    SX_STEP   = 3'd0,
    SX_SKIP   = 3'd1,
    SX_REPEAT = 3'd2,
    SX_JUMP   = 3'd3,
    SX_CALL   = 3'd4,
    SX_SAVE   = 3'd5,   // Save&Step
    SX_RETURN = 3'd6,
    SX_NONE   = 3'd7    // unused code, treated as Step
  } succ_e;

  // Condition codes
  localparam logic [5:0] C_ALWAYS = 6'd0,  C_NEVER = 6'd1,
                         C_Z      = 6'd2,  C_NZ    = 6'd3,
                         C_N      = 6'd4,  C_NN    = 6'd5,
                         C_C      = 6'd6,  C_NC    = 6'd7,
                         C_V      = 6'd8,  C_NV    = 6'd9,
                         C_U      = 6'd10, C_NU    = 6'd11,
                         C_S      = 6'd12, C_NS    = 6'd13,
                         C_INT    = 6'd14, C_NINT  = 6'd15,
                         C_DMA    = 6'd16, C_NDMA  = 6'd17,
                         C_ONANY  = 6'h3F;

  // Status flags produced by the ALU and shifter
  typedef struct packed {
    logic u;   // underflow: borrow out of DEC / SUB
    logic v;   // signed overflow
    logic n;   // negative result
    logic z;   // zero result
    logic s;   // shift-out bit
    logic c;   // carry (INC/ADD) or borrow (DEC/SUB)
  } flags_t;

  // Bus addresses (A, B and F buses share one map of 256 addresses)
  localparam logic [7:0] BA_LSS_LAST  = 8'h3F;  // 0x00..0x3F local store
  localparam logic [7:0] BA_DUMMY     = 8'h40;
  localparam logic [7:0] BA_STATUS    = 8'h41;
  localparam logic [7:0] BA_SWITCH    = 8'h42;
  localparam logic [7:0] BA_IR        = 8'h43;
  localparam logic [7:0] BA_AMASK     = 8'h44;
  localparam logic [7:0] BA_BMASK     = 8'h45;
  localparam logic [7:0] BA_FMASK     = 8'h46;
  localparam logic [7:0] BA_XMASK     = 8'h47;
  localparam logic [7:0] BA_SEG       = 8'h48;
  localparam logic [7:0] BA_OFF       = 8'h49;
  localparam logic [7:0] BA_FSEG      = 8'h4A;
  localparam logic [7:0] BA_FOFF      = 8'h4B;
  localparam logic [7:0] BA_ST0       = 8'h4C;  // 0x4C..0x50 segment table entry [SEG]
  localparam logic [7:0] BA_ST4       = 8'h50;
  localparam logic [7:0] BA_ZBASE_LO  = 8'h51;
  localparam logic [7:0] BA_ZBASE_HI  = 8'h52;
  localparam logic [7:0] BA_DMA0      = 8'h54;  // 0x54..0x59 DMA channel registers
  localparam logic [7:0] BA_DMA5      = 8'h59;
  localparam logic [7:0] BA_MAR       = 8'h80;  // 0x80..0xBF : {2'b10, ctl[3:0], byte[1:0]}
  localparam logic [7:0] BA_DBR       = 8'hC0;  // 0xC0..0xCF : {4'hC, ctl[3:0]}
  localparam logic [7:0] BA_PC        = 8'hD0;  // 0xD0..0xD3 data, 0xD4..0xD7 data and PC += 2

  // Memory access control, encoded in MAR and DBR addresses: {modify[1:0], op[1:0]}
  localparam logic [1:0] MOD_NONE = 2'd0, MOD_INC = 2'd1, MOD_DEC = 2'd2;
  localparam logic [1:0] MOP_NONE = 2'd0, MOP_READ = 2'd1, MOP_WRITE = 2'd2, MOP_RW = 2'd3;

  // Segment table entry
  typedef struct packed {
    logic              defined;
    logic              resident;
    logic [CS_AW-1:0]  base;     // control store address of word 0
    logic [7:0]        len_m1;   // length minus one
    logic [MM_AW-1:0]  mm_addr;  // main memory word address of the segment image
  } seg_entry_t;

  // DMA modes
  typedef enum logic [1:0] {
    DMA_CS2CS = 2'd0, DMA_MM2CS = 2'd1, DMA_CS2MM = 2'd2, DMA_RSVD = 2'd3
  } dma_mode_e;

endpackage
