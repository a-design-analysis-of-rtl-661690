// Helpers for the testbenches: build 64-bit microinstructions from their fields,
// following the layout described in dll_pkg.
package mi_asm_pkg;
  import dll_pkg::*;

  // logic function truth tables, bit {a,b}
  localparam logic [3:0] L_ZERO = 4'b0000, L_ONE = 4'b1111, L_A = 4'b1100, L_B = 4'b1010,
                         L_NA = 4'b0011, L_AND = 4'b1000, L_OR = 4'b1110, L_XOR = 4'b0110;

  function automatic logic [10:0] fa(input logic [7:0] addr, input zmod_e z = Z_SAME,
                                     input logic m = 1'b0);
    return {m, z, addr};
  endfunction
  function automatic logic [10:0] fc(input logic [7:0] k);   // constant operand
    return {1'b0, Z_CONST, k};
  endfunction

  // successor encodings
  function automatic logic [18:0] s_step();
    return {1'b0, C_NEVER, SX_STEP, C_NEVER, SX_STEP};
  endfunction
  function automatic logic [18:0] s2(input logic [5:0] c1, input succ_e x,
                                     input logic [5:0] c2 = C_NEVER, input succ_e y = SX_STEP);
    return {1'b0, c1, x, c2, y};
  endfunction
  function automatic logic [18:0] s_do(input succ_e x);
    return {1'b0, C_ALWAYS, x, C_NEVER, SX_STEP};
  endfunction
  function automatic logic [18:0] s_off(input logic [5:0] c, input succ_e x,
                                        input logic [7:0] off, input logic m = 1'b0);
    return {1'b1, c, x, m, off};
  endfunction
  function automatic logic [18:0] s_cnt(input logic [5:0] c, input succ_e x,
                                        input logic [7:0] cnt, input logic m = 1'b0);
    return {1'b0, c, x, m, cnt};
  endfunction
  function automatic logic [18:0] s_jseg(input logic [7:0] v, input logic m = 1'b0);
    return {1'b0, C_ONANY, 1'b0, 2'b00, m, v};
  endfunction
  function automatic logic [18:0] s_joff(input logic [7:0] v, input logic m = 1'b0);
    return {1'b0, C_ONANY, 1'b1, 2'b00, m, v};
  endfunction

  // logic operation: F <= fn(A, B), optional shift
  function automatic logic [63:0] mi_l(input logic [3:0] fn, input logic [10:0] a,
                                       input logic [10:0] b, input logic [10:0] f,
                                       input logic [18:0] s,
                                       input logic sdir = 1'b0, input logic [2:0] samt = 3'd0,
                                       input logic [1:0] ssel = 2'd0, input logic e = 1'b0);
    return {e, 1'b0, fn, ssel, sdir, samt, a, b, f, s};
  endfunction
  // arithmetic operation
  function automatic logic [63:0] mi_a(input arith_e op, input bitsel_e c, input logic [10:0] a,
                                       input logic [10:0] b, input logic [10:0] f,
                                       input logic [18:0] s, input logic e = 1'b0);
    return {e, 1'b1, op, c, 2'd0, 1'b0, 3'd0, a, b, f, s};
  endfunction
  // F <= A (move), with successor
  function automatic logic [63:0] mv(input logic [10:0] a, input logic [10:0] f,
                                     input logic [18:0] s = s_step());
    return mi_l(L_A, a, fa(BA_DUMMY), f, s);
  endfunction

  function automatic logic [7:0] mar_a(input int b, input logic [1:0] md = MOD_NONE,
                                       input logic [1:0] op = MOP_NONE);
    return {2'b10, md, op, 2'(b)};
  endfunction
  function automatic logic [7:0] dbr_a(input logic [1:0] md = MOD_NONE,
                                       input logic [1:0] op = MOP_NONE);
    return {4'hC, md, op};
  endfunction
endpackage
