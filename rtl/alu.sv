// Eight-bit arithmetic and logic unit of the microprocessor data structure.
//
// Arithmetic (t = 1): INC adds the carry-in to A, DEC subtracts it from A, ADD forms
// A + B + carry, SUB forms A - B - carry. Logic (t = 0): any of the sixteen functions of
// two variables, selected by a four-bit truth table fn, where result bit i is
// fn[{a[i], b[i]}] (so 4'b1100 is A, 4'b1010 is B, 4'b1000 is AB, 4'b0110 is A xor B).
// The operation set, the carry in/out and the zero, negative, overflow and underflow
// conditions are as described for the machine; the truth-table coding of fn and the
// meaning of carry for DEC/SUB (borrow) are this design's choices.
// Purely combinational: the result is ready in the same microcycle.
module alu
  import dll_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         t,      // 1 = arithmetic
  input  logic [3:0]   fn,     // logic truth table, or {op[1:0], unused[1:0]}
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] y,
  output logic         cout,   // carry (INC/ADD) or borrow (DEC/SUB); 0 for logic
  output logic         ovf,    // signed overflow
  output logic         unf,    // borrow out of DEC/SUB
  output logic         zero,
  output logic         neg
);
  arith_e     op;
  logic [W:0] wide;

  always_comb begin
    op   = arith_e'(fn[3:2]);
    wide = '0;
    ovf  = 1'b0;
    unf  = 1'b0;
    if (t) begin
      unique case (op)
        OP_INC: begin
          wide = {1'b0, a} + {{W{1'b0}}, cin};
          ovf  = ~a[W-1] & wide[W-1];
        end
        OP_DEC: begin
          wide = {1'b0, a} - {{W{1'b0}}, cin};
          ovf  = a[W-1] & ~wide[W-1];
          unf  = wide[W];
        end
        OP_ADD: begin
          wide = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
          ovf  = (a[W-1] == b[W-1]) && (wide[W-1] != a[W-1]);
        end
        OP_SUB: begin
          wide = {1'b0, a} - {1'b0, b} - {{W{1'b0}}, cin};
          ovf  = (a[W-1] != b[W-1]) && (wide[W-1] != a[W-1]);
          unf  = wide[W];
        end
      endcase
      y    = wide[W-1:0];
      cout = wide[W];
    end else begin
      for (int i = 0; i < W; i++) y[i] = fn[{a[i], b[i]}];
      cout = 1'b0;
    end
    zero = (y == '0);
    neg  = y[W-1];
  end
endmodule
