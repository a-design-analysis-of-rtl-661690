// Return stack of the microsequencer. Call pushes the segment-offset address of the
// word after the call, Save&Step pushes the current address, Return pops. Entries are
// kept in segment-offset form, not as absolute control store addresses, so that a
// segment may be relocated between the call and the return.
// Push and pop act at the clock edge; top shows the newest entry combinationally.
// Pushing a full stack overwrites the oldest entry (the pointer wraps) and sets the
// sticky overflow flag; popping an empty one sets the sticky underflow flag.
// The stack and its segment-offset contents follow the design; its depth (16) and the
// wrap-around behaviour are this design's choices.
module micro_stack
  import dll_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = SEG_W + OFF_W,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  output logic [W-1:0] top,
  output logic         empty,
  output logic         overflow,
  output logic         underflow
);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] sp;        // next free slot
  logic [PW:0]   count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp        <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      mem[sp] <= din;
      sp      <= sp + 1'b1;
      if (count == (PW+1)'(DEPTH)) overflow <= 1'b1;
      else                         count    <= count + 1'b1;
    end else if (pop) begin
      sp <= sp - 1'b1;
      if (count == '0) underflow <= 1'b1;
      else             count     <= count - 1'b1;
    end
  end

  assign top   = mem[sp - 1'b1];
  assign empty = (count == '0);

  // A microinstruction never pushes and pops in the same cycle
  a_push_pop : assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
endmodule
