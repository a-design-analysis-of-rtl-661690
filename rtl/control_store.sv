// Writable control store: 4,096 words of 64 bits holding the resident microprogram
// segments. It has one port. The microsequencer reads the next microinstruction through
// it every cycle; the DMA channel takes the port for a cycle whenever it loads,
// relocates or stores a word ("cycle stealing"), and the processor waits for that cycle.
// Reads are asynchronous (the word at addr is on rdata in the same cycle, the
// microinstruction register that captures it lives in the microsequencer); a write
// takes place at the clock edge when we is high.
// Size and word width follow the machine's control store, which is made read-write so
// that segments can be loaded; the contents are not reset, they are loaded by the DMA
// channel or, before reset is released, by whatever initialises the machine.
module control_store
  import dll_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
