// Local store scratchpad: the general registers of the machine, reached through the
// bus address fields. Two asynchronous read ports feed the A and B buses in the same
// microcycle and one synchronous write port takes the F (result) bus at the end of the
// cycle. Reset clears every word. The scratchpad and its use as the general registers
// are described for the machine; its size (64 bytes) is this design's choice, the
// bus address space leaving room for the other registers.
module local_store #(
  parameter int unsigned WORDS = 64,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra_addr,
  output logic [W-1:0]  ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [W-1:0]  rb_data,
  input  logic          we,
  input  logic [AW-1:0] wa_addr,
  input  logic [W-1:0]  wa_data
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[wa_addr] <= wa_data;
    end
  end

  assign ra_data = mem[ra_addr];
  assign rb_data = mem[rb_addr];
endmodule
