// Behavioural model of main memory on the 64-bit request/acknowledge bus: a request
// is held until the acknowledge, which comes LAT cycles after the request is first seen;
// writes honour the byte enables, read data come with the acknowledge.
module main_memory_model #(
  parameter int unsigned AW  = 16,
  parameter int unsigned LAT = 4
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   wdata,
  input  logic [7:0]    be,
  output logic          ack,
  output logic [63:0]   rdata
);
  logic [63:0] mem [2**AW];
  int unsigned cnt = 0;
  int unsigned reads = 0, writes = 0;

  initial begin
    ack = 1'b0;
    rdata = '0;
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (cnt + 1 >= LAT) begin
        cnt <= 0;
        ack <= 1'b1;
        if (we) begin
          for (int i = 0; i < 8; i++) if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
          writes <= writes + 1;
        end else begin
          rdata <= mem[addr];
          reads <= reads + 1;
        end
      end else cnt <= cnt + 1;
    end
  end
endmodule
