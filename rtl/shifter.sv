// Shifter placed after the ALU: shifts the ALU result left or right by 0 to 7 places
// and fills the vacated places with the shift-in bit S. The bit shifted out last is
// returned as the shift-out bit, which a repeated one-place shift uses as its next
// shift-in bit (extended precision shifting). A count of zero passes the value through
// and returns shift-out 0. Direction, count range and fill bit follow the machine's
// shifter field; returning the last bit shifted out is this design's choice.
// Purely combinational.
module shifter #(
  parameter int unsigned W = 8
) (
  input  logic         [W-1:0] d,
  input  logic                 right,
  input  logic         [2:0]   amt,
  input  logic                 sin,
  output logic         [W-1:0] q,
  output logic                 sout
);
  logic [2*W-1:0] ext;
  always_comb begin
    q    = d;
    sout = 1'b0;
    if (amt != 3'd0) begin
      if (right) begin
        ext  = {{W{sin}}, d} >> amt;
        q    = ext[W-1:0];
        sout = d[int'(amt)-1];
      end else begin
        ext  = {d, {W{sin}}} << amt;
        q    = ext[2*W-1:W];
        sout = d[W-int'(amt)];
      end
    end else begin
      ext = '0;
    end
  end
endmodule
