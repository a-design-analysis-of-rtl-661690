// Segment table: the linkage memory that maps a segment number to the place of the
// segment in the control store. Entry SEG holds the defined and resident flags, the
// control store address of the segment's first word, its length and the main memory
// address of its image (the last two are what the define, move and status operations and
// the missing-segment fault handler need).
//
// Lookup port: lk_seg selects an entry and lk_entry shows it in the same cycle; the
// microsequencer adds the offset to the base and checks the flags. Bus port: the entry
// selected by the SEG register (bus_idx) is read and written one byte at a time:
//   byte 0  base[7:0]
//   byte 1  {defined, resident, 2'b00, base[11:8]}
//   byte 2  length - 1
//   byte 3  main memory word address [7:0]
//   byte 4  main memory word address [15:8]
// Writes take effect at the clock edge. After reset segment 0 (the fault handler) is
// defined and resident at control store address 0 with the full 256-word length; all
// other segments are undefined.
// 256 entries indexed by segment number follow the design; the entry layout and the
// reset contents are this design's choices.
module segment_table
  import dll_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup port (successor function)
  input  logic [SEG_W-1:0]  lk_seg,
  output seg_entry_t        lk_entry,
  // bus port
  input  logic [SEG_W-1:0]  bus_idx,
  input  logic              bus_we,
  input  logic [2:0]        bus_byte,
  input  logic [7:0]        bus_wdata,
  output logic [7:0]        bus_rdata [5]
);
  seg_entry_t tbl [ENTRIES];
  seg_entry_t cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
      tbl[0].defined  <= 1'b1;
      tbl[0].resident <= 1'b1;
      tbl[0].len_m1   <= 8'hFF;
    end else if (bus_we) begin
      unique case (bus_byte)
        3'd0: tbl[bus_idx].base[7:0]     <= bus_wdata;
        3'd1: begin
          tbl[bus_idx].defined           <= bus_wdata[7];
          tbl[bus_idx].resident          <= bus_wdata[6];
          tbl[bus_idx].base[CS_AW-1:8]   <= bus_wdata[CS_AW-9:0];
        end
        3'd2: tbl[bus_idx].len_m1        <= bus_wdata;
        3'd3: tbl[bus_idx].mm_addr[7:0]  <= bus_wdata;
        3'd4: tbl[bus_idx].mm_addr[15:8] <= bus_wdata;
        default: ;
      endcase
    end
  end

  assign lk_entry = tbl[lk_seg];
  assign cur      = tbl[bus_idx];

  always_comb begin
    bus_rdata[0] = cur.base[7:0];
    bus_rdata[1] = {cur.defined, cur.resident, 2'b00, cur.base[CS_AW-1:8]};
    bus_rdata[2] = cur.len_m1;
    bus_rdata[3] = cur.mm_addr[7:0];
    bus_rdata[4] = cur.mm_addr[15:8];
  end
endmodule
