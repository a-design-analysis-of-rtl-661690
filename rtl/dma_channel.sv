// Block transfer (DMA) channel that loads, relocates and stores microprogram segments
// while microprograms keep running. It moves L words from the address in CSADR1 to the
// address in CSADR2 through its one-word buffer CSDBR. One of the two addresses may be a
// main memory address (mode MM2CS: load a segment, CS2MM: store one) or both may be
// control store addresses (CS2CS: relocate a segment within the control store).
//
// Each control store access takes the single control store port for one cycle
// (cs_req high); the processor is held for that cycle. A relocation of m words therefore
// takes 2m control store cycles, and a load or store takes m main memory transfers plus
// m stolen control store cycles. Words are moved in ascending order, so a segment may be
// moved to a lower, overlapping place (compaction).
//
// Registers, written and read through the bus (bus_sel): 0 L (length - 1), 1/2 CSADR1
// low/high, 3/4 CSADR2 low/high, 5 control: writing {mode[1:0], go} starts a transfer,
// reading returns {5'b0, mode[1:0], busy}. Writes other than to the control register
// while busy are ignored. During a transfer CSADR1/CSADR2 advance and L counts down.
// The length and two address registers, the buffer, the three kinds of transfer and
// cycle stealing follow the design; register coding and the control register are this
// design's choices.
module dma_channel
  import dll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // bus access
  input  logic              bus_we,
  input  logic [2:0]        bus_sel,
  input  logic [7:0]        bus_wdata,
  output logic [7:0]        bus_rdata [6],
  output logic              busy,
  // control store port
  output logic              cs_req,
  output logic              cs_we,
  output logic [CS_AW-1:0]  cs_addr,
  output logic [63:0]       cs_wdata,
  input  logic [63:0]       cs_rdata,
  // main memory bus
  output logic              mm_req,
  output logic              mm_we,
  output logic [MM_AW-1:0]  mm_addr,
  output logic [63:0]       mm_wdata,
  output logic [7:0]        mm_be,
  input  logic              mm_ack,
  input  logic [63:0]       mm_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_SRC, S_DST} state_e;

  state_e      state;
  dma_mode_e   mode;
  logic [7:0]  len;
  logic [15:0] a1, a2;
  logic [63:0] csdbr;
  logic        src_mm, dst_mm, step;

  assign src_mm = (mode == DMA_MM2CS);
  assign dst_mm = (mode == DMA_CS2MM);
  assign busy   = (state != S_IDLE);

  always_comb begin
    cs_req   = 1'b0;
    cs_we    = 1'b0;
    cs_addr  = a1[CS_AW-1:0];
    mm_req   = 1'b0;
    mm_we    = 1'b0;
    mm_addr  = a1;
    step     = 1'b0;
    unique case (state)
      S_SRC: if (src_mm) mm_req = 1'b1;
             else        cs_req = 1'b1;
      S_DST: begin
        cs_addr = a2[CS_AW-1:0];
        mm_addr = a2;
        if (dst_mm) begin
          mm_req = 1'b1;
          mm_we  = 1'b1;
          step   = mm_ack;
        end else begin
          cs_req = 1'b1;
          cs_we  = 1'b1;
          step   = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign cs_wdata = csdbr;
  assign mm_wdata = csdbr;
  assign mm_be    = 8'hFF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode  <= DMA_CS2CS;
      len   <= '0;
      a1    <= '0;
      a2    <= '0;
      csdbr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (bus_we) begin
          unique case (bus_sel)
            3'd0: len       <= bus_wdata;
            3'd1: a1[7:0]   <= bus_wdata;
            3'd2: a1[15:8]  <= bus_wdata;
            3'd3: a2[7:0]   <= bus_wdata;
            3'd4: a2[15:8]  <= bus_wdata;
            3'd5: begin
              mode <= dma_mode_e'(bus_wdata[2:1]);
              if (bus_wdata[0] && bus_wdata[2:1] != DMA_RSVD) state <= S_SRC;
            end
            default: ;
          endcase
        end
        S_SRC: begin
          if (src_mm) begin
            if (mm_ack) begin
              csdbr <= mm_rdata;
              state <= S_DST;
            end
          end else begin
            csdbr <= cs_rdata;
            state <= S_DST;
          end
        end
        S_DST: if (step) begin
          a1 <= a1 + 16'd1;
          a2 <= a2 + 16'd1;
          if (len == 8'd0) state <= S_IDLE;
          else begin
            len   <= len - 8'd1;
            state <= S_SRC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_rdata[0] = len;
    bus_rdata[1] = a1[7:0];
    bus_rdata[2] = a1[15:8];
    bus_rdata[3] = a2[7:0];
    bus_rdata[4] = a2[15:8];
    bus_rdata[5] = {5'b0, mode, busy};
  end

  // A relocation never uses main memory, and a word never goes from memory to memory
  a_mm_side : assert property (@(posedge clk) disable iff (!rst_n) mm_req |-> mode != DMA_CS2CS);
endmodule
