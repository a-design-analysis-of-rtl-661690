// Self-checking test of the DMA channel with a main memory model and a control store
// model: a load of 8 words from main memory (8 stolen control store cycles), a relocation
// of 8 words within the control store to a lower overlapping place (2m = 16 stolen
// cycles), a store of 5 words to main memory (5 stolen cycles), register read-back, the
// busy flag, and that register writes during a transfer are ignored.
module tb_dma_channel;
  import dll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        bus_we, busy, cs_req, cs_we, mm_req, mm_we, mm_ack;
  logic [2:0]  bus_sel;
  logic [7:0]  bus_wdata, mm_be;
  logic [7:0]  bus_rdata [6];
  logic [11:0] cs_addr;
  logic [63:0] cs_wdata, cs_rdata, mm_wdata, mm_rdata;
  logic [15:0] mm_addr;
  logic [63:0] csm [4096];
  logic [63:0] exp_cs [4096];
  int checks = 0, failures = 0, steals = 0;

  dma_channel dut (.clk, .rst_n, .bus_we, .bus_sel, .bus_wdata, .bus_rdata, .busy,
                   .cs_req, .cs_we, .cs_addr, .cs_wdata, .cs_rdata,
                   .mm_req, .mm_we, .mm_addr, .mm_wdata, .mm_be, .mm_ack, .mm_rdata);
  main_memory_model #(.AW(16), .LAT(4)) u_mm (.clk, .req(mm_req), .we(mm_we), .addr(mm_addr),
                   .wdata(mm_wdata), .be(mm_be), .ack(mm_ack), .rdata(mm_rdata));

  assign cs_rdata = csm[cs_addr];
  always @(posedge clk) begin
    if (cs_req && cs_we) csm[cs_addr] <= cs_wdata;
    if (cs_req) steals++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int sel, input logic [7:0] v);
    @(negedge clk); bus_we = 1; bus_sel = 3'(sel); bus_wdata = v;
    @(posedge clk); #1 bus_we = 0;
  endtask

  task automatic run(input logic [7:0] len, input logic [15:0] a1, input logic [15:0] a2,
                     input dma_mode_e mode, output int st);
    wr(0, len); wr(1, a1[7:0]); wr(2, a1[15:8]); wr(3, a2[7:0]); wr(4, a2[15:8]);
    check(bus_rdata[0] == len && bus_rdata[1] == a1[7:0] && bus_rdata[4] == a2[15:8], "register read-back");
    steals = 0;
    wr(5, {5'b0, mode, 1'b1});
    check(busy && bus_rdata[5][0], "busy after go");
    wr(0, 8'h00);                          // ignored while busy
    while (busy) @(posedge clk);
    #1;
    check(bus_rdata[5] == {5'b0, mode, 1'b0}, "idle status");
    check({bus_rdata[2], bus_rdata[1]} == a1 + 16'(len) + 16'd1, "CSADR1 advanced");
    st = steals;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st;
    bus_we = 0; bus_sel = 0; bus_wdata = 0;
    #1;
    for (int i = 0; i < 4096; i++) begin csm[i] = {32'hC5C5_0000, 32'(i)}; exp_cs[i] = csm[i]; end
    for (int i = 0; i < 16; i++) u_mm.mem[16'h0300 + i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load 8 words from main memory 0x0300 to control store 0x120
    run(8'd7, 16'h0300, 16'h0120, DMA_MM2CS, st);
    for (int i = 0; i < 8; i++) exp_cs[12'h120 + i] = u_mm.mem[16'h0300 + i];
    check(st == 8, $sformatf("load steals m cycles (%0d)", st));
    // relocate them down to 0x11C (overlapping)
    run(8'd7, 16'h0120, 16'h011C, DMA_CS2CS, st);
    for (int i = 0; i < 8; i++) exp_cs[12'h11C + i] = u_mm.mem[16'h0300 + i];
    check(st == 16, $sformatf("relocation steals 2m cycles (%0d)", st));
    // store 5 words to main memory 0x0400
    run(8'd4, 16'h011C, 16'h0400, DMA_CS2MM, st);
    check(st == 5, $sformatf("store steals m cycles (%0d)", st));
    for (int i = 0; i < 5; i++) check(u_mm.mem[16'h0400 + i] == u_mm.mem[16'h0300 + i], "stored word");
    check(u_mm.mem[16'h0405] == 64'h0, "nothing stored past the block");
    for (int i = 12'h100; i < 12'h140; i++) check(csm[i] == exp_cs[i], $sformatf("control store %h", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
