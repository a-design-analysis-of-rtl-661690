// Self-checking test of the memory port with a main memory model (latency 3):
// MAR loaded byte by byte with a read started on the last byte (a miss: DBR is valid
// only after the memory cycle, busy meanwhile), increment-and-read and
// decrement-and-read within the cached line (hits: no wait), a read-write reference
// that writes because DBR is written in the same cycle, write-through to memory,
// MAR modification without access, a fill that arrives while an unrelated
// microinstruction completes, and a random run of reads and writes against a byte
// model of memory. Miss latency and zero-wait hits are checked by cycle counts.
module tb_memory_port;
  import dll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        commit, mar_we, dbr_we, ctl_v, busy;
  logic [1:0]  mar_byte;
  logic [7:0]  wdata, dbr;
  logic [3:0]  ctl;
  logic [31:0] mar;
  logic        mm_req, mm_we, mm_ack;
  logic [15:0] mm_addr;
  logic [63:0] mm_wdata, mm_rdata;
  logic [7:0]  mm_be;
  int checks = 0, failures = 0;

  memory_port dut (.clk, .rst_n, .commit, .mar_we, .mar_byte, .dbr_we, .wdata, .ctl_v, .ctl,
                   .mar, .dbr, .busy, .mm_req, .mm_we, .mm_addr, .mm_wdata, .mm_be,
                   .mm_ack, .mm_rdata);
  main_memory_model #(.AW(16), .LAT(3)) u_mm (.clk, .req(mm_req), .we(mm_we), .addr(mm_addr),
                   .wdata(mm_wdata), .be(mm_be), .ack(mm_ack), .rdata(mm_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] mbyte(input logic [31:0] a);
    return u_mm.mem[a[18:3]][8*a[2:0] +: 8];
  endfunction

  // one microcycle; returns the number of cycles until the port is idle again
  task automatic cyc(input logic mw, input logic [1:0] mb, input logic dw, input logic [7:0] wd,
                     input logic cv, input logic [3:0] c, output int wait_cycles);
    @(negedge clk);
    mar_we = mw; mar_byte = mb; dbr_we = dw; wdata = wd; ctl_v = cv; ctl = c; commit = 1;
    @(posedge clk);
    #1;
    commit = 0; mar_we = 0; dbr_we = 0; ctl_v = 0;
    wait_cycles = 0;
    // meanwhile other microinstructions (not touching MAR or DBR) may complete
    while (busy) begin
      @(negedge clk); commit = 1'($urandom_range(0, 1));
      @(posedge clk); #1 commit = 0;
      wait_cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    logic [31:0] a;
    commit = 0; mar_we = 0; dbr_we = 0; ctl_v = 0; ctl = 0; wdata = 0; mar_byte = 0;
    #1;
    for (int i = 0; i < 64; i++) u_mm.mem[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load MAR = 0x00000013, read on the last byte
    cyc(1, 2'd1, 0, 8'h00, 0, 4'h0, w);
    cyc(1, 2'd2, 0, 8'h00, 0, 4'h0, w);
    cyc(1, 2'd3, 0, 8'h00, 0, 4'h0, w);
    cyc(1, 2'd0, 0, 8'h13, 1, {MOD_NONE, MOP_READ}, w);
    check(mar == 32'h13, "MAR loaded by bytes");
    check(w >= 3 && w <= 4, $sformatf("miss waits for the memory cycle (%0d)", w));
    check(dbr == mbyte(32'h13), "DBR after miss");
    // increment and read: hit
    cyc(0, 0, 0, 0, 1, {MOD_INC, MOP_READ}, w);
    check(w == 0 && mar == 32'h14 && dbr == mbyte(32'h14), "increment-read hits without wait");
    cyc(0, 0, 0, 0, 1, {MOD_DEC, MOP_READ}, w);
    check(w == 0 && mar == 32'h13 && dbr == mbyte(32'h13), "decrement-read hits");
    // read-write with DBR written: a write
    cyc(0, 0, 1, 8'h5A, 1, {MOD_NONE, MOP_RW}, w);
    check(w >= 3 && w <= 4 && mbyte(32'h13) == 8'h5A, $sformatf("read-write with DBR written is a write w=%0d b=%h", w, mbyte(32'h13)));
    cyc(0, 0, 0, 0, 1, {MOD_NONE, MOP_RW}, w);
    check(w == 0 && dbr == 8'h5A, "line updated by the write; read-write alone reads");
    cyc(0, 0, 0, 0, 1, {MOD_INC, MOP_NONE}, w);
    check(mar == 32'h14 && dbr == 8'h5A && w == 0, "increment only");
    // leave the line
    cyc(1, 2'd0, 0, 8'h20, 1, {MOD_NONE, MOP_READ}, w);
    check(w >= 3 && w <= 4 && dbr == mbyte(32'h20), $sformatf("new line misses w=%0d %h %h", w, dbr, mbyte(32'h20)));
    // random run
    a = 32'h20;
    for (int n = 0; n < 600; n++) begin
      int kind;
      logic [7:0] v;
      kind = $urandom_range(0, 3);
      v = 8'($urandom);
      case (kind)
        0: begin cyc(0, 0, 0, 0, 1, {MOD_INC, MOP_READ}, w); a++; end
        1: begin cyc(0, 0, 0, 0, 1, {MOD_DEC, MOP_READ}, w); a--; end
        2: begin cyc(0, 0, 1, v, 1, {MOD_INC, MOP_WRITE}, w); a++;
                 check(mbyte(a) == v, "random write"); end
        default: begin a = 32'($urandom_range(0, 511)); cyc(1, 2'd0, 0, a[7:0], 0, 4'h0, w);
                       cyc(1, 2'd1, 0, 8'(a[15:8]), 1, {MOD_NONE, MOP_READ}, w); end
      endcase
      check(mar == a, "random MAR");
      if (kind != 2) check(dbr == mbyte(a), $sformatf("random read at %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
