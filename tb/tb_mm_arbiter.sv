// Self-checking test of the main memory arbiter: two masters issue random read and
// write requests to a main memory model; each request must be acknowledged exactly once,
// reads must return the memory model's data, a master that holds the bus keeps it until
// its acknowledge, and simultaneous requests (conflicts) go to master 0 first.
module tb_mm_arbiter;
  import dll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req [2], we [2], ack [2];
  logic [15:0] addr [2];
  logic [63:0] wdata [2];
  logic [7:0]  be [2];
  logic        m_req, m_we, m_ack, conflict;
  logic [15:0] m_addr;
  logic [63:0] m_wdata, m_rdata;
  logic [7:0]  m_be;
  logic [63:0] model [256];
  int checks = 0, failures = 0, done [2], conflicts = 0, first0 = 0;

  mm_arbiter dut (.clk, .rst_n, .req, .we, .addr, .wdata, .be, .ack,
                  .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_ack, .conflict);
  main_memory_model #(.AW(16), .LAT(3)) u_mm (.clk, .req(m_req), .we(m_we), .addr(m_addr),
                  .wdata(m_wdata), .be(m_be), .ack(m_ack), .rdata(m_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  // a master: random requests, held until ack
  for (genvar g = 0; g < 2; g++) begin : g_master
    initial begin
      req[g] = 0; we[g] = 0; addr[g] = 0; wdata[g] = 0; be[g] = 8'hFF; done[g] = 0;
      @(posedge rst_n);
      for (int n = 0; n < 150; n++) begin
        @(negedge clk);
        req[g] = 1; we[g] = $urandom_range(0, 1);
        addr[g] = 16'(g * 128 + $urandom_range(0, 127)); wdata[g] = {$urandom, $urandom};
        @(posedge clk);
        while (!ack[g]) @(posedge clk);
        if (we[g]) model[addr[g][7:0]] = wdata[g];
        else check(m_rdata == model[addr[g][7:0]], $sformatf("read data master %0d", g));
        done[g]++;
        #1 req[g] = 0;
        repeat ($urandom_range(0, 2)) @(posedge clk);
      end
    end
  end

  // grant rules
  logic busy_owner_v;
  logic busy_owner;
  always @(posedge clk) if (rst_n) begin
    if (ack[0] && ack[1]) begin failures++; $display("FAIL: double ack"); end
    if (conflict) conflicts++;
    if (m_req && !busy_owner_v) begin
      busy_owner_v <= !m_ack;
      busy_owner   <= (m_addr >= 16'd128);
      if (conflict) begin checks++; if (m_addr >= 16'd128) begin failures++; $display("FAIL: priority"); end end
    end else if (m_req && busy_owner_v) begin
      checks++;
      if ((m_addr >= 16'd128) != busy_owner) begin failures++; $display("FAIL: bus taken away"); end
      if (m_ack) busy_owner_v <= 1'b0;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    busy_owner_v = 0; busy_owner = 0;
    #1;
    for (int i = 0; i < 256; i++) begin model[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done[0] == 150 && done[1] == 150);
    check(conflicts > 0, $sformatf("conflicts happened (%0d)", conflicts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
