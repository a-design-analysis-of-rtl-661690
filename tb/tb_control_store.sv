// Self-checking test of the control store: random 64-bit words written at random
// addresses over the whole 4,096-word range are read back against a model, and a read
// in the cycle of a write shows the old word.
module tb_control_store;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [11:0] addr;
  logic        we;
  logic [63:0] wdata, rdata;
  logic [63:0] model [int];
  int checks = 0, failures = 0;

  control_store dut (.clk, .addr, .we, .wdata, .rdata);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr = (n < 8) ? 12'(4095 - n) : 12'($urandom);
      we = (n < 8) || ($urandom_range(0, 2) != 0);
      wdata = {$urandom, $urandom};
      #1;
      if (model.exists(addr)) begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%h %h/%h", addr, rdata, model[addr]);
        end
      end
      @(posedge clk);
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
