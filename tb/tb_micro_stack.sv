// Self-checking test of the return stack: random pushes and pops against a queue
// model, the top of stack after each operation, and the sticky overflow and underflow
// flags when the 16-entry stack is over-filled and then over-emptied.
module tb_micro_stack;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push, pop, empty, ovf, unf;
  logic [15:0] din, top;
  logic [15:0] q [$];
  int checks = 0, failures = 0;

  micro_stack #(.DEPTH(16)) dut (.clk, .rst_n, .push, .pop, .din, .top, .empty,
                                 .overflow(ovf), .underflow(unf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !ovf && !unf, "empty after reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      push = 0; pop = 0;
      if (q.size() == 0 || (q.size() < 16 && $urandom_range(0, 1))) begin
        push = 1; din = 16'($urandom);
      end else pop = 1;
      @(posedge clk);
      if (push) q.push_back(din); else void'(q.pop_back());
      #1;
      push = 0; pop = 0;
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() != 0) check(top == q[$], $sformatf("top %h/%h", top, q[$]));
    end
    check(!ovf && !unf, "no overflow within depth");
    // overfill
    while (q.size() > 0) begin @(negedge clk); pop = 1; @(posedge clk); void'(q.pop_back()); #1 pop = 0; end
    for (int i = 0; i < 17; i++) begin @(negedge clk); push = 1; din = 16'(i); @(posedge clk); #1 push = 0; end
    check(ovf, "overflow after 17 pushes");
    check(top == 16'd16, "newest entry on top");
    for (int i = 0; i < 17; i++) begin @(negedge clk); pop = 1; @(posedge clk); #1 pop = 0; end
    check(unf, "underflow after popping past empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
