// Self-checking test of the shifter: every direction, count 0..7 and fill bit on
// random data, against a bit-by-bit reference, including the shift-out bit.
module tb_shifter;
  logic [7:0] d, q;
  logic       right, sin, sout;
  logic [2:0] amt;
  int checks = 0, failures = 0;

  shifter #(.W(8)) dut (.d, .right, .amt, .sin, .q, .sout);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] e; logic es;
      d = 8'($urandom); right = $urandom_range(0, 1); amt = 3'($urandom); sin = $urandom_range(0, 1);
      #1;
      e = d; es = 1'b0;
      for (int k = 0; k < amt; k++) begin
        if (right) begin es = e[0]; e = {sin, e[7:1]}; end
        else       begin es = e[7]; e = {e[6:0], sin}; end
      end
      checks++;
      if (q !== e || sout !== es) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h r=%b n=%0d s=%b : %h/%h %b/%b", d, right, amt, sin, q, e, sout, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
