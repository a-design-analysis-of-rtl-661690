// Self-checking test of the ALU: random operands for all four arithmetic operations
// and all sixteen logic functions, compared with a reference computed here in integer
// arithmetic, including carry/borrow, overflow, underflow, zero and negative.
module tb_alu;
  import dll_pkg::*;
  logic       t, cin, cout, ovf, unf, zero, neg;
  logic [3:0] fn;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  alu #(.W(8)) dut (.t, .fn, .a, .b, .cin, .y, .cout, .ovf, .unf, .zero, .neg);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int ia, ib, ic, r, sa, sb, sr;
      logic [7:0] ey;
      logic ec, ev, eu;
      t = $urandom_range(0, 1); fn = 4'($urandom); a = 8'($urandom); b = 8'($urandom);
      cin = $urandom_range(0, 1);
      if (n < 4) begin a = 8'hFF; b = 8'h01; t = 1'b1; fn = {2'(n), 2'b00}; cin = 1'b1; end
      #1;
      ia = a; ib = b; ic = cin; sa = $signed(a); sb = $signed(b);
      ev = 1'b0; eu = 1'b0; ec = 1'b0;
      if (t) begin
        case (fn[3:2])
          2'd0: begin r = ia + ic;      sr = sa + ic;      ec = r > 255; end
          2'd1: begin r = ia - ic;      sr = sa - ic;      ec = r < 0; eu = r < 0; end
          2'd2: begin r = ia + ib + ic; sr = sa + sb + ic; ec = r > 255; end
          default: begin r = ia - ib - ic; sr = sa - sb - ic; ec = r < 0; eu = r < 0; end
        endcase
        ey = 8'(r);
        ev = (sr > 127) || (sr < -128);
      end else begin
        for (int i = 0; i < 8; i++) ey[i] = fn[{a[i], b[i]}];
      end
      checks++;
      if (y !== ey || cout !== ec || ovf !== ev || unf !== eu || zero !== (ey == 0) || neg !== ey[7]) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%b fn=%h a=%h b=%h c=%b : y=%h/%h c=%b/%b v=%b/%b u=%b/%b",
                   t, fn, a, b, cin, y, ey, cout, ec, ovf, ev, unf, eu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
