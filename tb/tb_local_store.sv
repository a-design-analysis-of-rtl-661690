// Self-checking test of the local store: reset clears it, random writes are read back
// on both read ports against a model array, and reading and writing the same word in one
// cycle returns the old value.
module tb_local_store;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] ra, rb, wa;
  logic [7:0] da, db, wd;
  logic we;
  logic [7:0] model [64];
  int checks = 0, failures = 0;

  local_store #(.WORDS(64)) dut (.clk, .rst_n, .ra_addr(ra), .ra_data(da), .rb_addr(rb),
                                 .rb_data(db), .we, .wa_addr(wa), .wa_data(wd));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    for (int i = 0; i < 64; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ra = 6'($urandom); rb = 6'($urandom); we = $urandom_range(0, 1);
      wa = (n % 7 == 0) ? ra : 6'($urandom); wd = 8'($urandom);
      #1;
      checks++;
      if (da !== model[ra] || db !== model[rb]) begin
        failures++;
        if (failures < 10) $display("FAIL ra=%0d %h/%h rb=%0d %h/%h", ra, da, model[ra], rb, db, model[rb]);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
