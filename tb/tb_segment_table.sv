// Self-checking test of the segment table: reset contents (segment 0 defined and
// resident, others undefined), byte writes through the bus port, read-back of all five
// bytes, and the lookup port against a model of all 256 entries.
module tb_segment_table;
  import dll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] lk_seg, idx, wdata;
  seg_entry_t lk_entry;
  logic we;
  logic [2:0] bsel;
  logic [7:0] rdata [5];
  seg_entry_t model [256];
  int checks = 0, failures = 0;

  segment_table dut (.clk, .rst_n, .lk_seg, .lk_entry, .bus_idx(idx), .bus_we(we),
                     .bus_byte(bsel), .bus_wdata(wdata), .bus_rdata(rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; idx = 0; bsel = 0; wdata = 0; lk_seg = 0;
    for (int i = 0; i < 256; i++) model[i] = '0;
    model[0].defined = 1; model[0].resident = 1; model[0].len_m1 = 8'hFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      lk_seg = 8'(i); #1;
      check(lk_entry == model[i], $sformatf("reset entry %0d", i));
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      idx = 8'($urandom_range(0, 15)); bsel = 3'($urandom_range(0, 4)); wdata = 8'($urandom);
      we = 1;
      @(posedge clk);
      case (bsel)
        3'd0: model[idx].base[7:0] = wdata;
        3'd1: begin model[idx].defined = wdata[7]; model[idx].resident = wdata[6];
                    model[idx].base[11:8] = wdata[3:0]; end
        3'd2: model[idx].len_m1 = wdata;
        3'd3: model[idx].mm_addr[7:0] = wdata;
        default: model[idx].mm_addr[15:8] = wdata;
      endcase
      #1 we = 0;
      lk_seg = 8'($urandom_range(0, 15));
      #1;
      check(lk_entry == model[lk_seg], $sformatf("lookup %0d", lk_seg));
      check(rdata[0] == model[idx].base[7:0] &&
            rdata[1] == {model[idx].defined, model[idx].resident, 2'b00, model[idx].base[11:8]} &&
            rdata[2] == model[idx].len_m1 && rdata[3] == model[idx].mm_addr[7:0] &&
            rdata[4] == model[idx].mm_addr[15:8], $sformatf("bus bytes %0d", idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
