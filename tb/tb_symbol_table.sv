// tb_symbol_table: after reset every slot must read ABSENT; slots set at
// random must read PRESENT from the next cycle on and the others stay
// ABSENT; a second reset clears them all again.
`timescale 1ns/1ps
module tb_symbol_table;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       set_en, rd_present;
  logic [6:0] set_addr, rd_addr;
  symbol_table dut (.clk, .rst_n, .set_en, .set_addr, .rd_addr, .rd_present);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit m [128];

  task automatic sweep(input string tag);
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      rd_addr = 7'(a);
      #1;
      check(rd_present == m[a], $sformatf("%s: slot %0d", tag, a));
    end
  endtask

  initial begin
    set_en = 0; set_addr = '0; rd_addr = '0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    sweep("after reset");
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      set_en = 1; set_addr = 7'($urandom);
      rd_addr = set_addr;
      #1;
      check(rd_present == m[set_addr], "not present before the edge");
      @(posedge clk);
      m[set_addr] = 1;
      @(negedge clk);
      set_en = 0;
      #1;
      check(rd_present, "present after the edge");
    end
    sweep("after sets");
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (m[i]) m[i] = 0;
    sweep("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
