// tb_code_memory: writes random words at random addresses and reads them
// back against an array model; checks the one-cycle read latency and that
// the read data holds while rd_en is low.
`timescale 1ns/1ps
module tb_code_memory;
  import gannet_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       wr_en, rd_en;
  logic [9:0] wr_addr, rd_addr;
  word_t      wr_data, rd_data;
  code_memory dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t model [1024];

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = $urandom; model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 600; k++) begin
      automatic int a = $urandom_range(0, 1023);
      word_t exp;
      @(negedge clk);
      // overwrite some word while reading another
      wr_en = 1'($urandom_range(0, 1)); wr_addr = 10'($urandom); wr_data = $urandom;
      rd_en = 1; rd_addr = 10'(a);
      @(negedge clk);
      // a read of the word being written returns the old contents
      exp = model[a];
      if (wr_en) model[wr_addr] = wr_data;
      check(rd_data == exp, $sformatf("read %0d", a));
      rd_en = 0; wr_en = 0;
      @(negedge clk);
      check(rd_data == exp, "read data holds without rd_en");
    end
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
