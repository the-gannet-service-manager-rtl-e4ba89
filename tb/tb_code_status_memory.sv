// tb_code_status_memory: after reset every chunk must read absent; random
// writes of present flag and length are then read back on both ports
// against a model.
`timescale 1ns/1ps
module tb_code_status_memory;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       wr_en, wr_present, rd0_present, rd1_present;
  logic [6:0] wr_addr, rd0_addr, rd1_addr;
  logic [3:0] wr_len, rd1_len;
  code_status_memory dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_present, .wr_len,
                          .rd0_addr, .rd0_present, .rd1_addr, .rd1_present, .rd1_len);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit         mp [128];
  logic [3:0] ml [128];

  initial begin
    wr_en = 0; wr_present = 0; wr_addr = '0; wr_len = '0; rd0_addr = '0; rd1_addr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      rd0_addr = 7'(a); rd1_addr = 7'(127 - a);
      #1;
      check(!rd0_present && !rd1_present, "absent after reset");
      mp[a] = 0;
    end
    for (int k = 0; k < 800; k++) begin
      int a0, a1;
      @(negedge clk);
      wr_en = 1'($urandom_range(0, 1)); wr_addr = 7'($urandom); wr_present = 1'($urandom);
      wr_len = 4'($urandom_range(1, 8));
      @(posedge clk);
      if (wr_en) begin mp[wr_addr] = wr_present; ml[wr_addr] = wr_len; end
      @(negedge clk);
      wr_en = 0;
      a0 = $urandom_range(0, 127); a1 = $urandom_range(0, 127);
      rd0_addr = 7'(a0); rd1_addr = 7'(a1);
      #1;
      check(rd0_present == mp[a0], "port 0 present");
      check(rd1_present == mp[a1], "port 1 present");
      if (mp[a1]) check(rd1_len == ml[a1], "port 1 length");
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
