// tb_data_memory: random writes on both write ports and reads on the core
// port against an array model, including both write ports hitting the same
// word in one cycle (port A must win) and the one-cycle read latency.
`timescale 1ns/1ps
module tb_data_memory;
  import gannet_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       a_wr_en, b_wr_en, c_rd_en;
  logic [9:0] a_addr, b_addr, c_addr;
  word_t      a_data, b_data, c_data;
  data_memory dut (.clk, .a_wr_en, .a_addr, .a_data, .b_wr_en, .b_addr, .b_data,
                   .c_rd_en, .c_addr, .c_data);

  int checks = 0, failures = 0, n_same = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t model [1024];

  initial begin
    a_wr_en = 0; b_wr_en = 0; c_rd_en = 0;
    a_addr = '0; b_addr = '0; c_addr = '0; a_data = '0; b_data = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      b_wr_en = 1; b_addr = 10'(a); b_data = $urandom; model[a] = b_data;
    end
    for (int k = 0; k < 1500; k++) begin
      int ra;
      @(negedge clk);
      a_wr_en = 1'($urandom_range(0, 1)); a_addr = 10'($urandom_range(0, 63)); a_data = $urandom;
      b_wr_en = 1'($urandom_range(0, 1)); b_addr = 10'($urandom_range(0, 63)); b_data = $urandom;
      ra = $urandom_range(0, 63);
      c_rd_en = 1; c_addr = 10'(ra);
      @(negedge clk);
      check(c_data == model[ra], $sformatf("read %0d", ra));
      if (a_wr_en && b_wr_en && a_addr == b_addr) n_same++;
      if (b_wr_en) model[b_addr] = b_data;
      if (a_wr_en) model[a_addr] = a_data;
      a_wr_en = 0; b_wr_en = 0; c_rd_en = 0;
    end
    check(n_same > 0, "both write ports on one word happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
