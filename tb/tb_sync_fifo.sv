// tb_sync_fifo: random pushes and pops against a queue model, including
// runs that fill the FIFO and drain it, simultaneous push and pop, and
// pushes while full / pops while empty (which must be ignored). Checks the
// head word, empty and full every cycle.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 8;
  logic        wr_en, rd_en, empty, full;
  logic [32:0] wr_data, rd_data;

  sync_fifo #(.WIDTH(33), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en,
                                             .rd_data, .empty, .full);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [32:0] model[$];

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      automatic int mode = (cyc / 200) % 3;    // 0 mixed, 1 mostly push, 2 mostly pop
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() != 0) check(rd_data == model[0], "head word");
      wr_en   = (mode == 2) ? ($urandom_range(0, 3) == 0) : (mode == 1) ? ($urandom_range(0, 3) != 0)
                                                         : 1'($urandom_range(0, 1));
      rd_en   = (mode == 1) ? ($urandom_range(0, 3) == 0) : (mode == 2) ? ($urandom_range(0, 3) != 0)
                                                         : 1'($urandom_range(0, 1));
      wr_data = {1'($urandom), 32'($urandom)};
      @(posedge clk);
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en && model.size() + (rd_en && !empty ? 1 : 0) <= DEPTH && !full) model.push_back(wr_data);
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
