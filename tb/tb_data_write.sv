// tb_data_write: sends data packets for symbols whose status is PRESENT or
// ABSENT (a model of the symbol table answers the block's reads) and checks
// that only the payload of the first kind reaches the data memory model,
// at slot*8+i, that nothing else is written, and that stored/dropped pulse
// once per packet.
`timescale 1ns/1ps
module tb_data_write;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ll_if l_in (.clk, .rst_n);
  chunk_addr_t st_rd_addr;
  logic        st_rd_present;
  logic        dm_wr_en, stored, dropped;
  logic [9:0]  dm_wr_addr;
  word_t       dm_wr_data;

  data_write dut (.clk, .rst_n, .in(l_in), .st_rd_addr, .st_rd_present,
                  .dm_wr_en, .dm_wr_addr, .dm_wr_data, .stored, .dropped);
  ll_source src (.l(l_in), .clk);

  word_t dm [1024];
  bit    status [128];
  int    n_st = 0, n_dr = 0;
  assign st_rd_present = status[st_rd_addr];
  always @(posedge clk) begin
    if (dm_wr_en) dm[dm_wr_addr] <= dm_wr_data;
    n_st += int'(stored);
    n_dr += int'(dropped);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t exp_dm [1024];

  task automatic data_pkt(input chunk_addr_t s, input int n, input int gaps);
    word_t p[$];
    int st0, dr0;
    st0 = n_st; dr0 = n_dr;
    p = {make_hdr0(P_DATA, 8'd1, 8'd2, 8'(n)), 32'h20, word_t'({25'h100_6800, s})};
    for (int i = 0; i < n; i++) begin
      word_t w = $urandom;
      p.push_back(w);
      if (status[s] && i < 8) exp_dm[{s, 3'(i)}] = w;
    end
    src.send(p, gaps);
    repeat (2) @(posedge clk);
    if (status[s]) check(n_st == st0 + 1 && n_dr == dr0, $sformatf("slot %0d stored", s));
    else           check(n_dr == dr0 + 1 && n_st == st0, $sformatf("slot %0d dropped", s));
  endtask

  initial begin
    foreach (status[i]) status[i] = 1'($urandom_range(0, 1));
    status[5] = 1'b0;
    status[6] = 1'b1;
    foreach (dm[i]) begin dm[i] = '0; exp_dm[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    data_pkt(7'd5, 8, 0);
    data_pkt(7'd6, 8, 0);
    data_pkt(7'd6, 10, 1);
    for (int k = 0; k < 40; k++) data_pkt(7'($urandom_range(0, 127)), $urandom_range(1, 9), $urandom_range(0, 2));
    foreach (dm[i]) if (dm[i] != exp_dm[i]) begin
      check(0, $sformatf("data memory word %0d", i));
    end
    check(1, "data memory compared");
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
