// tb_packetisation: writes result records into a result queue (a
// sync_fifo, as in the Service Manager), pulses result_ready per record
// and checks each data packet sent: header {P_DATA, return-to, service id,
// length}, service id, return-as symbol, then the payload, under random
// output back-pressure. Includes an empty result and several records
// queued before the first is sent.
`timescale 1ns/1ps
module tb_packetisation;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic stall = 1'b0;

  ll_if l_out (.clk, .rst_n);
  logic  result_ready, rq_rd_en, rq_empty, rq_full, pkt_sent, wr_en;
  word_t rq_rd_data, wr_data;

  sync_fifo #(.WIDTH(32), .DEPTH(64)) u_q (.clk, .rst_n, .wr_en, .wr_data,
    .rd_en(rq_rd_en), .rd_data(rq_rd_data), .empty(rq_empty), .full(rq_full));
  packetisation #(.SERVICE_ID(8'h33)) dut (.clk, .rst_n, .result_ready, .rq_rd_en,
    .rq_rd_data, .rq_empty, .out(l_out), .pkt_sent);
  ll_sink sink (.l(l_out), .clk, .stall);

  int checks = 0, failures = 0, n_sent = 0;
  always @(posedge clk) if (rst_n) n_sent += int'(pkt_sent);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t exp[$][$];

  task automatic result(input int len, input bit ready_now);
    word_t w[$], p[$];
    logic [7:0] dest;
    word_t ret_as;
    dest   = 8'($urandom);
    ret_as = $urandom;
    w = {word_t'({16'd0, 8'(len), dest}), ret_as};
    p = {word_t'({3'(P_DATA), 5'd0, dest, 8'h33, 8'(len)}), 32'h33, ret_as};
    for (int i = 0; i < len; i++) begin
      word_t d = $urandom;
      w.push_back(d);
      p.push_back(d);
    end
    exp.push_back(p);
    foreach (w[i]) begin
      wr_en <= 1'b1; wr_data <= w[i];
      @(posedge clk);
    end
    wr_en <= 1'b0;
    if (ready_now) begin
      result_ready <= 1'b1;
      @(posedge clk);
      result_ready <= 1'b0;
    end
  endtask

  initial begin
    wr_en = 0; wr_data = '0; result_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    result(2, 1);
    result(0, 1);
    stall = 1'b1;
    // three records queued, announced together afterwards
    result(3, 0);
    result(5, 0);
    result(1, 0);
    repeat (3) begin
      result_ready <= 1'b1;
      @(posedge clk);
    end
    result_ready <= 1'b0;
    for (int k = 0; k < 10; k++) result($urandom_range(1, 12), 1);
    repeat (200) @(posedge clk);
    check(sink.pkts.size() == exp.size() && n_sent == exp.size(), "packet count");
    foreach (exp[i]) check(i < sink.pkts.size() && sink.pkts[i] == exp[i], $sformatf("packet %0d", i));
    check(rq_empty && sink.bad_framing == 0, "queue drained, framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
