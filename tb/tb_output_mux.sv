// tb_output_mux: checks that the output multiplexer forwards whole packets
// from both sources without mixing their words, keeps each source's order,
// lets both sources through when they compete, passes back-pressure and
// adds no latency.
`timescale 1ns/1ps
module tb_output_mux;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic stall = 1'b0;

  ll_if l0 (.clk, .rst_n);
  ll_if l1 (.clk, .rst_n);
  ll_if lo (.clk, .rst_n);

  output_mux dut (.clk, .rst_n, .in0(l0), .in1(l1), .out(lo));

  ll_source src0 (.l(l0), .clk);
  ll_source src1 (.l(l1), .clk);
  ll_sink   sink (.l(lo), .clk, .stall);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t exp0[$][$], exp1[$][$];

  task automatic run_src(input int id, input int n);
    word_t p[$];
    for (int k = 0; k < n; k++) begin
      int len = $urandom_range(1, 6);
      p = {};
      // tag every word with its source and packet number
      for (int i = 0; i < len; i++) p.push_back({4'(id), 12'(k), 16'(i)});
      if (id == 0) begin exp0.push_back(p); src0.send(p, $urandom_range(0, 1)); end
      else         begin exp1.push_back(p); src1.send(p, $urandom_range(0, 1)); end
    end
  endtask

  initial begin
    int i0, i1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    src0.send({32'h0000_0001, 32'h0000_0002}, 0);
    check(sink.pkts.size() == 1 && sink.eof_cyc[0] - src0.first_cyc == 1,
          "two-word packet passes in two cycles");
    void'(sink.pkts.pop_front());

    stall = 1'b1;
    fork
      run_src(0, 40);
      run_src(1, 40);
    join
    stall = 1'b0;
    repeat (10) @(posedge clk);
    check(sink.pkts.size() == 80, "all packets delivered");
    check(sink.bad_framing == 0, "framing");
    i0 = 0; i1 = 0;
    foreach (sink.pkts[k]) begin
      if (sink.pkts[k][0][31:28] == 4'd0) begin
        check(i0 < exp0.size() && sink.pkts[k] == exp0[i0], $sformatf("source 0 packet %0d", i0));
        i0++;
      end else begin
        check(i1 < exp1.size() && sink.pkts[k] == exp1[i1], $sformatf("source 1 packet %0d", i1));
        i1++;
      end
    end
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
