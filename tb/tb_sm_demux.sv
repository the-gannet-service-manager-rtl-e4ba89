// tb_sm_demux: checks that the input demultiplexer steers whole packets by
// type (code, reference, data), discards packets of other types, passes
// back-pressure from the chosen output and adds no latency. Random
// packets are sent with random gaps while the three outputs stall at
// random; every packet must come out, unchanged, on its own output only.
`timescale 1ns/1ps
module tb_sm_demux;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic stall = 1'b0;

  ll_if l_in (.clk, .rst_n);
  ll_if l_code (.clk, .rst_n);
  ll_if l_ref (.clk, .rst_n);
  ll_if l_data (.clk, .rst_n);
  logic dropped;

  sm_demux dut (.clk, .rst_n, .in(l_in), .code_o(l_code), .ref_o(l_ref),
                .data_o(l_data), .dropped);

  ll_source src (.l(l_in), .clk);
  ll_sink s_code (.l(l_code), .clk, .stall);
  ll_sink s_ref  (.l(l_ref),  .clk, .stall);
  ll_sink s_data (.l(l_data), .clk, .stall);

  int checks = 0, failures = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) n_drop += int'(dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t exp_code[$][$], exp_ref[$][$], exp_data[$][$];
  int exp_drop = 0;

  task automatic compare(input word_t got[$][$], input word_t exp[$][$], input string tag);
    check(got.size() == exp.size(), {tag, ": packet count"});
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("%s: packet %0d", tag, i));
  endtask

  initial begin
    word_t p[$];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // zero latency: a code word offered with the output ready moves at once
    src.send({make_hdr0(P_CODE, 8'd1, 8'd2, 8'd0), 32'h1, 32'h2}, 0);
    check(s_code.pkts.size() == 1 && s_code.eof_cyc[0] - src.first_cyc == 2,
          "three-word packet passes in three cycles");
    exp_code.push_back({make_hdr0(P_CODE, 8'd1, 8'd2, 8'd0), 32'h1, 32'h2});

    stall = 1'b1;
    for (int n = 0; n < 60; n++) begin
      automatic int t = $urandom_range(0, 3);
      automatic int len = $urandom_range(1, 10);
      pkt_type_e ty;
      ty = (t == 0) ? P_CODE : (t == 1) ? P_REF : (t == 2) ? P_DATA : P_ERROR;
      p = {make_hdr0(ty, 8'd1, 8'(n), 8'(len))};
      for (int i = 1; i < len; i++) p.push_back($urandom);
      // words after the first carry random type bits on purpose
      src.send(p, $urandom_range(0, 2));
      case (t)
        0: exp_code.push_back(p);
        1: exp_ref.push_back(p);
        2: exp_data.push_back(p);
        default: exp_drop++;
      endcase
    end
    stall = 1'b0;
    repeat (5) @(posedge clk);
    compare(s_code.pkts, exp_code, "code");
    compare(s_ref.pkts,  exp_ref,  "reference");
    compare(s_data.pkts, exp_data, "data");
    check(n_drop == exp_drop, "discarded packet count");
    check(s_code.bad_framing + s_ref.bad_framing + s_data.bad_framing == 0, "framing");
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
