// tb_activate_subtask: drives reference packets into ActivateSubtask with
// models of the code memory, the code status memory and CodeWrite's
// req_actv pulse, and checks the streamed chunks, their side information
// and the order of activations in four cases: code already present
// (immediate activation), code loaded later and announced by req_actv
// (deferred activation, first word one cycle after the pulse), code loaded
// later and only visible in the status memory, and a second reference
// waiting while the pending slot is full. The output stalls at random.
`timescale 1ns/1ps
module tb_activate_subtask;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic stall = 1'b0;

  ll_if l_in (.clk, .rst_n);
  ll_if l_out (.clk, .rst_n);
  chunk_addr_t cs_rd_addr, req_actv_addr, act_chunk;
  logic        cs_rd_present, req_actv, cm_rd_en, activated, deferred;
  logic [3:0]  cs_rd_len, req_actv_len;
  logic [9:0]  cm_rd_addr;
  word_t       cm_rd_data, act_ret_as;
  logic [7:0]  act_ret_to;

  activate_subtask dut (.clk, .rst_n, .in(l_in), .cs_rd_addr, .cs_rd_present, .cs_rd_len,
    .req_actv, .req_actv_addr, .req_actv_len, .cm_rd_en, .cm_rd_addr, .cm_rd_data,
    .out(l_out), .act_ret_to, .act_ret_as, .act_chunk, .activated, .deferred);
  ll_source src (.l(l_in), .clk);
  ll_sink   sink (.l(l_out), .clk, .stall);

  // models
  word_t      cm [1024];
  bit         present [128];
  logic [3:0] len [128];
  assign cs_rd_present = present[cs_rd_addr];
  assign cs_rd_len     = len[cs_rd_addr];
  always @(posedge clk) if (cm_rd_en) cm_rd_data <= cm[cm_rd_addr];

  // side information seen with each streamed word
  word_t side[$];
  int    n_act = 0, n_def = 0;
  int unsigned first_word_cyc[$];
  always @(posedge clk) if (rst_n) begin
    n_act += int'(activated);
    n_def += int'(deferred);
    if (!l_out.src_rdy_n && !l_out.dst_rdy_n) begin
      side.push_back({1'b0, act_chunk, act_ret_to, act_ret_as[15:0]});
      if (!l_out.sof_n) first_word_cyc.push_back(sink.cyc);
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t ret_as_of(chunk_addr_t c);
    return {16'h8020, 9'd0, c};
  endfunction

  task automatic ref_pkt(input chunk_addr_t c, input int gaps);
    src.send({make_hdr0(P_REF, 8'd1, 8'd2, 8'd1), word_t'({24'd0, 1'b0, c}), ret_as_of(c),
              word_t'({25'h100_6800, c})}, gaps);
  endtask

  task automatic load(input chunk_addr_t c, input int n, input bit pulse);
    for (int i = 0; i < n; i++) cm[{c, 3'(i)}] = {8'hC0, 1'b0, c, 16'(i)};
    @(posedge clk);
    present[c] <= 1'b1;
    len[c]     <= 4'(n);
    @(posedge clk);
    if (pulse) begin
      req_actv      <= 1'b1;
      req_actv_addr <= c;
      req_actv_len  <= 4'(n);
      @(posedge clk);
      req_actv      <= 1'b0;
    end
  endtask

  // checks the k-th streamed chunk and the side information of its words
  int side_pos = 0;
  task automatic expect_chunk(input int k, input chunk_addr_t c);
    word_t w[$];
    int n;
    n = int'(len[c]);
    check(sink.pkts.size() > k, $sformatf("chunk %0d streamed", c));
    if (sink.pkts.size() > k) begin
      w = sink.pkts[k];
      check(w.size() == n, $sformatf("chunk %0d length", c));
      for (int i = 0; i < n && i < w.size(); i++)
        check(w[i] == cm[{c, 3'(i)}], $sformatf("chunk %0d word %0d", c, i));
      for (int i = 0; i < w.size(); i++) begin
        check(side[side_pos] == {1'b0, c, 1'b0, c, ret_as_of(c)[15:0]},
              $sformatf("chunk %0d side information", c));
        side_pos++;
      end
    end
  endtask

  initial begin
    foreach (present[i]) present[i] = 1'b0;
    foreach (len[i]) len[i] = 4'd0;
    foreach (cm[i]) cm[i] = '0;
    req_actv = 1'b0; req_actv_addr = '0; req_actv_len = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. code present
    load(7'd19, 8, 1'b0);
    ref_pkt(7'd19, 0);
    repeat (15) @(posedge clk);
    expect_chunk(0, 7'd19);
    check(n_act == 1 && n_def == 0, "immediate activation");

    // 2. code loaded later, announced by req_actv
    ref_pkt(7'd5, 0);
    repeat (10) @(posedge clk);
    check(sink.pkts.size() == 1 && n_def == 1, "reference to absent code parked");
    load(7'd5, 3, 1'b1);
    repeat (10) @(posedge clk);
    expect_chunk(1, 7'd5);
    check(first_word_cyc[1] == sink.cyc - 10, "first word one cycle after req_actv");

    // 3. code loaded later, seen in the status memory only
    ref_pkt(7'd6, 1);
    repeat (5) @(posedge clk);
    load(7'd6, 5, 1'b0);
    repeat (12) @(posedge clk);
    expect_chunk(2, 7'd6);

    // 4. two references waiting; the later one waits for the slot
    stall = 1'b1;
    fork
      begin
        ref_pkt(7'd40, 2);
        ref_pkt(7'd41, 2);
      end
      begin
        repeat (30) @(posedge clk);
        load(7'd40, 8, 1'b1);
        repeat (30) @(posedge clk);
        load(7'd41, 2, 1'b1);
      end
    join
    repeat (40) @(posedge clk);
    expect_chunk(3, 7'd40);
    expect_chunk(4, 7'd41);
    check(sink.pkts.size() == 5 && sink.bad_framing == 0, "five chunks, framing");
    check(n_act == 5 && n_def == 3, "activation and deferral counts");
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
