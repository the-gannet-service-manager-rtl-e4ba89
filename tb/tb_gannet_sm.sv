// tb_gannet_sm: end-to-end test of the Service Manager at its default
// sizes.
//
// Replays the scenario of the reference simulation and then exercises the
// remaining mechanisms:
//   1. a data packet for slot 5 arrives before any reference to it: dropped;
//   2. a reference packet asks for chunk 19 before its code is loaded:
//      parked (deferred activation);
//   3. the code packet R0 => (S R1 R2 C1 R3 R4) arrives (11 words, C1 an
//      extended constant of 3 words): the parked reference is activated,
//      four reference packets go out and the whole sequence, from the first
//      code word in to the last reference word out, must take 36 cycles;
//   4. the subtask record reaches the core queue; the constant is found in
//      the data memory;
//   5. data packets for R1..R4 are now stored (slots marked present);
//   6. a behavioural service core sums R1's data and returns the result,
//      which must leave as a data packet;
//   7. a second reference to chunk 19 is activated at once (code present),
//      with the output link applying back-pressure and a result competing
//      for the output (mux contention); a packet of unknown type is
//      discarded.
// Each mechanism is counted and a failure is counted for any that never
// happened. Expected values are computed here from the packet formats.
`timescale 1ns/1ps
module tb_gannet_sm;
  import gannet_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] data_in;
  logic        sof_in_n, eof_in_n, src_rdy_in_n, dst_rdy_out_n;
  logic [31:0] data_out;
  logic        sof_out_n, eof_out_n, src_rdy_out_n, dst_rdy_in_n;
  logic        subtask_rd, subtask_empty, subtask_ready;
  logic [32:0] subtask_data;
  logic        result_wr, result_full, result_ready;
  logic [31:0] result_data;
  logic        core_dm_rd_en;
  logic [9:0]  core_dm_addr;
  logic [31:0] core_dm_data;
  logic ev_activated, ev_deferred, ev_ref_sent, ev_const_stored;
  logic ev_data_stored, ev_data_dropped, ev_result_sent, ev_pkt_discarded;

  gannet_sm dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ event counts
  int n_act = 0, n_def = 0, n_ref = 0, n_const = 0, n_dstore = 0, n_ddrop = 0;
  int n_res = 0, n_disc = 0, n_stall = 0, n_contend = 0, n_sready = 0;
  always @(posedge clk) if (rst_n) begin
    n_act    += int'(ev_activated);
    n_def    += int'(ev_deferred);
    n_ref    += int'(ev_ref_sent);
    n_const  += int'(ev_const_stored);
    n_dstore += int'(ev_data_stored);
    n_ddrop  += int'(ev_data_dropped);
    n_res    += int'(ev_result_sent);
    n_disc   += int'(ev_pkt_discarded);
    n_sready += int'(subtask_ready);
    n_stall  += int'(!src_rdy_out_n && dst_rdy_in_n);
    // a source waits with a first word while the other one holds the output
    n_contend += int'(dut.u_output_mux.busy_q &&
                      (dut.u_output_mux.sel_q ? dut.u_output_mux.req0
                                              : dut.u_output_mux.req1));
  end

  // ----------------------------------------------------------- output monitor
  word_t       out_pkts[$][$];
  int unsigned out_eof_cyc[$];
  word_t       cur_pkt[$];
  always @(posedge clk) if (rst_n && !src_rdy_out_n && !dst_rdy_in_n) begin
    if (!sof_out_n) cur_pkt = {};
    cur_pkt.push_back(data_out);
    if (!eof_out_n) begin
      out_pkts.push_back(cur_pkt);
      out_eof_cyc.push_back(cyc);
    end
  end

  // Output back-pressure control
  bit backpressure = 0;
  always @(negedge clk) dst_rdy_in_n <= backpressure ? 1'($urandom_range(0, 1)) : 1'b0;

  // ---------------------------------------------------------- packet driver
  int unsigned first_word_cyc;
  // Words are driven on the falling edge; the ready is sampled just after,
  // and the word moves on the following rising edge if it was low.
  task automatic send(input word_t w[$], input bit gaps);
    bit ok;
    @(negedge clk);
    for (int i = 0; i < w.size(); i++) begin
      if (gaps) begin
        src_rdy_in_n = 1'b1;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      data_in      = w[i];
      sof_in_n     = !(i == 0);
      eof_in_n     = !(i == w.size() - 1);
      src_rdy_in_n = 1'b0;
      do begin
        #1;
        ok = !dst_rdy_out_n;
        if (ok && i == 0) first_word_cyc = cyc;
        @(negedge clk);
      end while (!ok);
    end
    src_rdy_in_n = 1'b1;
    sof_in_n     = 1'b1;
    eof_in_n     = 1'b1;
  endtask

  function automatic word_t hdr(pkt_type_e t, logic [7:0] len);
    return make_hdr0(t, 8'h01, 8'h20, len);
  endfunction

  // Symbols of the test program (kinds K_S=0, K_R=4, K_B=6; service 0xD0)
  localparam word_t S_SYM  = 32'h00D0_01E0;
  localparam word_t R0     = 32'h80D0_0013;   // chunk 19
  localparam word_t R1     = 32'h80D0_0005;
  localparam word_t R2     = 32'h80D0_0006;
  localparam word_t R3     = 32'h80D0_0007;
  localparam word_t R4     = 32'h80D0_0008;
  localparam word_t C1     = 32'hC8D0_0102;   // extended, 2 extension words
  localparam word_t C1_X0  = 32'h1111_1111;
  localparam word_t C1_X1  = 32'h2222_2222;
  localparam word_t RET_AS = 32'h8020_0033;

  word_t code_pkt[$], ref_pkt[$], data_pkt[$];
  word_t rec[$];
  word_t exp_refs[4];
  int unsigned t_end;
  word_t sum;

  task automatic read_dm(input int unsigned a, output word_t d);
    core_dm_rd_en <= 1'b1;
    core_dm_addr  <= 10'(a);
    @(posedge clk);
    core_dm_rd_en <= 1'b0;
    #1;
    d = core_dm_data;
  endtask

  task automatic pop_record(output word_t r[$]);
    logic last;
    r = {};
    last = 1'b0;
    while (!last) begin
      #1;
      while (subtask_empty) begin @(posedge clk); #1; end
      r.push_back(subtask_data[31:0]);
      last = subtask_data[32];
      subtask_rd <= 1'b1;
      @(posedge clk);
      subtask_rd <= 1'b0;
    end
  endtask

  function automatic word_t data_word(word_t sym, int i);
    return {sym[15:0], 16'(i + 1)};
  endfunction

  task automatic check_ref_pkt(input word_t p[$], input word_t sym, input string tag);
    check(p.size() == 4, {tag, ": reference packet length"});
    if (p.size() == 4) begin
      check(p[0] == make_hdr0(P_REF, sym[23:16], 8'd1, 8'd1), {tag, ": H0"});
      check(p[1] == 32'd1, {tag, ": H1 return-to"});
      check(p[2] == sym, {tag, ": H2 return-as"});
      check(p[3] == sym, {tag, ": payload"});
    end
  endtask

  initial begin
    word_t d;
    data_in = '0; sof_in_n = 1; eof_in_n = 1; src_rdy_in_n = 1;
    subtask_rd = 0; result_wr = 0; result_data = '0; result_ready = 0;
    core_dm_rd_en = 0; core_dm_addr = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. data for slot 5 before any reference: dropped
    data_pkt = {hdr(P_DATA, 8), 32'h20, R1};
    for (int i = 0; i < 8; i++) data_pkt.push_back(32'hBBDD_0001 + i);
    send(data_pkt, 0);
    repeat (2) @(posedge clk);
    check(n_ddrop == 1 && n_dstore == 0, "early data packet dropped");

    // 2. reference to chunk 19 before its code: parked
    ref_pkt = {hdr(P_REF, 1), 32'h20, RET_AS, R0};
    send(ref_pkt, 0);
    repeat (3) @(posedge clk);
    check(n_def == 1 && n_act == 0, "reference parked until code arrives");

    // 3. code packet: activation, four reference packets, 36 cycles
    code_pkt = {hdr(P_CODE, 8), 32'h20, R0, S_SYM, R1, R2, C1, C1_X0, C1_X1, R3, R4};
    send(code_pkt, 0);
    begin
      int unsigned t_start;
      t_start = first_word_cyc;
      while (out_pkts.size() < 4) @(posedge clk);
      t_end = out_eof_cyc[3];
      $display("code packet in to last reference word out: %0d cycles", t_end - t_start + 1);
      check(t_end - t_start + 1 == 36, "activation latency is 36 cycles");
    end
    exp_refs = '{R1, R2, R3, R4};
    for (int i = 0; i < 4; i++) check_ref_pkt(out_pkts[i], exp_refs[i], $sformatf("ref %0d", i + 1));
    check(n_act == 1 && n_const == 1, "one activation, one constant");

    // 4. subtask record for the core, constant in data memory
    pop_record(rec);
    check(rec.size() == 8, "subtask record length");
    if (rec.size() == 8) begin
      check(rec[0] == S_SYM, "record: service symbol");
      check(rec[1] == make_arg(K_R, 10'd40), "record: R1 address");
      check(rec[2] == make_arg(K_R, 10'd48), "record: R2 address");
      check(rec[3] == make_arg(K_B, 10'd152), "record: C1 address");
      check(rec[4] == make_arg(K_R, 10'd56), "record: R3 address");
      check(rec[5] == make_arg(K_R, 10'd64), "record: R4 address");
      check(rec[6] == 32'h20, "record: return-to");
      check(rec[7] == RET_AS, "record: return-as");
    end
    read_dm(152, d); check(d == C1,    "constant symbol stored");
    read_dm(153, d); check(d == C1_X0, "constant extension word 0 stored");
    read_dm(154, d); check(d == C1_X1, "constant extension word 1 stored");

    // 5. data for R1..R4 now stored
    foreach (exp_refs[k]) begin
      data_pkt = {hdr(P_DATA, 8), 32'h20, exp_refs[k]};
      for (int i = 0; i < 8; i++) data_pkt.push_back(data_word(exp_refs[k], i));
      send(data_pkt, k[0]);
    end
    repeat (2) @(posedge clk);
    check(n_dstore == 4 && n_ddrop == 1, "data packets for referenced symbols stored");
    sum = '0;
    for (int i = 0; i < 8; i++) begin
      read_dm(40 + i, d);
      check(d == data_word(R1, i), $sformatf("R1 data word %0d", i));
      sum += d;
    end
    read_dm(64 + 7, d); check(d == data_word(R4, 7), "R4 data word 7");

    // 6. the core returns a 2-word result: sum of R1's data and the constant
    begin
      word_t res[$];
      res = {32'h0000_0220, RET_AS, sum, C1_X0};
      foreach (res[i]) begin
        result_wr <= 1'b1; result_data <= res[i];
        @(posedge clk);
      end
      result_wr <= 1'b0;
      result_ready <= 1'b1;
      @(posedge clk);
      result_ready <= 1'b0;
      while (out_pkts.size() < 5) @(posedge clk);
      check(out_pkts[4].size() == 5, "result packet length");
      if (out_pkts[4].size() == 5) begin
        check(out_pkts[4][0] == make_hdr0(P_DATA, 8'h20, 8'd1, 8'd2), "result H0");
        check(out_pkts[4][1] == 32'd1, "result H1");
        check(out_pkts[4][2] == RET_AS, "result H2");
        check(out_pkts[4][3] == sum, "result payload 0");
        check(out_pkts[4][4] == C1_X0, "result payload 1");
      end
    end

    // 7. second activation with the code present, under back-pressure and
    //    with a result competing for the output; an unknown packet type
    backpressure = 1;
    begin
      word_t res[$];
      res = {32'h0000_0121, RET_AS, 32'hCAFE_0001};
      foreach (res[i]) begin
        result_wr <= 1'b1; result_data <= res[i];
        @(posedge clk);
      end
      result_wr <= 1'b0;
    end
    fork
      send({hdr(P_REF, 1), 32'h21, RET_AS, R0}, 1);
      begin
        while (n_ref < 5) @(posedge clk);
        result_ready <= 1'b1;
        @(posedge clk);
        result_ready <= 1'b0;
      end
    join
    send({make_hdr0(P_ERROR, 8'h01, 8'h20, 8'd1), 32'h20, RET_AS, 32'h0}, 0);
    while (out_pkts.size() < 10) @(posedge clk);
    backpressure = 0;
    begin
      automatic int nref = 0;
      automatic int nres = 0;
      for (int i = 5; i < 10; i++) begin
        if (out_pkts[i][0][31:29] == 3'(P_REF)) begin
          check_ref_pkt(out_pkts[i], exp_refs[nref], $sformatf("2nd ref %0d", nref + 1));
          nref++;
        end else begin
          nres++;
          check(out_pkts[i].size() == 4 && out_pkts[i][3] == 32'hCAFE_0001, "2nd result packet");
        end
      end
      check(nref == 4 && nres == 1, "second activation: 4 references and 1 result");
    end
    pop_record(rec);
    check(rec.size() == 8 && rec[6] == 32'h21, "second subtask record");
    check(n_act == 2 && n_def == 1, "second activation without deferral");

    // mechanisms seen
    check(n_ddrop  > 0, "mechanism: data packet dropped (status absent)");
    check(n_dstore > 0, "mechanism: data packet stored (status present)");
    check(n_def    > 0, "mechanism: activation deferred until code arrives");
    check(n_act    > 1, "mechanism: immediate activation");
    check(n_ref    == 8, "mechanism: reference packets sent");
    check(n_const  == 2, "mechanism: constants stored");
    check(n_res    == 2, "mechanism: results packetised");
    check(n_sready == 2, "mechanism: subtask_ready");
    check(n_disc   == 1, "mechanism: unknown packet discarded");
    check(n_stall  > 0, "mechanism: output back-pressure");
    check(n_contend > 0, "mechanism: output mux contention");
    $display("events: act=%0d def=%0d ref=%0d const=%0d dstore=%0d ddrop=%0d res=%0d disc=%0d stall=%0d contend=%0d",
             n_act, n_def, n_ref, n_const, n_dstore, n_ddrop, n_res, n_disc, n_stall, n_contend);
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
