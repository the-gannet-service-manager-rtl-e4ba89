// tb_parse_subtask: streams code chunks into ParseSubtask and checks, from
// the symbol list alone, the reference packets sent (one four-word packet
// per reference symbol, in order), the symbol-table slots set, the
// constants and extension words written to the data memory, and the
// subtask record queued for the core (service symbol, one argument word
// per argument, return-to, return-as marked last) with one subtask_ready
// per chunk. The reference output and the core queue both apply random
// back-pressure. The first case is the document's example
// R0 => (S R1 R2 C1 R3 R4); its reference packets must leave without gaps
// (4 words each).
`timescale 1ns/1ps
module tb_parse_subtask;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic stall = 1'b0;

  ll_if l_in (.clk, .rst_n);
  ll_if l_out (.clk, .rst_n);
  logic [7:0]  act_ret_to;
  word_t       act_ret_as;
  chunk_addr_t act_chunk, st_set_addr;
  logic        st_set_en, dm_wr_en, sq_wr_en, sq_full, subtask_ready, ref_sent, const_stored;
  logic [9:0]  dm_wr_addr;
  word_t       dm_wr_data;
  logic [32:0] sq_wr_data;

  parse_subtask #(.SERVICE_ID(8'h01)) dut (.clk, .rst_n, .in(l_in), .act_ret_to, .act_ret_as,
    .act_chunk, .out(l_out), .st_set_en, .st_set_addr, .dm_wr_en, .dm_wr_addr, .dm_wr_data,
    .sq_wr_en, .sq_wr_data, .sq_full, .subtask_ready, .ref_sent, .const_stored);
  ll_source src (.l(l_in), .clk);
  ll_sink   sink (.l(l_out), .clk, .stall);

  word_t       dm [1024];
  logic [32:0] sq[$];
  chunk_addr_t st_sets[$];
  int          n_ready = 0;
  always @(negedge clk) sq_full <= stall ? 1'($urandom_range(0, 3) == 0) : 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dm_wr_en) dm[dm_wr_addr] <= dm_wr_data;
    if (sq_wr_en && !sq_full) sq.push_back(sq_wr_data);
    if (sq_wr_en && sq_full) begin
      failures++;
      $display("FAIL: queue written while full");
    end
    if (st_set_en) st_sets.push_back(st_set_addr);
    n_ready += int'(subtask_ready);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs one chunk and checks everything it must produce.
  task automatic run_chunk(input word_t syms[$], input chunk_addr_t c, input string tag);
    word_t       exp_refs[$][$];
    logic [32:0] exp_sq[$];
    chunk_addr_t exp_st[$];
    word_t       exp_dm[int];
    int          cp, ext, pk0, rdy0;
    cp = 0; ext = 0;
    foreach (syms[i]) begin
      word_t s = syms[i];
      if (ext > 0) begin
        exp_dm[int'({c, 3'(cp)})] = s; cp++; ext--;
      end else if (s[31:29] == 3'd0) begin
        exp_sq.push_back({1'b0, s});
      end else if (s[31:29] == 3'd4) begin
        exp_refs.push_back({word_t'({8'h60, s[23:16], 8'h01, 8'h01}), 32'h1, s, s});
        exp_st.push_back(s[6:0]);
        exp_sq.push_back({1'b0, 3'd4, 19'd0, s[6:0], 3'd0});
      end else begin
        exp_dm[int'({c, 3'(cp)})] = s;
        exp_sq.push_back({1'b0, 3'd6, 19'd0, c, 3'(cp)});
        cp++;
        if (s[27]) ext = int'(s[7:0]);
      end
    end
    exp_sq.push_back({1'b0, 24'd0, 8'(c) ^ 8'h5A});
    exp_sq.push_back({1'b1, 16'hBEEF, 9'd0, c});

    act_ret_to = 8'(c) ^ 8'h5A;
    act_ret_as = {16'hBEEF, 9'd0, c};
    act_chunk  = c;
    sq = {}; st_sets = {};
    pk0 = sink.pkts.size(); rdy0 = n_ready;
    src.send(syms, stall ? 1 : 0);
    // the side inputs may change once the chunk has been taken
    act_ret_to = '0; act_ret_as = '0; act_chunk = '0;
    repeat (30) @(posedge clk);
    check(sink.pkts.size() - pk0 == exp_refs.size(), {tag, ": reference packet count"});
    foreach (exp_refs[i])
      check(pk0 + i < sink.pkts.size() && sink.pkts[pk0 + i] == exp_refs[i],
            $sformatf("%s: reference packet %0d", tag, i));
    check(st_sets == exp_st, {tag, ": symbol table updates"});
    check(sq == exp_sq, {tag, ": subtask record"});
    check(n_ready == rdy0 + 1, {tag, ": subtask_ready"});
    foreach (exp_dm[a]) check(dm[a] == exp_dm[a], $sformatf("%s: constant word %0d", tag, a));
  endtask

  initial begin
    word_t ex[$];
    foreach (dm[i]) dm[i] = '0;
    act_ret_to = '0; act_ret_as = '0; act_chunk = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // the document's example, no back-pressure
    ex = {32'h00D0_01E0, 32'h80D0_0005, 32'h80D0_0006, 32'hC8D0_0102,
          32'h1111_1111, 32'h2222_2222, 32'h80D0_0007, 32'h80D0_0008};
    run_chunk(ex, 7'd19, "example");
    for (int i = 0; i < 4; i++)
      if (sink.eof_cyc.size() >= 4 && i > 0)
        check(sink.eof_cyc[i] - sink.eof_cyc[i-1] >= 4, "four cycles per reference packet");
    check(sink.eof_cyc.size() >= 4 && sink.eof_cyc[1] - sink.eof_cyc[0] == 5,
          "next reference starts one cycle after the previous one");

    // a plain constant and a constant ending the chunk
    run_chunk({32'h00D0_0002, 32'hC0D0_0077, 32'h80D0_0042, 32'hC0D0_0099}, 7'd7, "constants");

    // a leaf subtask (no references): goes straight to the core, nothing is sent
    run_chunk({32'h00D0_0003, 32'hC0D0_0055}, 7'd9, "leaf");

    // random chunks under back-pressure
    stall = 1'b1;
    for (int k = 0; k < 15; k++) begin
      word_t s[$];
      automatic int n = $urandom_range(1, 7);
      s = {word_t'({8'h00, 8'hD0, 16'(k)})};
      while (s.size() < n) begin
        automatic int t = $urandom_range(0, 2);
        if (t == 0) s.push_back({8'h80, 8'($urandom), 9'd0, 7'($urandom)});
        else if (t == 1) s.push_back({8'hC0, 8'hD0, 16'($urandom)});
        else if (s.size() + 3 <= 8) begin
          s.push_back({8'hC8, 8'hD0, 8'h01, 8'h02});
          s.push_back($urandom);
          s.push_back($urandom);
        end
      end
      run_chunk(s, 7'($urandom_range(0, 127)), $sformatf("random %0d", k));
    end
    check(sink.bad_framing == 0, "framing");
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
