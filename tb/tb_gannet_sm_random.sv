// tb_gannet_sm_random: randomized end-to-end test of the Service Manager at
// its default sizes.
//
// A reference model in the testbench follows every packet:
//   * 60 rounds, each loading one randomly generated subtask (service
//     symbol, references, plain and extended constants, at most 8 words)
//     into its own chunk and requesting it with a reference packet. In
//     half of the rounds the reference comes first and must be parked
//     until the code arrives; in the other half the code is already
//     present. The model predicts the reference packets, the subtask
//     record for the core, the symbol-table slots set and the constants
//     written to the data memory;
//   * a behavioural core pops the subtask records and compares them, and
//     independently writes random result records whose data packets are
//     predicted;
//   * 80 data packets to random slots are stored or dropped according to
//     the model's symbol table; finally every data-memory word the model
//     touched is read back through the core port.
// The outgoing link applies random back-pressure and the incoming packets
// have random gaps. Reference packets and result packets are checked in
// order, each stream on its own, so their interleaving is free.
`timescale 1ns/1ps
module tb_gannet_sm_random;
  import gannet_pkg::*;

  localparam int ROUNDS = 60;
  localparam int NDATA  = 80;
  localparam int NRES   = 30;

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
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- event counts
  int n_act = 0, n_def = 0, n_ref = 0, n_const = 0, n_dstore = 0, n_ddrop = 0;
  int n_res = 0, n_sready = 0;
  always @(posedge clk) if (rst_n) begin
    n_act    += int'(ev_activated);
    n_def    += int'(ev_deferred);
    n_ref    += int'(ev_ref_sent);
    n_const  += int'(ev_const_stored);
    n_dstore += int'(ev_data_stored);
    n_ddrop  += int'(ev_data_dropped);
    n_res    += int'(ev_result_sent);
    n_sready += int'(subtask_ready);
  end

  // ------------------------------------------------------------- the model
  word_t       exp_refs[$][$];     // reference packets, in order
  word_t       exp_res[$][$];      // result data packets, in order
  word_t       exp_rec[$][$];      // subtask records, in order
  word_t       exp_dm[int];        // data-memory words written
  bit          exp_st[128];        // symbol table
  int          e_ref = 0, e_const = 0, e_def = 0, e_store = 0, e_drop = 0;

  // --------------------------------------------------------- output monitor
  word_t cur_pkt[$];
  int    got_refs = 0, got_res = 0;
  always @(negedge clk) dst_rdy_in_n <= 1'($urandom_range(0, 2) == 0);
  always @(posedge clk) if (rst_n && !src_rdy_out_n && !dst_rdy_in_n) begin
    if (!sof_out_n) cur_pkt = {};
    cur_pkt.push_back(data_out);
    if (!eof_out_n) begin
      if (cur_pkt[0][31:29] == 3'(P_REF)) begin
        check(exp_refs.size() > 0 && cur_pkt == exp_refs[0],
              $sformatf("reference packet %0d", got_refs));
        if (exp_refs.size() > 0) void'(exp_refs.pop_front());
        got_refs++;
      end else begin
        check(exp_res.size() > 0 && cur_pkt == exp_res[0],
              $sformatf("result packet %0d", got_res));
        if (exp_res.size() > 0) void'(exp_res.pop_front());
        got_res++;
      end
    end
  end

  // -------------------------------------------------------- packet driver
  task automatic send(input word_t w[$]);
    bit ok;
    @(negedge clk);
    for (int i = 0; i < w.size(); i++) begin
      src_rdy_in_n = 1'b1;
      repeat ($urandom_range(0, 1)) @(negedge clk);
      data_in      = w[i];
      sof_in_n     = !(i == 0);
      eof_in_n     = !(i == w.size() - 1);
      src_rdy_in_n = 1'b0;
      do begin
        #1;
        ok = !dst_rdy_out_n;
        @(negedge clk);
      end while (!ok);
    end
    src_rdy_in_n = 1'b1;
    sof_in_n     = 1'b1;
    eof_in_n     = 1'b1;
  endtask

  // ------------------------------------------------ core: subtask records
  int got_rec = 0;
  bit core_done = 0;
  initial begin : core_pop
    word_t r[$];
    logic  last;
    subtask_rd = 1'b0;
    wait (rst_n);
    while (got_rec < ROUNDS) begin
      r = {};
      last = 1'b0;
      while (!last) begin
        @(negedge clk);
        if (!subtask_empty && $urandom_range(0, 1) == 0) begin
          r.push_back(subtask_data[31:0]);
          last = subtask_data[32];
          subtask_rd = 1'b1;
          @(negedge clk);
          subtask_rd = 1'b0;
        end
      end
      check(exp_rec.size() > 0 && r == exp_rec[0], $sformatf("subtask record %0d", got_rec));
      if (exp_rec.size() > 0) void'(exp_rec.pop_front());
      got_rec++;
    end
    core_done = 1;
  end

  // ------------------------------------------------- core: result records
  bit res_done = 0;
  initial begin : core_results
    result_wr = 1'b0;
    result_data = '0;
    result_ready = 1'b0;
    wait (rst_n);
    for (int k = 0; k < NRES; k++) begin
      word_t w[$];
      automatic logic [7:0] len  = 8'($urandom_range(0, 6));
      automatic logic [7:0] dest = 8'($urandom_range(2, 200));
      automatic word_t      ras  = {3'(K_R), 5'd0, dest, 9'd0, 7'($urandom)};
      repeat ($urandom_range(20, 300)) @(negedge clk);
      w = {word_t'({16'd0, len, dest}), ras};
      for (int i = 0; i < int'(len); i++) w.push_back($urandom);
      exp_res.push_back({make_hdr0(P_DATA, dest, 8'd1, len), 32'd1, ras});
      for (int i = 2; i < w.size(); i++) exp_res[$].push_back(w[i]);
      foreach (w[i]) begin
        while (result_full) @(negedge clk);
        result_wr   = 1'b1;
        result_data = w[i];
        @(negedge clk);
        result_wr   = 1'b0;
      end
      result_ready = 1'b1;
      @(negedge clk);
      result_ready = 1'b0;
    end
    res_done = 1;
  end

  // --------------------------------------------------------- one subtask
  task automatic round(input int k, input chunk_addr_t c);
    word_t syms[$], rec[$], code[$], ref_p[$];
    automatic int cp = 0;
    automatic word_t r0 = {3'(K_R), 5'd0, 8'h01, 9'd0, c};
    automatic word_t ras = {3'(K_R), 5'd0, 8'h33, 9'd0, 7'(k)};
    automatic logic [7:0] rto = 8'($urandom_range(2, 250));
    automatic int n = $urandom_range(1, 8);
    // symbols
    syms = {word_t'({3'(K_S), 5'd0, 8'h01, 16'(k)})};
    rec  = {syms[0]};
    while (syms.size() < n) begin
      automatic int t = $urandom_range(0, 3);
      if (t <= 1) begin
        automatic logic [6:0] slot = 7'($urandom);
        automatic word_t s = {3'(K_R), 5'd0, 8'($urandom_range(2, 250)), 9'd0, slot};
        syms.push_back(s);
        rec.push_back(make_arg(K_R, {slot, 3'd0}));
        exp_refs.push_back({make_hdr0(P_REF, s[23:16], 8'd1, 8'd1), 32'd1, s, s});
        exp_st[slot] = 1'b1;
        e_ref++;
      end else if (t == 2 || syms.size() + 2 > 8) begin
        automatic word_t s = {3'(K_B), 5'd0, 8'h01, 16'($urandom)};
        syms.push_back(s);
        rec.push_back(make_arg(K_B, {c, 3'(cp)}));
        exp_dm[int'({c, 3'(cp)})] = s;
        cp++;
        e_const++;
      end else begin
        automatic int nx = $urandom_range(1, 8 - syms.size() - 1);
        automatic word_t s = {3'(K_B), 1'b0, 1'b1, 3'd0, 8'h01, 8'h00, 8'(nx)};
        syms.push_back(s);
        rec.push_back(make_arg(K_B, {c, 3'(cp)}));
        exp_dm[int'({c, 3'(cp)})] = s;
        cp++;
        for (int j = 0; j < nx; j++) begin
          automatic word_t x = $urandom;
          syms.push_back(x);
          exp_dm[int'({c, 3'(cp)})] = x;
          cp++;
        end
        e_const++;
      end
    end
    rec.push_back(word_t'(rto));
    rec.push_back(ras);
    exp_rec.push_back(rec);
    code  = {make_hdr0(P_CODE, 8'h01, 8'h20, 8'(syms.size())), 32'h20, r0};
    foreach (syms[i]) code.push_back(syms[i]);
    ref_p = {make_hdr0(P_REF, 8'h01, 8'h20, 8'd1), word_t'(rto), ras, r0};
    if (k % 2 == 0) begin
      // reference first: parked until its code arrives
      send(ref_p);
      send(code);
      e_def++;
    end else begin
      send(code);
      send(ref_p);
    end
    // the next round may only start once this one has been activated, so
    // at most one reference is ever parked
    while (n_act <= k) @(posedge clk);
  endtask

  task automatic read_dm(input int unsigned a, output word_t d);
    @(negedge clk);
    core_dm_rd_en = 1'b1;
    core_dm_addr  = 10'(a);
    @(negedge clk);
    core_dm_rd_en = 1'b0;
    d = core_dm_data;
  endtask

  initial begin
    word_t d;
    data_in = '0; sof_in_n = 1; eof_in_n = 1; src_rdy_in_n = 1;
    core_dm_rd_en = 0; core_dm_addr = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    for (int k = 0; k < ROUNDS; k++) round(k, 7'(32 + k));
    wait (core_done);

    // data packets to random slots
    for (int k = 0; k < NDATA; k++) begin
      word_t p[$];
      automatic logic [6:0] slot = 7'($urandom);
      automatic int len = $urandom_range(1, 8);
      p = {make_hdr0(P_DATA, 8'h01, 8'h44, 8'(len)), 32'h44,
           word_t'({3'(K_R), 5'd0, 8'h44, 9'd0, slot})};
      for (int i = 0; i < len; i++) p.push_back($urandom);
      if (exp_st[slot]) begin
        for (int i = 0; i < len; i++) exp_dm[int'({slot, 3'(i)})] = p[3 + i];
        e_store++;
      end else e_drop++;
      send(p);
    end
    wait (res_done);
    while (exp_refs.size() > 0 || exp_res.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);

    foreach (exp_dm[a]) begin
      read_dm(a, d);
      check(d == exp_dm[a], $sformatf("data memory word %0d: %h, expected %h", a, d, exp_dm[a]));
    end

    check(got_refs == e_ref && n_ref == e_ref, $sformatf("reference packets %0d/%0d of %0d", got_refs, n_ref, e_ref));
    check(got_res == NRES && n_res == NRES, $sformatf("result packets %0d/%0d", got_res, n_res));
    check(n_act == ROUNDS && n_sready == ROUNDS, $sformatf("activations %0d, subtask_ready %0d", n_act, n_sready));
    check(n_def == e_def, $sformatf("deferred %0d, expected %0d", n_def, e_def));
    check(n_const == e_const, $sformatf("constants %0d, expected %0d", n_const, e_const));
    check(n_dstore == e_store && n_ddrop == e_drop,
          $sformatf("data stored %0d dropped %0d, expected %0d %0d", n_dstore, n_ddrop, e_store, e_drop));
    check(e_store > 0 && e_drop > 0, "data packets both stored and dropped");
    $display("rounds=%0d refs=%0d consts=%0d deferred=%0d stored=%0d dropped=%0d results=%0d",
             ROUNDS, e_ref, e_const, e_def, e_store, e_drop, NRES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
