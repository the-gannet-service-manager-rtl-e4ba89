// tb_code_write: sends code packets and checks every code memory write
// (address chunk*8+i, payload word i; words past the eighth dropped), the
// code status update (present, number of words stored) and the req_actv
// pulse one cycle after the last word, raised only when the chunk was not
// present before. A small model of the code status memory answers the
// block's status reads.
`timescale 1ns/1ps
module tb_code_write;
  import gannet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ll_if l_in (.clk, .rst_n);
  logic        cm_wr_en, cs_wr_en, req_actv;
  logic [9:0]  cm_wr_addr;
  word_t       cm_wr_data;
  chunk_addr_t cs_rd_addr, cs_wr_addr, req_actv_addr;
  logic        cs_rd_present;
  logic [3:0]  cs_wr_len, req_actv_len;

  code_write dut (.clk, .rst_n, .in(l_in), .cm_wr_en, .cm_wr_addr, .cm_wr_data,
                  .cs_rd_addr, .cs_rd_present, .cs_wr_en, .cs_wr_addr, .cs_wr_len,
                  .req_actv, .req_actv_addr, .req_actv_len);
  ll_source src (.l(l_in), .clk);

  // models
  word_t cm [1024];
  bit    present [128];
  logic [3:0] len [128];
  int    n_req = 0, last_req_cyc = 0;
  chunk_addr_t last_req_addr;
  logic [3:0]  last_req_len;
  int unsigned last_cs_cyc = 0;
  assign cs_rd_present = present[cs_rd_addr];
  always @(posedge clk) begin
    if (cm_wr_en) cm[cm_wr_addr] <= cm_wr_data;
    if (cs_wr_en) begin
      present[cs_wr_addr] <= 1'b1;
      len[cs_wr_addr] <= cs_wr_len;
      last_cs_cyc <= src.cyc;
    end
    if (req_actv) begin
      n_req++;
      last_req_addr = req_actv_addr;
      last_req_len  = req_actv_len;
      last_req_cyc  = src.cyc;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic code_pkt(input chunk_addr_t c, input int n, input int gaps, input bit fresh);
    word_t p[$];
    int nreq0, stored;
    nreq0 = n_req;
    p = {make_hdr0(P_CODE, 8'd1, 8'd2, 8'(n)), 32'h20, word_t'({25'h1A0_0000, c})};
    for (int i = 0; i < n; i++) p.push_back({8'(c), 8'(n), 16'(i)});
    src.send(p, gaps);
    repeat (3) @(posedge clk);
    stored = (n > 8) ? 8 : n;
    for (int i = 0; i < stored; i++)
      check(cm[{c, 3'(i)}] == {8'(c), 8'(n), 16'(i)}, $sformatf("chunk %0d word %0d", c, i));
    check(present[c] && len[c] == 4'(stored), $sformatf("chunk %0d status", c));
    if (fresh) begin
      check(n_req == nreq0 + 1 && last_req_addr == c && last_req_len == 4'(stored),
            $sformatf("chunk %0d req_actv", c));
      check(last_req_cyc == last_cs_cyc + 1, "req_actv one cycle after the status update");
    end else begin
      check(n_req == nreq0, $sformatf("chunk %0d reloaded: no req_actv", c));
    end
  endtask

  initial begin
    foreach (present[i]) present[i] = 1'b0;
    foreach (cm[i]) cm[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    code_pkt(7'd19, 8, 0, 1);
    code_pkt(7'd3, 1, 2, 1);
    code_pkt(7'd100, 11, 1, 1);   // longer than a chunk
    code_pkt(7'd19, 5, 0, 0);     // reload
    for (int k = 0; k < 10; k++) code_pkt(7'(20 + k), $urandom_range(1, 8), $urandom_range(0, 2), 1);
    check(cm[{7'd18, 3'd7}] == '0 && cm[{7'd20, 3'd0}] != '0, "no writes outside chunks");
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
