// ll_source: testbench driver for one LocalLink stream.
//
// send(words, gap_max) offers the words as one packet (sof_n on the first,
// eof_n on the last). Before each word it may idle for 0..gap_max cycles.
// Words are driven on the falling clock edge and the ready is sampled just
// after it, so a word moves on the next rising edge when dst_rdy_n was low.
// first_cyc holds the value of `cyc` at the rising edge that moved the
// first word of the last packet sent.
module ll_source (
  ll_if.src    l,
  input  logic clk
);
  import gannet_pkg::*;

  int unsigned cyc = 0;
  int unsigned first_cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    l.data      = '0;
    l.sof_n     = 1'b1;
    l.eof_n     = 1'b1;
    l.src_rdy_n = 1'b1;
  end

  task automatic send(input word_t w[$], input int unsigned gap_max);
    bit ok;
    @(negedge clk);
    for (int i = 0; i < w.size(); i++) begin
      if (gap_max != 0) begin
        l.src_rdy_n = 1'b1;
        repeat ($urandom_range(0, gap_max)) @(negedge clk);
      end
      l.data      = w[i];
      l.sof_n     = !(i == 0);
      l.eof_n     = !(i == w.size() - 1);
      l.src_rdy_n = 1'b0;
      do begin
        #1;
        ok = !l.dst_rdy_n;
        if (ok && i == 0) first_cyc = cyc;
        @(negedge clk);
      end while (!ok);
    end
    l.src_rdy_n = 1'b1;
    l.sof_n     = 1'b1;
    l.eof_n     = 1'b1;
  endtask
endmodule
