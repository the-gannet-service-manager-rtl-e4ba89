// ll_sink: testbench receiver for one LocalLink stream.
//
// Collects every packet it takes into `pkts` (one queue of words per
// packet, in arrival order) and the cycle of each packet's last word into
// `eof_cyc`. While `stall` is set it holds dst_rdy_n high on a random half
// of the cycles (changed on the falling edge). `bad_framing` counts words
// that arrive outside a packet or a first word inside one.
module ll_sink (
  ll_if.dst    l,
  input  logic clk,
  input  logic stall
);
  import gannet_pkg::*;

  word_t       pkts[$][$];
  int unsigned eof_cyc[$];
  int unsigned bad_framing = 0;
  int unsigned cyc = 0;
  word_t       cur[$];
  bit          in_pkt = 0;

  initial l.dst_rdy_n = 1'b0;
  always @(negedge clk) l.dst_rdy_n <= stall ? 1'($urandom_range(0, 1)) : 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!l.src_rdy_n && !l.dst_rdy_n) begin
      if (!l.sof_n) begin
        if (in_pkt) bad_framing++;
        cur = {};
        in_pkt = 1;
      end else if (!in_pkt) begin
        bad_framing++;
      end
      cur.push_back(l.data);
      if (!l.eof_n) begin
        pkts.push_back(cur);
        eof_cyc.push_back(cyc);
        in_pkt = 0;
      end
    end
  end
endmodule
