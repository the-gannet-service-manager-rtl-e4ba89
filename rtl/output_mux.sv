// output_mux: merges the two packet sources onto the outgoing LocalLink.
//
// Input 0 carries the reference packets made by ParseSubtask, input 1 the
// result data packets made by Packetisation. When the output is free the
// mux picks a source that offers a first word (sof_n low), with the two
// sources taking turns when both wait, and passes that source's words
// straight through (no register, no added latency) until its word with
// eof_n low has gone out. The other source waits. The document shows this
// multiplexer; the alternating priority is this design's choice.
module output_mux (
  input  logic clk,
  input  logic rst_n,
  ll_if.dst    in0,
  ll_if.dst    in1,
  ll_if.src    out
);
  logic busy_q, sel_q, sel_now, last_q;
  logic req0, req1, xfer;

  assign req0 = !in0.src_rdy_n && !in0.sof_n;
  assign req1 = !in1.src_rdy_n && !in1.sof_n;

  always_comb begin
    if (busy_q)            sel_now = sel_q;
    else if (req0 && req1) sel_now = !last_q;
    else                   sel_now = req1;
  end

  assign out.data      = sel_now ? in1.data  : in0.data;
  assign out.sof_n     = sel_now ? in1.sof_n : in0.sof_n;
  assign out.eof_n     = sel_now ? in1.eof_n : in0.eof_n;
  assign out.src_rdy_n = busy_q ? (sel_now ? in1.src_rdy_n : in0.src_rdy_n)
                                : !(req0 || req1);
  assign in0.dst_rdy_n = out.dst_rdy_n || sel_now  || (!busy_q && !req0);
  assign in1.dst_rdy_n = out.dst_rdy_n || !sel_now || (!busy_q && !req1);
  assign xfer = !out.src_rdy_n && !out.dst_rdy_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      sel_q  <= 1'b0;
      last_q <= 1'b1;
    end else if (xfer) begin
      busy_q <= out.eof_n;
      sel_q  <= sel_now;
      if (!busy_q) last_q <= sel_now;
    end
  end
endmodule
