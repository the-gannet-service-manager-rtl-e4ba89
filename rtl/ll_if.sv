// ll_if: one LocalLink stream, as used on every internal path of the
// Service Manager. All control signals are active low, as on the Xilinx
// LocalLink interface: a word moves on a rising clock edge when both
// src_rdy_n and dst_rdy_n are low; sof_n marks the first word of a packet
// and eof_n the last. The source may not withdraw or change a word it
// offers until it has been taken (checked by the assertions below).
interface ll_if (input logic clk, input logic rst_n);
  import gannet_pkg::*;

  word_t data;
  logic  sof_n;
  logic  eof_n;
  logic  src_rdy_n;
  logic  dst_rdy_n;

  modport src (output data, output sof_n, output eof_n, output src_rdy_n,
               input dst_rdy_n);
  modport dst (input data, input sof_n, input eof_n, input src_rdy_n,
               output dst_rdy_n);

  // A word that is offered and not taken must still be offered, unchanged,
  // in the next cycle.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (!src_rdy_n && dst_rdy_n) |=> (!src_rdy_n && $stable(data)
                                     && $stable(sof_n) && $stable(eof_n)));
endinterface
