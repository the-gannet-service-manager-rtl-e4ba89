// sm_demux: the input demultiplexer of the Service Manager.
//
// Every packet arriving from the network interface is steered, whole, to
// the block that handles its type: code packets to CodeWrite, reference
// packets to ActivateSubtask and data packets to DataWrite (the three
// basic packet types of the document). The type is read from the first
// header word (bits [31:29]) while sof_n is low and the choice is held
// until the word with eof_n low has passed. A packet of any other type, or
// a stray word outside a packet, is taken and discarded; `dropped` pulses
// for each discarded first word. Routing is combinational: there is no
// added latency, and the ready of the chosen output is passed back to the
// input. The discard rule is this design's choice.
module sm_demux (
  input  logic clk,
  input  logic rst_n,
  ll_if.dst    in,
  ll_if.src    code_o,
  ll_if.src    ref_o,
  ll_if.src    data_o,
  output logic dropped
);
  import gannet_pkg::*;

  typedef enum logic [1:0] {SEL_DROP, SEL_CODE, SEL_REF, SEL_DATA} sel_e;

  logic busy_q;
  sel_e sel_q, sel_now, sel_new;
  logic xfer;

  always_comb begin
    unique case (pkt_type(in.data))
      P_CODE:  sel_new = SEL_CODE;
      P_REF:   sel_new = SEL_REF;
      P_DATA:  sel_new = SEL_DATA;
      default: sel_new = SEL_DROP;
    endcase
    if (busy_q)          sel_now = sel_q;
    else if (!in.sof_n)  sel_now = sel_new;
    else                 sel_now = SEL_DROP;
  end

  assign code_o.data = in.data;
  assign ref_o.data  = in.data;
  assign data_o.data = in.data;
  assign code_o.sof_n = in.sof_n;
  assign ref_o.sof_n  = in.sof_n;
  assign data_o.sof_n = in.sof_n;
  assign code_o.eof_n = in.eof_n;
  assign ref_o.eof_n  = in.eof_n;
  assign data_o.eof_n = in.eof_n;
  assign code_o.src_rdy_n = in.src_rdy_n || (sel_now != SEL_CODE);
  assign ref_o.src_rdy_n  = in.src_rdy_n || (sel_now != SEL_REF);
  assign data_o.src_rdy_n = in.src_rdy_n || (sel_now != SEL_DATA);

  always_comb begin
    unique case (sel_now)
      SEL_CODE: in.dst_rdy_n = code_o.dst_rdy_n;
      SEL_REF:  in.dst_rdy_n = ref_o.dst_rdy_n;
      SEL_DATA: in.dst_rdy_n = data_o.dst_rdy_n;
      default:  in.dst_rdy_n = 1'b0;
    endcase
  end

  assign xfer    = !in.src_rdy_n && !in.dst_rdy_n;
  assign dropped = xfer && (sel_now == SEL_DROP) && !busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      sel_q  <= SEL_DROP;
    end else if (xfer) begin
      busy_q <= in.eof_n;
      sel_q  <= sel_now;
    end
  end
endmodule
