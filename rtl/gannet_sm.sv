// gannet_sm: the Gannet Service Manager with the data memory of its
// service module.
//
// The Service Manager sits between the network interface of a
// packet-switched NoC and a service core (an IP block that knows nothing
// of the rest of the system) and controls the dataflow for it. Programs
// arrive as packets of three kinds:
//   * code packet: one compiled subtask (a service symbol followed by
//     reference and constant symbols); stored in the code memory and its
//     code status set to present;
//   * reference packet: a request to run a stored subtask; the subtask is
//     activated (at once, or as soon as its code arrives) and parsed: each
//     reference symbol sends a new reference packet to the service that
//     holds that subtask and marks the symbol's slot in the symbol table
//     present; each constant is written to the data memory; the subtask is
//     queued for the service core, which is told by subtask_ready;
//   * data packet: a result coming back; stored in the data memory chunk
//     of its symbol if that symbol's status is present, else dropped.
// Results of the core are turned into data packets by Packetisation and
// merged with the reference packets onto the outgoing link.
//
// Network side: two LocalLink ports, 32-bit data, active-low sof/eof/
// source-ready/destination-ready; a word moves when both readies are low.
// Core side: the subtask queue (33-bit words, bit 32 marks the last word of
// a subtask record) with subtask_ready, the result queue (32-bit words) with
// result_ready, and a read port into the data memory (one cycle latency).
// Event pulses (activated, deferred, ref_sent, data_stored, data_dropped,
// const_stored, result_sent) are brought out for observation.
//
// The block structure and its connections are those of the document's
// architecture figure; packet and symbol formats, queue depths and the
// side-port formats are this design's choices. With a code packet of 11
// words arriving after the reference packet that requests it, the last of
// the four reference packets it generates leaves 36 cycles after the first
// code word arrived (11 in, 9 to activate and parse, 4 x 4 out).
module gannet_sm #(
  parameter logic [7:0]  SERVICE_ID = 8'd1,
  parameter int unsigned DM_WORDS   = 1024,
  parameter int unsigned CM_WORDS   = 1024,
  parameter int unsigned SQ_DEPTH   = 32,
  parameter int unsigned RQ_DEPTH   = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // LocalLink from the network interface
  input  logic [31:0]                 data_in,
  input  logic                        sof_in_n,
  input  logic                        eof_in_n,
  input  logic                        src_rdy_in_n,
  output logic                        dst_rdy_out_n,
  // LocalLink to the network interface
  output logic [31:0]                 data_out,
  output logic                        sof_out_n,
  output logic                        eof_out_n,
  output logic                        src_rdy_out_n,
  input  logic                        dst_rdy_in_n,
  // subtask queue to the service core
  input  logic                        subtask_rd,
  output logic [32:0]                 subtask_data,
  output logic                        subtask_empty,
  output logic                        subtask_ready,
  // result queue from the service core
  input  logic                        result_wr,
  input  logic [31:0]                 result_data,
  output logic                        result_full,
  input  logic                        result_ready,
  // service core read port into the data memory
  input  logic                        core_dm_rd_en,
  input  logic [$clog2(DM_WORDS)-1:0] core_dm_addr,
  output logic [31:0]                 core_dm_data,
  // event pulses
  output logic                        ev_activated,
  output logic                        ev_deferred,
  output logic                        ev_ref_sent,
  output logic                        ev_const_stored,
  output logic                        ev_data_stored,
  output logic                        ev_data_dropped,
  output logic                        ev_result_sent,
  output logic                        ev_pkt_discarded
);
  import gannet_pkg::*;

  ll_if l_in   (.clk(clk), .rst_n(rst_n));
  ll_if l_code (.clk(clk), .rst_n(rst_n));
  ll_if l_ref  (.clk(clk), .rst_n(rst_n));
  ll_if l_data (.clk(clk), .rst_n(rst_n));
  ll_if l_act  (.clk(clk), .rst_n(rst_n));
  ll_if l_refo (.clk(clk), .rst_n(rst_n));
  ll_if l_res  (.clk(clk), .rst_n(rst_n));
  ll_if l_out  (.clk(clk), .rst_n(rst_n));

  assign l_in.data      = data_in;
  assign l_in.sof_n     = sof_in_n;
  assign l_in.eof_n     = eof_in_n;
  assign l_in.src_rdy_n = src_rdy_in_n;
  assign dst_rdy_out_n  = l_in.dst_rdy_n;

  assign data_out        = l_out.data;
  assign sof_out_n       = l_out.sof_n;
  assign eof_out_n       = l_out.eof_n;
  assign src_rdy_out_n   = l_out.src_rdy_n;
  assign l_out.dst_rdy_n = dst_rdy_in_n;

  // ---------------------------------------------------------------- DeMux
  sm_demux u_demux (
    .clk, .rst_n, .in(l_in), .code_o(l_code), .ref_o(l_ref), .data_o(l_data),
    .dropped(ev_pkt_discarded)
  );

  // ---------------------------------------------------- code store path
  logic        cm_wr_en, cm_rd_en;
  logic [9:0]  cm_wr_addr, cm_rd_addr;
  word_t       cm_wr_data, cm_rd_data;
  logic        cs_wr_en;
  chunk_addr_t cs_wr_addr, cs_rd1_addr, cw_cs_rd_addr;
  logic [3:0]  cs_wr_len, cs_rd1_len;
  logic        cs_rd1_present, cw_cs_rd_present;
  logic        req_actv;
  chunk_addr_t req_actv_addr;
  logic [3:0]  req_actv_len;

  code_write u_code_write (
    .clk, .rst_n, .in(l_code),
    .cm_wr_en, .cm_wr_addr, .cm_wr_data,
    .cs_rd_addr(cw_cs_rd_addr), .cs_rd_present(cw_cs_rd_present),
    .cs_wr_en, .cs_wr_addr, .cs_wr_len,
    .req_actv, .req_actv_addr, .req_actv_len
  );

  code_memory #(.DEPTH(CM_WORDS)) u_code_memory (
    .clk,
    .wr_en(cm_wr_en), .wr_addr($clog2(CM_WORDS)'(cm_wr_addr)), .wr_data(cm_wr_data),
    .rd_en(cm_rd_en), .rd_addr($clog2(CM_WORDS)'(cm_rd_addr)), .rd_data(cm_rd_data)
  );

  code_status_memory u_code_status (
    .clk, .rst_n,
    .wr_en(cs_wr_en), .wr_addr(cs_wr_addr), .wr_present(1'b1), .wr_len(cs_wr_len),
    .rd0_addr(cw_cs_rd_addr), .rd0_present(cw_cs_rd_present),
    .rd1_addr(cs_rd1_addr), .rd1_present(cs_rd1_present), .rd1_len(cs_rd1_len)
  );

  // ------------------------------------------------- activation and parsing
  logic [7:0]  act_ret_to;
  word_t       act_ret_as;
  chunk_addr_t act_chunk;

  activate_subtask u_activate (
    .clk, .rst_n, .in(l_ref),
    .cs_rd_addr(cs_rd1_addr), .cs_rd_present(cs_rd1_present), .cs_rd_len(cs_rd1_len),
    .req_actv, .req_actv_addr, .req_actv_len,
    .cm_rd_en, .cm_rd_addr, .cm_rd_data,
    .out(l_act), .act_ret_to, .act_ret_as, .act_chunk,
    .activated(ev_activated), .deferred(ev_deferred)
  );

  logic        st_set_en;
  chunk_addr_t st_set_addr, st_rd_addr;
  logic        st_rd_present;
  logic        ps_dm_wr_en;
  logic [9:0]  ps_dm_wr_addr;
  word_t       ps_dm_wr_data;
  logic        sq_wr_en, sq_full;
  logic [32:0] sq_wr_data;

  parse_subtask #(.SERVICE_ID(SERVICE_ID)) u_parse (
    .clk, .rst_n, .in(l_act), .act_ret_to, .act_ret_as, .act_chunk,
    .out(l_refo),
    .st_set_en, .st_set_addr,
    .dm_wr_en(ps_dm_wr_en), .dm_wr_addr(ps_dm_wr_addr), .dm_wr_data(ps_dm_wr_data),
    .sq_wr_en, .sq_wr_data, .sq_full, .subtask_ready,
    .ref_sent(ev_ref_sent), .const_stored(ev_const_stored)
  );

  symbol_table u_symbol_table (
    .clk, .rst_n,
    .set_en(st_set_en), .set_addr(st_set_addr),
    .rd_addr(st_rd_addr), .rd_present(st_rd_present)
  );

  // ---------------------------------------------------------- data path
  logic                        dw_dm_wr_en;
  logic [$clog2(DM_WORDS)-1:0] dw_dm_wr_addr;
  word_t                       dw_dm_wr_data;

  data_write #(.DM_WORDS(DM_WORDS)) u_data_write (
    .clk, .rst_n, .in(l_data),
    .st_rd_addr, .st_rd_present,
    .dm_wr_en(dw_dm_wr_en), .dm_wr_addr(dw_dm_wr_addr), .dm_wr_data(dw_dm_wr_data),
    .stored(ev_data_stored), .dropped(ev_data_dropped)
  );

  data_memory #(.DEPTH(DM_WORDS)) u_data_memory (
    .clk,
    .a_wr_en(dw_dm_wr_en), .a_addr(dw_dm_wr_addr), .a_data(dw_dm_wr_data),
    .b_wr_en(ps_dm_wr_en), .b_addr($clog2(DM_WORDS)'(ps_dm_wr_addr)), .b_data(ps_dm_wr_data),
    .c_rd_en(core_dm_rd_en), .c_addr(core_dm_addr), .c_data(core_dm_data)
  );

  // ------------------------------------------------ service core queues
  sync_fifo #(.WIDTH(33), .DEPTH(SQ_DEPTH)) u_subtask_q (
    .clk, .rst_n,
    .wr_en(sq_wr_en), .wr_data(sq_wr_data),
    .rd_en(subtask_rd), .rd_data(subtask_data),
    .empty(subtask_empty), .full(sq_full)
  );

  logic  rq_rd_en, rq_empty;
  word_t rq_rd_data;

  sync_fifo #(.WIDTH(32), .DEPTH(RQ_DEPTH)) u_result_q (
    .clk, .rst_n,
    .wr_en(result_wr), .wr_data(result_data),
    .rd_en(rq_rd_en), .rd_data(rq_rd_data),
    .empty(rq_empty), .full(result_full)
  );

  packetisation #(.SERVICE_ID(SERVICE_ID)) u_packetisation (
    .clk, .rst_n, .result_ready,
    .rq_rd_en, .rq_rd_data, .rq_empty,
    .out(l_res), .pkt_sent(ev_result_sent)
  );

  // ---------------------------------------------------------- OutputMux
  output_mux u_output_mux (
    .clk, .rst_n, .in0(l_refo), .in1(l_res), .out(l_out)
  );
endmodule
