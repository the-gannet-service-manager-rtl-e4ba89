// activate_subtask: activates the code chunk named by a reference packet.
//
// A reference packet is three header words (H1: return-to service id, H2:
// return-as symbol) and one payload word, the reference symbol of the
// subtask to run; its address field names code chunk n. When the packet
// has been taken the code status of chunk n is read:
//   * present: the chunk is activated at once;
//   * absent: the reference is parked in a one-entry pending slot and the
//     input is opened again; it is activated as soon as CodeWrite reports
//     (req_actv) that chunk n has been loaded, or the status shows it.
// A parked reference has priority over a new packet. If a second reference
// finds its code absent while the slot is full, the block waits, and
// starts the parked one first if its code arrives meanwhile. Since all
// packet types share one input link, that code cannot arrive while the
// block waits: two references ahead of their code therefore hang the
// Service Manager until reset. Code is expected to be loaded before it is
// referenced, so this is left as a known limit.
// Activation streams the chunk's words from the code memory (synchronous
// read, one cycle latency) to ParseSubtask over LocalLink, one word per
// cycle, with sof_n on the first word and eof_n on the last; the first
// read is issued in the cycle activation starts. The return-to id, the
// return-as symbol and the chunk address are held on side outputs for the
// whole stream. New reference packets are taken only while no chunk is
// being streamed. The document gives activation on a reference packet and
// activation by Req_Actv when code arrives later; the one-entry pending
// slot and the timing are this design's.
module activate_subtask (
  input  logic                    clk,
  input  logic                    rst_n,
  ll_if.dst                       in,
  // code status memory read port
  output gannet_pkg::chunk_addr_t cs_rd_addr,
  input  logic                    cs_rd_present,
  input  logic [3:0]              cs_rd_len,
  // activation request from CodeWrite
  input  logic                    req_actv,
  input  gannet_pkg::chunk_addr_t req_actv_addr,
  input  logic [3:0]              req_actv_len,
  // code memory read port
  output logic                    cm_rd_en,
  output logic [9:0]              cm_rd_addr,
  input  gannet_pkg::word_t       cm_rd_data,
  // code stream to ParseSubtask and its side information
  ll_if.src                       out,
  output logic [7:0]              act_ret_to,
  output gannet_pkg::word_t       act_ret_as,
  output gannet_pkg::chunk_addr_t act_chunk,
  // event pulses
  output logic                    activated,
  output logic                    deferred
);
  import gannet_pkg::*;

  typedef enum logic [1:0] {A_HDR, A_CHECK, A_RUN} state_e;

  typedef struct packed {
    logic [7:0]  ret_to;
    word_t       ret_as;
    chunk_addr_t chunk;
  } actv_t;

  state_e state;
  logic [1:0] hdr_idx;
  logic       got_ref;
  actv_t      cur;             // reference just received
  actv_t      pend;            // parked reference
  logic       pend_valid;
  logic       pend_ready_q;    // code of the parked chunk has arrived
  logic [3:0] pend_len_q;
  logic [3:0] act_len;
  logic [3:0] rd_idx, sent_idx;
  logic       v;               // cm_rd_data holds a word not yet sent

  logic in_xfer, fire, issue;
  logic req_cur, req_pend, pend_go, cur_go, start;
  logic [3:0] pend_len, start_len;
  actv_t start_ctx;

  assign req_cur  = req_actv && (req_actv_addr == cur.chunk);
  assign req_pend = req_actv && (req_actv_addr == pend.chunk);

  // Status read: the new reference while checking it, else the parked one
  assign cs_rd_addr = (state == A_CHECK) ? cur.chunk : pend.chunk;

  always_comb begin
    pend_go = 1'b0;
    cur_go  = 1'b0;
    if (pend_valid) begin
      if (state == A_HDR && hdr_idx == 2'd0)
        pend_go = req_pend || pend_ready_q || cs_rd_present;
      else if (state == A_CHECK && !(cs_rd_present || req_cur))
        pend_go = req_pend || pend_ready_q;
    end
    if (state == A_CHECK) cur_go = cs_rd_present || req_cur;
    if (req_pend)          pend_len = req_actv_len;
    else if (pend_ready_q) pend_len = pend_len_q;
    else                   pend_len = cs_rd_len;
    start     = pend_go || cur_go;
    start_ctx = cur_go ? cur : pend;
    start_len = cur_go ? (req_cur ? req_actv_len : cs_rd_len) : pend_len;
  end

  assign in.dst_rdy_n = !(state == A_HDR && !pend_go);
  assign in_xfer      = !in.src_rdy_n && !in.dst_rdy_n;

  // Code stream
  assign fire  = !out.src_rdy_n && !out.dst_rdy_n;
  assign issue = start || (state == A_RUN && rd_idx < act_len && (!v || fire));
  assign cm_rd_en   = issue;
  assign cm_rd_addr = start ? {start_ctx.chunk, 3'd0}
                            : {act_chunk, rd_idx[CHUNK_W-1:0]};
  assign out.data      = cm_rd_data;
  assign out.src_rdy_n = !(state == A_RUN && v);
  assign out.sof_n     = !(sent_idx == 4'd0);
  assign out.eof_n     = !(sent_idx == act_len - 4'd1);

  assign activated = start;
  assign deferred  = (state == A_CHECK) && !cur_go && !pend_go && !pend_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= A_HDR;
      hdr_idx      <= '0;
      got_ref      <= 1'b0;
      cur          <= '0;
      pend         <= '0;
      pend_valid   <= 1'b0;
      pend_ready_q <= 1'b0;
      pend_len_q   <= '0;
      act_len      <= '0;
      act_ret_to   <= '0;
      act_ret_as   <= '0;
      act_chunk    <= '0;
      rd_idx       <= '0;
      sent_idx     <= '0;
      v            <= 1'b0;
    end else begin
      // Remember that the parked chunk's code has arrived
      if (req_pend && pend_valid && !pend_go) begin
        pend_ready_q <= 1'b1;
        pend_len_q   <= req_actv_len;
      end

      // Receive a reference packet
      if (in_xfer) begin
        if (!in.sof_n) begin
          hdr_idx <= 2'd1;
          got_ref <= 1'b0;
        end else begin
          unique case (hdr_idx)
            2'd1: begin cur.ret_to <= in.data[7:0]; hdr_idx <= 2'd2; end
            2'd2: begin cur.ret_as <= in.data;      hdr_idx <= 2'd3; end
            2'd3: if (!got_ref) begin
                    cur.chunk <= sym_addr(in.data);
                    got_ref   <= 1'b1;
                  end
            default: ;
          endcase
        end
        if (!in.eof_n) begin
          hdr_idx <= 2'd0;
          if (got_ref || (in.sof_n && hdr_idx == 2'd3)) begin
            state <= A_CHECK;
            if (!got_ref) cur.chunk <= sym_addr(in.data);
          end
        end
      end

      if (state == A_CHECK && !start && !pend_valid) begin
        pend         <= cur;
        pend_valid   <= 1'b1;
        pend_ready_q <= 1'b0;
        state        <= A_HDR;
      end

      // Start an activation
      if (start) begin
        act_len    <= start_len;
        act_ret_to <= start_ctx.ret_to;
        act_ret_as <= start_ctx.ret_as;
        act_chunk  <= start_ctx.chunk;
        rd_idx     <= 4'd1;
        sent_idx   <= 4'd0;
        state      <= A_RUN;
        if (pend_go) begin
          if (state == A_CHECK) begin
            // the new reference takes the freed slot
            pend         <= cur;
            pend_ready_q <= 1'b0;
          end else begin
            pend_valid   <= 1'b0;
            pend_ready_q <= 1'b0;
          end
        end
      end else if (state == A_RUN) begin
        if (issue) rd_idx <= rd_idx + 4'd1;
        if (fire) begin
          sent_idx <= sent_idx + 4'd1;
          if (sent_idx == act_len - 4'd1) state <= A_HDR;
        end
      end

      v <= issue ? 1'b1 : (fire ? 1'b0 : v);
    end
  end
endmodule
