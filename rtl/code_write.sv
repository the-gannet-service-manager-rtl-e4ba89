// code_write: stores code packets in the code memory.
//
// A code packet is three header words followed by the symbols of one code
// chunk. The third header word is the reference symbol that names the
// chunk; its address field selects chunk n, and payload word i is written
// to code memory word n*8+i as it arrives (words beyond the eighth are
// discarded). When the last word has been taken, the chunk's entry in the
// code status memory is set to present with the number of words stored,
// and in the next cycle req_actv pulses with the chunk address and length, so that a
// reference packet that arrived before its code can now be activated.
// The status is read when the chunk address arrives: a chunk that was
// already present is overwritten but raises no req_actv, since no
// reference can be waiting for it. The block never stalls its input (dst_rdy_n is held low).
// The document gives the storing, the status update and the Req_Actv
// signal; the packet layout and the timing are this design's.
module code_write (
  input  logic                    clk,
  input  logic                    rst_n,
  ll_if.dst                       in,
  // code memory write port
  output logic                    cm_wr_en,
  output logic [9:0]              cm_wr_addr,
  output gannet_pkg::word_t       cm_wr_data,
  // code status memory read and write ports
  output gannet_pkg::chunk_addr_t cs_rd_addr,
  input  logic                    cs_rd_present,
  output logic                    cs_wr_en,
  output gannet_pkg::chunk_addr_t cs_wr_addr,
  output logic [3:0]              cs_wr_len,
  // activation request towards ActivateSubtask
  output logic                    req_actv,
  output gannet_pkg::chunk_addr_t req_actv_addr,
  output logic [3:0]              req_actv_len
);
  import gannet_pkg::*;

  logic        xfer;
  logic [1:0]  hdr_idx;     // 0..2 while in the header, 3 in the payload
  logic [3:0]  wcount;      // payload words stored so far
  chunk_addr_t chunk;
  chunk_addr_t chunk_now;
  logic        in_payload;
  logic        was_present;   // the chunk was already loaded before

  assign in.dst_rdy_n = 1'b0;
  assign xfer = !in.src_rdy_n;

  // A new packet restarts the header count even if the previous one was cut
  assign in_payload = !in.sof_n ? 1'b0 : (hdr_idx == 2'd3);
  assign chunk_now  = (hdr_idx == 2'd2 && in.sof_n) ? sym_addr(in.data) : chunk;

  assign cm_wr_en   = xfer && in_payload && (wcount < 4'(CHUNK_WORDS));
  assign cm_wr_addr = {chunk, wcount[CHUNK_W-1:0]};
  assign cm_wr_data = in.data;

  assign cs_rd_addr = chunk_now;

  assign cs_wr_en   = xfer && !in.eof_n && in_payload;
  assign cs_wr_addr = chunk;
  assign cs_wr_len  = cm_wr_en ? wcount + 4'd1 : wcount;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hdr_idx       <= '0;
      wcount        <= '0;
      chunk         <= '0;
      req_actv      <= 1'b0;
      req_actv_addr <= '0;
      req_actv_len  <= '0;
      was_present   <= 1'b0;
    end else begin
      req_actv <= cs_wr_en && !was_present;
      if (cs_wr_en) begin
        req_actv_addr <= chunk;
        req_actv_len  <= cs_wr_len;
      end
      if (xfer) begin
        chunk <= chunk_now;
        if (hdr_idx == 2'd2 && in.sof_n) was_present <= cs_rd_present;
        if (!in.eof_n) begin
          hdr_idx <= '0;
          wcount  <= '0;
        end else begin
          if (!in_payload) hdr_idx <= (!in.sof_n) ? 2'd1 : hdr_idx + 2'd1;
          if (!in.sof_n)   wcount  <= '0;
          else if (cm_wr_en) wcount <= wcount + 4'd1;
        end
      end
    end
  end
endmodule
