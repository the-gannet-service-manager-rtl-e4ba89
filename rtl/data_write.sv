// data_write: stores data packets in the data memory, or drops them.
//
// A data packet is three header words followed by its payload. The third
// header word is the symbol the data is returned as; its address field
// selects symbol-table slot n. The SymbolStatus of slot n is read while
// that word is on the input: if it is PRESENT (a reference packet for this
// symbol has been sent out), payload word i is written to data memory word
// n*8+i as it arrives (words beyond the eighth are discarded); if it is
// ABSENT, the whole packet is taken and discarded. At the last word
// `stored` or `dropped` pulses. The block never stalls its input.
// Storing only when the status is PRESENT, and dropping otherwise, is the
// document's; the chunk placement and header layout are this design's.
module data_write #(
  parameter int unsigned DM_WORDS = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  ll_if.dst                           in,
  // symbol table read port
  output gannet_pkg::chunk_addr_t     st_rd_addr,
  input  logic                        st_rd_present,
  // data memory write port
  output logic                        dm_wr_en,
  output logic [$clog2(DM_WORDS)-1:0] dm_wr_addr,
  output gannet_pkg::word_t           dm_wr_data,
  output logic                        stored,
  output logic                        dropped
);
  import gannet_pkg::*;

  logic        xfer;
  logic [1:0]  hdr_idx;
  logic [3:0]  wcount;
  chunk_addr_t slot;
  logic        accept;
  logic        in_payload;
  logic        at_h2;

  assign in.dst_rdy_n = 1'b0;
  assign xfer       = !in.src_rdy_n;
  assign in_payload = in.sof_n && (hdr_idx == 2'd3);
  assign at_h2      = in.sof_n && (hdr_idx == 2'd2);
  assign st_rd_addr = sym_addr(in.data);

  assign dm_wr_en   = xfer && in_payload && accept && (wcount < 4'(CHUNK_WORDS));
  assign dm_wr_addr = $clog2(DM_WORDS)'({slot, wcount[CHUNK_W-1:0]});
  assign dm_wr_data = in.data;

  assign stored  = xfer && !in.eof_n && in_payload && accept;
  assign dropped = xfer && !in.eof_n && !(in_payload && accept);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hdr_idx <= '0;
      wcount  <= '0;
      slot    <= '0;
      accept  <= 1'b0;
    end else if (xfer) begin
      if (at_h2) begin
        slot   <= sym_addr(in.data);
        accept <= st_rd_present;
      end
      if (!in.eof_n) begin
        hdr_idx <= '0;
        wcount  <= '0;
        accept  <= 1'b0;
      end else begin
        if (!in_payload) hdr_idx <= (!in.sof_n) ? 2'd1 : hdr_idx + 2'd1;
        if (!in.sof_n)     wcount <= '0;
        else if (dm_wr_en) wcount <= wcount + 4'd1;
      end
    end
  end
endmodule
