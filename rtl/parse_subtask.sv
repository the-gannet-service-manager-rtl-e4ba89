// parse_subtask: walks the symbols of an activated subtask.
//
// Input is the code stream of one chunk from ActivateSubtask (sof_n on the
// first symbol, eof_n on the last) with the return-to id, return-as symbol
// and chunk address of the activation on side inputs (taken with the first
// symbol). One symbol is taken per cycle:
//   * service symbol (kind K_S): queued for the service core as it is;
//   * reference symbol (K_R) to chunk n: SymbolStatus of slot n is set to
//     PRESENT, the argument (kind and data-memory address n*8) is queued
//     for the core, and a four-word reference packet is sent out:
//       H0 = {P_REF, dest = symbol's service id, src = SERVICE_ID, len 1}
//       H1 = SERVICE_ID (the result comes back here)
//       H2 = the symbol (the result is returned as this symbol)
//       payload = the symbol (the subtask the receiver must activate);
//     the input waits while the four words go out, one per cycle;
//   * constant symbol (K_B or any other kind): stored in the data memory
//     in the activated chunk's own 8-word area, followed by its extension
//     words when the ext bit is set (the low byte counts them); the
//     argument (kind and address of the stored symbol) is queued.
// After the last symbol the return-to id and then the return-as symbol are
// queued, the latter marked `last` (bit 32 of a queue word), and
// subtask_ready pulses: the core may now run the subtask. Queue words are
// only written while the queue has room; the input waits otherwise.
// Reference packets, SymbolStatus updates, storing constants in the data
// memory and Subtask_ready are the document's; formats, the place where
// constants are stored and the queue record layout are this design's.
module parse_subtask #(
  parameter logic [7:0] SERVICE_ID = 8'd1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  ll_if.dst                       in,
  input  logic [7:0]              act_ret_to,
  input  gannet_pkg::word_t       act_ret_as,
  input  gannet_pkg::chunk_addr_t act_chunk,
  // reference packets out
  ll_if.src                       out,
  // symbol table update
  output logic                    st_set_en,
  output gannet_pkg::chunk_addr_t st_set_addr,
  // data memory write port (constants)
  output logic                    dm_wr_en,
  output logic [9:0]              dm_wr_addr,
  output gannet_pkg::word_t       dm_wr_data,
  // subtask queue towards the service core
  output logic                    sq_wr_en,
  output logic [32:0]             sq_wr_data,
  input  logic                    sq_full,
  output logic                    subtask_ready,
  // event pulses
  output logic                    ref_sent,
  output logic                    const_stored
);
  import gannet_pkg::*;

  typedef enum logic [2:0] {PS_SYM, PS_REF, PS_EXT, PS_TAIL0, PS_TAIL1} state_e;

  state_e      state;
  word_t       ref_sym;
  logic [1:0]  out_idx;
  logic        last_q;        // the symbol being finished was the last one
  logic [7:0]  ext_left;
  logic [2:0]  cptr;          // next free word of the constant area
  logic [7:0]  ret_to;
  word_t       ret_as;
  chunk_addr_t chunk;
  chunk_addr_t chunk_now;

  logic      xfer, fire;
  sym_kind_e kind;

  assign kind      = sym_kind(in.data);
  assign chunk_now = !in.sof_n ? act_chunk : chunk;

  assign in.dst_rdy_n = !((state == PS_SYM && !sq_full) || state == PS_EXT);
  assign xfer = !in.src_rdy_n && !in.dst_rdy_n;
  assign fire = !out.src_rdy_n && !out.dst_rdy_n;

  // Symbol table and data memory
  assign st_set_en   = xfer && state == PS_SYM && kind == K_R;
  assign st_set_addr = sym_addr(in.data);
  assign dm_wr_en    = xfer && (state == PS_EXT ||
                                (state == PS_SYM && kind != K_R && kind != K_S));
  assign dm_wr_addr  = {chunk_now, cptr};
  assign dm_wr_data  = in.data;

  // Subtask queue
  always_comb begin
    sq_wr_en   = 1'b0;
    sq_wr_data = '0;
    if (state == PS_SYM && xfer) begin
      sq_wr_en = 1'b1;
      unique case (kind)
        K_S:     sq_wr_data = {1'b0, in.data};
        K_R:     sq_wr_data = {1'b0, make_arg(K_R, {sym_addr(in.data), 3'd0})};
        default: sq_wr_data = {1'b0, make_arg(K_B, {chunk_now, cptr})};
      endcase
    end else if (state == PS_TAIL0 && !sq_full) begin
      sq_wr_en   = 1'b1;
      sq_wr_data = {1'b0, 24'd0, ret_to};
    end else if (state == PS_TAIL1 && !sq_full) begin
      sq_wr_en   = 1'b1;
      sq_wr_data = {1'b1, ret_as};
    end
  end
  assign subtask_ready = (state == PS_TAIL1) && !sq_full;

  // Reference packet out
  always_comb begin
    unique case (out_idx)
      2'd0:    out.data = make_hdr0(P_REF, sym_service(ref_sym), SERVICE_ID, 8'd1);
      2'd1:    out.data = {24'd0, SERVICE_ID};
      default: out.data = ref_sym;
    endcase
  end
  assign out.src_rdy_n = !(state == PS_REF);
  assign out.sof_n     = !(out_idx == 2'd0);
  assign out.eof_n     = !(out_idx == 2'd3);
  assign ref_sent      = fire && out_idx == 2'd3;
  assign const_stored  = xfer && state == PS_SYM && kind != K_R && kind != K_S;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= PS_SYM;
      ref_sym  <= '0;
      out_idx  <= '0;
      last_q   <= 1'b0;
      ext_left <= '0;
      cptr     <= '0;
      ret_to   <= '0;
      ret_as   <= '0;
      chunk    <= '0;
    end else begin
      unique case (state)
        PS_SYM: if (xfer) begin
          if (!in.sof_n) begin
            ret_to <= act_ret_to;
            ret_as <= act_ret_as;
            chunk  <= act_chunk;
          end
          last_q <= !in.eof_n;
          if (kind == K_R) begin
            ref_sym <= in.data;
            out_idx <= 2'd0;
            state   <= PS_REF;
          end else begin
            if (kind != K_S) cptr <= cptr + 3'd1;
            if (kind != K_S && sym_ext(in.data) && in.data[7:0] != 8'd0
                && in.eof_n) begin
              ext_left <= in.data[7:0];
              state    <= PS_EXT;
            end else if (!in.eof_n) begin
              state <= PS_TAIL0;
            end
          end
        end
        PS_REF: if (fire) begin
          out_idx <= out_idx + 2'd1;
          if (out_idx == 2'd3) state <= last_q ? PS_TAIL0 : PS_SYM;
        end
        PS_EXT: if (xfer) begin
          cptr     <= cptr + 3'd1;
          ext_left <= ext_left - 8'd1;
          if (!in.eof_n)              state <= PS_TAIL0;
          else if (ext_left == 8'd1)  state <= PS_SYM;
        end
        PS_TAIL0: if (!sq_full) state <= PS_TAIL1;
        PS_TAIL1: if (!sq_full) begin
          state <= PS_SYM;
          cptr  <= '0;
        end
        default: state <= PS_SYM;
      endcase
    end
  end
endmodule
