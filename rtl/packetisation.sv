// packetisation: turns a result of the service core into a data packet.
//
// The service core writes each result into the result queue as a record:
//   word 0  = {16'b0, length[7:0], return-to service id[7:0]}
//   word 1  = return-as symbol
//   words 2.. = `length` payload words
// and pulses result_ready once the whole record is in the queue. For every
// such pulse this block pops the two leading words and sends
//   H0 = {P_DATA, dest = return-to, src = SERVICE_ID, length}
//   H1 = SERVICE_ID
//   H2 = return-as symbol
// followed by the payload words taken straight from the queue, one word
// per cycle while the output is ready. The symbol lets the receiving
// Service Manager find the data chunk the result belongs to. The document
// names Packetisation, the result queue and Result_ready; the record
// layout and the header layout are this design's.
module packetisation #(
  parameter logic [7:0] SERVICE_ID = 8'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              result_ready,
  output logic              rq_rd_en,
  input  gannet_pkg::word_t rq_rd_data,
  input  logic              rq_empty,
  ll_if.src                 out,
  output logic              pkt_sent
);
  import gannet_pkg::*;

  typedef enum logic [2:0] {Q_IDLE, Q_W1, Q_H0, Q_H1, Q_H2, Q_PAY} state_e;

  state_e     state;
  logic [7:0] pending;        // complete records waiting in the queue
  logic [7:0] dest, len, sent;
  word_t      ret_as;
  logic       fire, take;

  assign fire = !out.src_rdy_n && !out.dst_rdy_n;
  assign take = (state == Q_IDLE && pending != 8'd0 && !rq_empty);

  always_comb begin
    rq_rd_en = 1'b0;
    if (take) rq_rd_en = 1'b1;
    if (state == Q_W1 && !rq_empty) rq_rd_en = 1'b1;
    if (state == Q_PAY && fire) rq_rd_en = 1'b1;
  end

  always_comb begin
    unique case (state)
      Q_H0:    out.data = make_hdr0(P_DATA, dest, SERVICE_ID, len);
      Q_H1:    out.data = {24'd0, SERVICE_ID};
      Q_H2:    out.data = ret_as;
      default: out.data = rq_rd_data;
    endcase
  end
  assign out.src_rdy_n = !(state inside {Q_H0, Q_H1, Q_H2} ||
                           (state == Q_PAY && !rq_empty));
  assign out.sof_n = !(state == Q_H0);
  assign out.eof_n = !((state == Q_H2 && len == 8'd0) ||
                       (state == Q_PAY && sent == len - 8'd1));
  assign pkt_sent  = fire && !out.eof_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= Q_IDLE;
      pending <= '0;
      dest    <= '0;
      len     <= '0;
      sent    <= '0;
      ret_as  <= '0;
    end else begin
      pending <= pending + 8'(result_ready) - 8'(take);
      unique case (state)
        Q_IDLE: if (take) begin
          dest  <= rq_rd_data[7:0];
          len   <= rq_rd_data[15:8];
          state <= Q_W1;
        end
        Q_W1: if (!rq_empty) begin
          ret_as <= rq_rd_data;
          state  <= Q_H0;
        end
        Q_H0: if (fire) state <= Q_H1;
        Q_H1: if (fire) state <= Q_H2;
        Q_H2: if (fire) begin
          sent  <= '0;
          state <= (len == 8'd0) ? Q_IDLE : Q_PAY;
        end
        Q_PAY: if (fire) begin
          sent <= sent + 8'd1;
          if (sent == len - 8'd1) state <= Q_IDLE;
        end
        default: state <= Q_IDLE;
      endcase
    end
  end
endmodule
