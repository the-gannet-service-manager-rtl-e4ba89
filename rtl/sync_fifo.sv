// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the two queues between the Service Manager and the service core
// (subtask words towards the core, result words back from it). The head
// entry is always visible on rd_data while empty is low; rd_en pops it.
// wr_en while full and rd_en while empty are ignored. A push and a pop may
// happen in the same cycle. Storage is a register array indexed by
// wrapping read and write pointers with one extra bit to tell full from
// empty. The document names these queues ("through FIFO") but gives no
// depth or width; both are parameters here.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32   // must be a power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW:0] wptr, rptr;
  logic do_wr, do_rd;

  assign empty   = (wptr == rptr);
  assign full    = (wptr[PW-1:0] == rptr[PW-1:0]) && (wptr[PW] != rptr[PW]);
  assign rd_data = mem[rptr[PW-1:0]];
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[PW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end
endmodule
