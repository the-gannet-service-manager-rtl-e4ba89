// data_memory: the local data RAM (SRAM) of a service module.
//
// DEPTH 32-bit words shared by three users:
//   port A  write, from DataWrite (payload of accepted data packets);
//   port B  write, from ParseSubtask (constant symbols of a subtask);
//   port C  synchronous read, for the service core.
// Port A wins if both write ports hit the same address in one cycle.
// Data chunk n occupies words n*8 .. n*8+7. The 1024-word size is the one
// shown in the document's simulation traces (RAM[0:1023]); the port
// arrangement is this design's choice. Read data appears one cycle after
// c_rd_en and holds while c_rd_en is low.
module data_memory #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     a_wr_en,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  gannet_pkg::word_t        a_data,
  input  logic                     b_wr_en,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  gannet_pkg::word_t        b_data,
  input  logic                     c_rd_en,
  input  logic [$clog2(DEPTH)-1:0] c_addr,
  output gannet_pkg::word_t        c_data
);
  gannet_pkg::word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_wr_en && !(a_wr_en && a_addr == b_addr)) mem[b_addr] <= b_data;
    if (a_wr_en) mem[a_addr] <= a_data;
    if (c_rd_en) c_data <= mem[c_addr];
  end
endmodule
