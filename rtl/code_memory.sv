// code_memory: the Service Manager's code store.
//
// A simple dual-port RAM of DEPTH words: one synchronous write port, used
// by CodeWrite to store the payload of code packets, and one synchronous
// read port, used by ActivateSubtask to fetch an activated code chunk.
// Read data appears one cycle after rd_en and holds its value while rd_en
// is low, like a block RAM with an output enable. Code chunk n occupies
// words n*8 .. n*8+7. The 1024-word depth is this design's choice, made to
// match the 1024-word data memory (the document shows code words at RAM
// addresses 152..159, one 8-word chunk).
module code_memory #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  gannet_pkg::word_t        wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output gannet_pkg::word_t        rd_data
);
  gannet_pkg::word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
