// code_status_memory: one status entry per code chunk.
//
// Each entry holds a present flag (the chunk has been loaded by a code
// packet) and the chunk length in words (1..8, stored as 0..8). CodeWrite
// writes an entry when it has stored a code packet; CodeWrite reads
// the present flag, ActivateSubtask flag and length, through
// combinational read ports. Reset clears every
// present flag. The document names this memory and says activation waits
// for the status to be set; the entry layout is this design's choice.
module code_status_memory #(
  parameter int unsigned ENTRIES = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_addr,
  input  logic                       wr_present,
  input  logic [3:0]                 wr_len,
  input  logic [$clog2(ENTRIES)-1:0] rd0_addr,
  output logic                       rd0_present,
  input  logic [$clog2(ENTRIES)-1:0] rd1_addr,
  output logic                       rd1_present,
  output logic [3:0]                 rd1_len
);
  logic       present [ENTRIES];
  logic [3:0] len     [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) present[i] <= 1'b0;
    end else if (wr_en) begin
      present[wr_addr] <= wr_present;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) len[wr_addr] <= wr_len;
  end

  assign rd0_present = present[rd0_addr];
  assign rd1_present = present[rd1_addr];
  assign rd1_len     = len[rd1_addr];
endmodule
