// symbol_table: the SymbolStatus of every data chunk.
//
// One status bit per symbol-table slot (128 slots, addressed by the 7-bit
// address field of a symbol; the traces show 7-bit symbol-table addresses).
// ParseSubtask sets a slot to PRESENT when it sends out a reference packet
// whose result will come back into that slot; DataWrite reads the status to
// decide whether an arriving data packet is stored or dropped. Reset makes
// every slot ABSENT; nothing else clears a slot, since the document
// describes no event that does. The status names and which blocks read and
// update them are the document's.
module symbol_table #(
  parameter int unsigned ENTRIES = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       set_en,
  input  logic [$clog2(ENTRIES)-1:0] set_addr,
  input  logic [$clog2(ENTRIES)-1:0] rd_addr,
  output logic                       rd_present
);
  typedef enum logic {ABSENT = 1'b0, PRESENT = 1'b1} sym_status_e;

  sym_status_e status [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) status[i] <= ABSENT;
    end else begin
      if (set_en) status[set_addr] <= PRESENT;
    end
  end

  assign rd_present = (status[rd_addr] == PRESENT);
endmodule
