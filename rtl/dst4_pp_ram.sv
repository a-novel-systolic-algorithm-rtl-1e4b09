// dst4_pp_ram: double-banked ("ping-pong") RAM used for every reordering in
// the DST-IV pipeline.
//
// A permutation of a length-N sequence is done by writing it in one order and
// reading it back in another; one RAM of N words per sequence is enough for
// that. Two banks of DEPTH words let one block be written while the previous
// one is read, so successive transforms stream without stalls; the bank is
// chosen by wr_bank and rd_bank, the word by wr_addr and rd_addr. The second
// bank is this design's own addition for streaming.
//
// One write port and one read port, both synchronous: a write is visible to a
// read issued on a later cycle, and rd_data holds the word addressed on the
// previous cycle. The array is left uninitialised; the pipeline never reads a
// word before writing it.
module dst4_pp_ram #(
  parameter int W     = 24,
  parameter int DEPTH = 11,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
    rd_data <= mem[rd_bank][rd_addr];
  end

endmodule
