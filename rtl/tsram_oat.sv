// tsram_oat: Original Address Table (OAT) of one vertical partition.
//
// A 2^W x K SRAM. Row r, reached through the OATAM, holds one bit per entry
// of the layer: bit k is 1 when entry k of the layer matches the sub-word that
// maps to row r in this partition. The K-bit AND of the rows of all partitions
// leaves exactly the entries that match the whole key.
// One synchronous read port (data valid the cycle after rd_en, held while
// rd_en is low) and one synchronous full-row write port: the port style is
// this design's choice. The array is not reset; the mapper clears it.
module tsram_oat #(
  parameter int unsigned W = tsram_pkg::W_DEF,
  parameter int unsigned K = tsram_pkg::K_DEF
) (
  input  logic         clk,
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic [K-1:0] rd_data,
  input  logic         wr_en,
  input  logic [W-1:0] wr_addr,
  input  logic [K-1:0] wr_data
);
  logic [K-1:0] mem [2**W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
