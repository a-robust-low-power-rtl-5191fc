// tsram_oatam: Original Address Table Address Memory (OATAM) of one partition.
//
// A 2^W x W SRAM. Indexed by a sub-word, it returns the OAT row address
// (OATA) under which that sub-word's original addresses are kept. Reads are
// only enabled while the layer's activation signal is high, so a layer whose
// validation memories rejected the key spends no OATAM/OAT read energy.
// One synchronous read port (data valid the cycle after rd_en, held while
// rd_en is low) and one synchronous write port, which is this design's choice.
// The array is not reset; the mapper loads it after reset.
module tsram_oatam #(
  parameter int unsigned W = tsram_pkg::W_DEF
) (
  input  logic         clk,
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic [W-1:0] rd_data,
  input  logic         wr_en,
  input  logic [W-1:0] wr_addr,
  input  logic [W-1:0] wr_data
);
  logic [W-1:0] mem [2**W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
