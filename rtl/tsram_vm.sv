// tsram_vm: Validation Memory (VM) of one vertical partition of a T-SRAM layer.
//
// A 2^W x 1 SRAM. It is addressed by a W-bit sub-word of the search key; the
// stored bit is 1 when at least one entry of the layer can match that sub-word
// in this partition, so a 0 ends the search in this layer early.
// Size and meaning follow the architecture; the port style is this design's
// own: one synchronous read port (data valid the cycle after rd_en) and one
// synchronous write port. The read output holds its value while rd_en is low.
// The array is not reset; the mapper clears it after reset.
module tsram_vm #(
  parameter int unsigned W = tsram_pkg::W_DEF
) (
  input  logic         clk,
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic         rd_data,
  input  logic         wr_en,
  input  logic [W-1:0] wr_addr,
  input  logic         wr_data
);
  logic mem [2**W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
