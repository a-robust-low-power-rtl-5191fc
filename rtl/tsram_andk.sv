// tsram_andk: the layer's K-bit AND operation.
//
// ANDs, bit by bit, the K-bit rows read from the N original address tables.
// Bit k of the result is 1 when entry k of the layer matches every sub-word
// of the key. The result is forced to zero when the layer was not activated,
// because the OAT rows are then stale. Purely combinational.
module tsram_andk #(
  parameter int unsigned N = tsram_pkg::N_DEF,
  parameter int unsigned K = tsram_pkg::K_DEF
) (
  input  logic [N-1:0][K-1:0] rows,
  input  logic                act,
  output logic [K-1:0]        match
);
  always_comb begin
    match = act ? '1 : '0;
    for (int n = 0; n < N; n++) match &= rows[n];
  end
endmodule
