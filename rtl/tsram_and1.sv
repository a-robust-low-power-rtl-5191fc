// tsram_and1: the layer's 1-bit AND operation.
//
// ANDs the N one-bit outputs of the validation memories. The result is the
// layer's activation signal: high only if every sub-word of the key is present
// in its partition, which lets the search continue into the OATAMs and OATs.
// The force input is this design's addition: the mapper raises it to read the
// OATAM/OAT path of a sub-word that is not (yet) valid. Purely combinational.
module tsram_and1 #(
  parameter int unsigned N = tsram_pkg::N_DEF
) (
  input  logic [N-1:0] vm_bits,
  input  logic         force_act,
  output logic         act
);
  always_comb act = force_act | (&vm_bits);
endmodule
