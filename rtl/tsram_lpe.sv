// tsram_lpe: Layer Priority Encoder (LPE).
//
// Picks the potential match address (PMA) of a layer from the K-bit AND
// result: the index of the lowest set bit, since a lower original address has
// higher priority (location 0 wins over locations 1 to 3 in the worked
// example). hit is 0 when no bit is set; pma is then 0. Combinational.
module tsram_lpe #(
  parameter int unsigned K = tsram_pkg::K_DEF
) (
  input  logic [K-1:0]         match,
  output logic                 hit,
  output logic [$clog2(K)-1:0] pma
);
  always_comb begin
    hit = 1'b0;
    pma = '0;
    for (int k = K - 1; k >= 0; k--) begin
      if (match[k]) begin
        hit = 1'b1;
        pma = k[$clog2(K)-1:0];
      end
    end
  end
endmodule
