// tsram_cpe: CAM Priority Encoder (CPE).
//
// Receives the potential match address (PMA) and hit flag of each of the L
// layers and selects the final match address (MA). Layer 0 holds the lowest
// original addresses, so the lowest layer that hits wins and
// MA = layer * K + PMA. The selection is registered: ma_valid follows
// in_valid by one clock. Reset clears ma_valid only.
module tsram_cpe #(
  parameter int unsigned K = tsram_pkg::K_DEF,
  parameter int unsigned L = tsram_pkg::L_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [L-1:0]                  hit,
  input  logic [L-1:0][$clog2(K)-1:0]   pma,
  output logic                          ma_valid,
  output logic                          ma_match,
  output logic [$clog2(L*K)-1:0]        ma
);
  localparam int unsigned AW = $clog2(L * K);

  logic          sel_hit;
  logic [AW-1:0] sel_ma;

  always_comb begin
    sel_hit = 1'b0;
    sel_ma  = '0;
    for (int l = L - 1; l >= 0; l--) begin
      if (hit[l]) begin
        sel_hit = 1'b1;
        sel_ma  = AW'(l * K) | AW'(pma[l]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ma_valid <= 1'b0;
      ma_match <= 1'b0;
      ma       <= '0;
    end else begin
      ma_valid <= in_valid;
      if (in_valid) begin
        ma_match <= sel_hit;
        ma       <= sel_ma;
      end
    end
  end
endmodule
