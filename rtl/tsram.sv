// tsram: T-SRAM, a ternary CAM built from SRAM blocks (512 x 8 by default).
//
// The TCAM table of L*K entries of N*W bits is split into L layers of K
// entries; inside a layer every entry is split into N sub-words of W bits.
// A search key is sent to all layers at once. Each layer checks its sub-words
// in the validation memories, reads the original address rows of the sub-words
// that passed, ANDs them and reports its highest-priority matching entry
// (PMA). The CAM priority encoder (CPE) then picks the lowest matching
// original address as the match address MA. Entry 0 has the highest priority.
//
// Interface and timing (this design's choices):
//   search_valid/search_key are taken when search_ready is high; one key per
//   clock. ma_valid rises five clocks later with ma_match (some entry matched)
//   and ma. Results come out in key order. ma_layer_act tells, per layer,
//   whether the key passed the layer's validation memories (a status output
//   for observing the early-termination path).
//   upd_valid/upd_addr/upd_value/upd_dc/upd_insert write (insert=1) or delete
//   (insert=0) the entry at original address upd_addr; a 1 in upd_dc marks a
//   don't-care bit. It is taken when upd_ready is high and takes 4 * 2^W
//   clocks, during which busy is high and search_ready low; upd_done pulses
//   4 * 2^W + 1 clocks after the request was taken. After reset the
//   design spends 2^W clocks clearing its memories (busy high).
// A key that was accepted before an update completes is searched against the
// table as it was when it was accepted.
module tsram #(
  parameter int unsigned W = tsram_pkg::W_DEF,
  parameter int unsigned N = tsram_pkg::N_DEF,
  parameter int unsigned K = tsram_pkg::K_DEF,
  parameter int unsigned L = tsram_pkg::L_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // search
  input  logic                    search_valid,
  output logic                    search_ready,
  input  logic [N*W-1:0]          search_key,
  output logic                    ma_valid,
  output logic                    ma_match,
  output logic [$clog2(L*K)-1:0]  ma,
  // table update
  input  logic                    upd_valid,
  output logic                    upd_ready,
  input  logic [$clog2(L*K)-1:0]  upd_addr,
  input  logic [N*W-1:0]          upd_value,
  input  logic [N*W-1:0]          upd_dc,
  input  logic                    upd_insert,
  output logic                    upd_done,
  output logic                    busy,
  // per layer: the 1-bit AND let the key through (valid with ma_valid)
  output logic [L-1:0]            ma_layer_act
);
  localparam int unsigned PW = $clog2(K);

  logic [L-1:0]                  inj_force;
  logic [N-1:0][W-1:0]           inj_key;
  logic [L-1:0]                  rb_valid;
  logic [L-1:0][N-1:0][K-1:0]    rb_rows;
  logic [L-1:0][N-1:0][W-1:0]    rb_oata;
  logic [L-1:0]                  wr_vm_en, wr_oatam_en, wr_oat_en;
  logic [W-1:0]                  wr_sw;
  logic [N-1:0]                  wr_vm_data;
  logic [W-1:0]                  wr_oatam_data;
  logic [N-1:0][W-1:0]           wr_oat_addr;
  logic [N-1:0][K-1:0]           wr_oat_data;

  logic [L-1:0]                  l_valid, l_act, l_hit;
  logic [L-1:0][PW-1:0]          l_pma;
  logic                          s_take;

  assign search_ready = ~busy;
  assign s_take       = search_valid & search_ready;

  tsram_mapper #(.W(W), .N(N), .K(K), .L(L)) u_mapper (
    .clk, .rst_n,
    .upd_valid, .upd_ready, .upd_addr, .upd_value, .upd_dc, .upd_insert,
    .upd_done, .busy,
    .inj_force, .inj_key,
    .rb_valid, .rb_rows, .rb_oata,
    .wr_vm_en, .wr_oatam_en, .wr_oat_en, .wr_sw, .wr_vm_data,
    .wr_oatam_data, .wr_oat_addr, .wr_oat_data
  );

  for (genvar l = 0; l < L; l++) begin : g_layer
    tsram_layer #(.W(W), .N(N), .K(K)) u_layer (
      .clk, .rst_n,
      .in_valid       (s_take),
      .in_force       (inj_force[l]),
      .in_key         (inj_force[l] ? inj_key : search_key),
      .out_valid      (l_valid[l]),
      .out_act        (l_act[l]),
      .out_hit        (l_hit[l]),
      .out_pma        (l_pma[l]),
      .wr_vm_en       (wr_vm_en[l]),
      .wr_oatam_en    (wr_oatam_en[l]),
      .wr_oat_en      (wr_oat_en[l]),
      .wr_sw          (wr_sw),
      .wr_vm_data     (wr_vm_data),
      .wr_oatam_data  (wr_oatam_data),
      .wr_oat_addr    (wr_oat_addr),
      .wr_oat_data    (wr_oat_data),
      .upd_rows_valid (rb_valid[l]),
      .upd_rows       (rb_rows[l]),
      .upd_oata       (rb_oata[l])
    );
  end

  tsram_cpe #(.K(K), .L(L)) u_cpe (
    .clk, .rst_n,
    .in_valid (|l_valid),
    .hit      (l_hit),
    .pma      (l_pma),
    .ma_valid, .ma_match, .ma
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           ma_layer_act <= '0;
    else if (|l_valid)    ma_layer_act <= l_act;
  end
endmodule
