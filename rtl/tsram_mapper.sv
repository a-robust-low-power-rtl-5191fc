// tsram_mapper: writes TCAM entries into the SRAM blocks of a T-SRAM.
//
// A TCAM entry is a value and a don't-care mask of N*W bits stored at an
// original address A. Entry A lives in layer A / K as bit k = A % K of the OAT
// rows. For each partition n and each binary sub-word s (0 .. 2^W-1) the
// mapper sets bit k of that partition's OAT row for s when s is covered by the
// entry's ternary sub-word n, and clears it otherwise (or always, for a
// delete). The VM bit of s is rewritten as the OR of the new row, so it stays
// 1 exactly while some entry of the layer covers s. The OAT row of s is found
// through the OATAM, which the mapper loads with the identity map (OATA = s).
//
// How the table is mapped onto the memories is described only as a function;
// this sequencing is this design's own. After reset the mapper spends 2^W
// clocks clearing every VM and OAT row and loading the OATAMs (busy high).
// An update is accepted when upd_ready is high (upd_valid & upd_ready); the
// mapper then visits the 2^W sub-words one after the other, all N partitions
// in parallel. Each visit injects s into the target layer with the force flag,
// waits three clocks for the OAT rows to come back (rb_valid) and writes the
// modified rows in the fourth clock: 4 * 2^W clocks per update. upd_done
// pulses in the clock after the last write, when upd_ready is high again. The top stops searches while busy is high.
module tsram_mapper #(
  parameter int unsigned W = tsram_pkg::W_DEF,
  parameter int unsigned N = tsram_pkg::N_DEF,
  parameter int unsigned K = tsram_pkg::K_DEF,
  parameter int unsigned L = tsram_pkg::L_DEF
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // entry update request
  input  logic                           upd_valid,
  output logic                           upd_ready,
  input  logic [$clog2(L*K)-1:0]         upd_addr,
  input  logic [N*W-1:0]                 upd_value,
  input  logic [N*W-1:0]                 upd_dc,
  input  logic                           upd_insert,
  output logic                           upd_done,
  output logic                           busy,
  // read-back injection into the layers
  output logic [L-1:0]                   inj_force,
  output logic [N-1:0][W-1:0]            inj_key,
  // read-back from the layers
  input  logic [L-1:0]                   rb_valid,
  input  logic [L-1:0][N-1:0][K-1:0]     rb_rows,
  input  logic [L-1:0][N-1:0][W-1:0]     rb_oata,
  // write port shared by all layers, enables per layer
  output logic [L-1:0]                   wr_vm_en,
  output logic [L-1:0]                   wr_oatam_en,
  output logic [L-1:0]                   wr_oat_en,
  output logic [W-1:0]                   wr_sw,
  output logic [N-1:0]                   wr_vm_data,
  output logic [W-1:0]                   wr_oatam_data,
  output logic [N-1:0][W-1:0]            wr_oat_addr,
  output logic [N-1:0][K-1:0]            wr_oat_data
);
  localparam int unsigned PW = $clog2(K);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_INJ, S_WAIT} state_e;

  state_e               state;
  logic [W-1:0]         s;
  logic [LW-1:0]        layer;
  logic [PW-1:0]        kidx;
  logic [N*W-1:0]       value, dc;
  logic                 insert;
  logic                 last_s;
  logic [N-1:0][K-1:0]  new_rows;

  assign last_s = (s == W'(2**W - 1));

  // new OAT rows of the target layer for sub-word s
  always_comb begin
    for (int n = 0; n < N; n++) begin
      new_rows[n] = rb_rows[layer][n];
      new_rows[n][kidx] = insert &
        tsram_pkg::subword_match(32'(s), 32'(value[n*W +: W]), 32'(dc[n*W +: W]), W);
    end
  end

  always_comb begin
    upd_ready     = (state == S_IDLE);
    busy          = (state != S_IDLE);
    inj_force     = '0;
    inj_key       = {N{s}};
    wr_vm_en      = '0;
    wr_oatam_en   = '0;
    wr_oat_en     = '0;
    wr_sw         = s;
    wr_vm_data    = '0;
    wr_oatam_data = s;
    wr_oat_addr   = {N{s}};
    wr_oat_data   = '0;
    unique case (state)
      S_INIT: begin
        wr_vm_en    = '1;
        wr_oatam_en = '1;
        wr_oat_en   = '1;
      end
      S_INJ: inj_force[layer] = 1'b1;
      S_WAIT: if (rb_valid[layer]) begin
        wr_vm_en[layer]  = 1'b1;
        wr_oat_en[layer] = 1'b1;
        wr_oat_addr      = rb_oata[layer];
        wr_oat_data      = new_rows;
        for (int n = 0; n < N; n++) wr_vm_data[n] = |new_rows[n];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      s        <= '0;
      layer    <= '0;
      kidx     <= '0;
      value    <= '0;
      dc       <= '0;
      insert   <= 1'b0;
      upd_done <= 1'b0;
    end else begin
      upd_done <= 1'b0;
      unique case (state)
        S_INIT: begin
          s <= s + 1'b1;
          if (last_s) state <= S_IDLE;
        end
        S_IDLE: if (upd_valid) begin
          layer  <= (L > 1) ? LW'(upd_addr >> PW) : '0;
          kidx   <= upd_addr[PW-1:0];
          value  <= upd_value;
          dc     <= upd_dc;
          insert <= upd_insert;
          s      <= '0;
          state  <= S_INJ;
        end
        S_INJ: state <= S_WAIT;
        S_WAIT: if (rb_valid[layer]) begin
          s <= s + 1'b1;
          if (last_s) begin
            state    <= S_IDLE;
            upd_done <= 1'b1;
          end else begin
            state <= S_INJ;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end
endmodule
