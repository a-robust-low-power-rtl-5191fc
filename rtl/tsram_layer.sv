// tsram_layer: one hybrid-partitioned layer of the T-SRAM.
//
// The layer holds K entries of the TCAM table. Each entry is cut into N
// sub-words of W bits; partition n owns a validation memory VM[n] (2^W x 1),
// an address memory OATAM[n] (2^W x W) and an original address table OAT[n]
// (2^W x K). A search runs through a four-stage pipeline:
//   t0  each sub-word of the key addresses its VM
//   t1  1-bit AND of the VM bits gives the activation signal; only when it is
//       high are the OATAMs read, each at its sub-word
//   t2  the OATAM outputs (OATA) address the OATs
//   t3  K-bit AND of the N OAT rows; the LPE picks the lowest set bit
//   t4  out_valid/out_hit/out_pma registered
// so out_* follow in_valid by four clocks, one new key may enter every clock.
// The structure (VM, OATAM, OAT, 1-bit AND, K-bit AND, LPE, activation
// gating the OATAMs) follows the architecture; the pipeline registers and the
// stage split are this design's choice.
//
// The in_force input and the upd_* outputs serve the mapper: a forced key
// bypasses the VM check so the OATAM/OAT row of a sub-word can be read back
// (upd_rows_valid is high at t3 of that key) and then rewritten through the
// wr_* ports, which write all N partitions in the same clock.
module tsram_layer #(
  parameter int unsigned W = tsram_pkg::W_DEF,
  parameter int unsigned N = tsram_pkg::N_DEF,
  parameter int unsigned K = tsram_pkg::K_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // search (and mapper read-back) input
  input  logic                        in_valid,
  input  logic                        in_force,
  input  logic [N-1:0][W-1:0]         in_key,
  // result, four clocks after in_valid
  output logic                        out_valid,
  output logic                        out_act,
  output logic                        out_hit,
  output logic [$clog2(K)-1:0]        out_pma,
  // mapper write port
  input  logic                        wr_vm_en,
  input  logic                        wr_oatam_en,
  input  logic                        wr_oat_en,
  input  logic [W-1:0]                wr_sw,
  input  logic [N-1:0]                wr_vm_data,
  input  logic [W-1:0]                wr_oatam_data,
  input  logic [N-1:0][W-1:0]         wr_oat_addr,
  input  logic [N-1:0][K-1:0]         wr_oat_data,
  // mapper read-back
  output logic                        upd_rows_valid,
  output logic [N-1:0][K-1:0]         upd_rows,
  output logic [N-1:0][W-1:0]         upd_oata
);
  localparam int unsigned PW = $clog2(K);

  logic [N-1:0]         vm_q;
  logic [N-1:0][W-1:0]  oata_q;
  logic [N-1:0][K-1:0]  row_q;
  logic                 act1;
  logic [K-1:0]         kmatch;
  logic                 lpe_hit;
  logic [PW-1:0]        lpe_pma;

  // pipeline control
  logic                 v1, v2, v3, f1, f2, f3, a2, a3;
  logic [N-1:0][W-1:0]  key1;
  logic [N-1:0][W-1:0]  oata3;

  for (genvar n = 0; n < N; n++) begin : g_part
    tsram_vm #(.W(W)) u_vm (
      .clk     (clk),
      .rd_en   (in_valid | in_force),
      .rd_addr (in_key[n]),
      .rd_data (vm_q[n]),
      .wr_en   (wr_vm_en),
      .wr_addr (wr_sw),
      .wr_data (wr_vm_data[n])
    );
    tsram_oatam #(.W(W)) u_oatam (
      .clk     (clk),
      .rd_en   (act1 & (v1 | f1)),
      .rd_addr (key1[n]),
      .rd_data (oata_q[n]),
      .wr_en   (wr_oatam_en),
      .wr_addr (wr_sw),
      .wr_data (wr_oatam_data)
    );
    tsram_oat #(.W(W), .K(K)) u_oat (
      .clk     (clk),
      .rd_en   (a2),
      .rd_addr (oata_q[n]),
      .rd_data (row_q[n]),
      .wr_en   (wr_oat_en),
      .wr_addr (wr_oat_addr[n]),
      .wr_data (wr_oat_data[n])
    );
  end

  tsram_and1 #(.N(N)) u_and1 (
    .vm_bits   (vm_q),
    .force_act (f1),
    .act       (act1)
  );

  tsram_andk #(.N(N), .K(K)) u_andk (
    .rows  (row_q),
    .act   (a3),
    .match (kmatch)
  );

  tsram_lpe #(.K(K)) u_lpe (
    .match (kmatch),
    .hit   (lpe_hit),
    .pma   (lpe_pma)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, f1, f2, f3, a2, a3} <= '0;
      out_valid <= 1'b0;
      out_act   <= 1'b0;
      out_hit   <= 1'b0;
      out_pma   <= '0;
      key1      <= '0;
      oata3     <= '0;
    end else begin
      v1   <= in_valid;
      f1   <= in_force;
      key1 <= in_key;
      v2   <= v1;
      f2   <= f1;
      a2   <= act1 & (v1 | f1);
      v3   <= v2;
      f3   <= f2;
      a3   <= a2;
      oata3 <= oata_q;
      out_valid <= v3;
      if (v3) begin
        out_act <= a3;
        out_hit <= lpe_hit;
        out_pma <= lpe_pma;
      end
    end
  end

  assign upd_rows_valid = f3;
  assign upd_rows       = row_q;
  assign upd_oata       = oata3;
endmodule
