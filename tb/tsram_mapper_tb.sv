// tsram_mapper_tb: test of the T-SRAM mapper (W = 4, N = 2, K = 8, L = 4).
//
// The layers are replaced by an array model of their VM, OATAM and OAT
// contents: the model applies the mapper's writes and answers each forced
// read-back three clocks later with the OAT rows and OATAs of the injected
// sub-word. After reset and after every insert or delete the whole model is
// compared with what a reference table of ternary entries implies: OAT bit k
// of row s in partition n is 1 exactly when entry k of that layer is valid and
// covers s in sub-word n, and VM bit s is the OR of that row. The OATAMs must
// hold the identity map. The time from reset to the end of busy (2^W clocks)
// and from an accepted request to upd_done (4 * 2^W + 1 clocks) is checked.
module tsram_mapper_tb;
  import tsram_pkg::*;

  localparam int unsigned W  = 4;
  localparam int unsigned N  = 2;
  localparam int unsigned K  = 8;
  localparam int unsigned L  = 4;
  localparam int unsigned S  = 2 ** W;
  localparam int unsigned E  = L * K;
  localparam int unsigned AW = $clog2(E);

  logic                       clk = 1'b0, rst_n = 1'b0;
  logic                       upd_valid = 1'b0, upd_ready;
  logic [AW-1:0]              upd_addr = '0;
  logic [N*W-1:0]             upd_value = '0, upd_dc = '0;
  logic                       upd_insert = 1'b0;
  logic                       upd_done, busy;
  logic [L-1:0]               inj_force;
  logic [N-1:0][W-1:0]        inj_key;
  logic [L-1:0]               rb_valid;
  logic [L-1:0][N-1:0][K-1:0] rb_rows;
  logic [L-1:0][N-1:0][W-1:0] rb_oata;
  logic [L-1:0]               wr_vm_en, wr_oatam_en, wr_oat_en;
  logic [W-1:0]               wr_sw;
  logic [N-1:0]               wr_vm_data;
  logic [W-1:0]               wr_oatam_data;
  logic [N-1:0][W-1:0]        wr_oat_addr;
  logic [N-1:0][K-1:0]        wr_oat_data;

  tsram_mapper #(.W(W), .N(N), .K(K), .L(L)) dut (.*);

  always #5 clk = ~clk;

  // memory model of the layers, starting from random contents
  logic         m_vm    [L][N][S];
  logic [W-1:0] m_oatam [L][S];
  logic [K-1:0] m_oat   [L][N][S];
  // read-back pipeline of the model: three clocks
  logic [L-1:0]        f1, f2, f3;
  logic [N-1:0][W-1:0] k1, k2;
  logic [L-1:0][N-1:0][W-1:0] oata2, oata3;
  logic [L-1:0][N-1:0][K-1:0] rows3;

  always_ff @(posedge clk) begin
    f1 <= rst_n ? inj_force : '0;
    f2 <= f1;
    f3 <= f2;
    k1 <= inj_key;
    for (int l = 0; l < L; l++) begin
      for (int n = 0; n < N; n++) begin
        oata2[l][n] <= m_oatam[l][k1[n]];
        oata3[l][n] <= oata2[l][n];
        rows3[l][n] <= m_oat[l][n][oata2[l][n]];
      end
    end
    for (int l = 0; l < L; l++) begin
      if (wr_oatam_en[l]) m_oatam[l][wr_sw] <= wr_oatam_data;
      for (int n = 0; n < N; n++) begin
        if (wr_vm_en[l]) m_vm[l][n][wr_sw] <= wr_vm_data[n];
        if (wr_oat_en[l]) m_oat[l][n][wr_oat_addr[n]] <= wr_oat_data[n];
      end
    end
  end
  assign rb_valid = f3;
  assign rb_rows  = rows3;
  assign rb_oata  = oata3;

  logic [N*W-1:0] r_val [E];
  logic [N*W-1:0] r_dc  [E];
  logic           r_v   [E];
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic check_tables();
    int bad = 0;
    for (int l = 0; l < L; l++)
      for (int s = 0; s < S; s++) begin
        if (m_oatam[l][s] != W'(s)) bad++;
        for (int n = 0; n < N; n++) begin
          logic [K-1:0] row;
          row = '0;
          for (int k = 0; k < K; k++) begin
            int e;
            e = l * K + k;
            row[k] = r_v[e] && subword_match(32'(s), 32'(r_val[e][n*W +: W]),
                                             32'(r_dc[e][n*W +: W]), W);
          end
          if (m_oat[l][n][s] != row) bad++;
          if (m_vm[l][n][s] != (|row)) bad++;
        end
      end
    check(bad == 0, $sformatf("%0d table words differ", bad));
  endtask

  task automatic update(input int a, input bit ins, input logic [N*W-1:0] v,
                        input logic [N*W-1:0] d);
    longint t0;
    @(negedge clk);
    upd_valid = 1'b1; upd_addr = AW'(a); upd_insert = ins; upd_value = v; upd_dc = d;
    @(posedge clk);
    while (!upd_ready) @(posedge clk);
    t0 = cyc;
    #1 upd_valid = 1'b0;
    r_v[a] = ins; r_val[a] = v; r_dc[a] = d;
    do @(posedge clk); while (!upd_done);
    check(cyc - t0 == longint'(4 * S + 1), $sformatf("update took %0d", cyc - t0));
    check(upd_ready && !busy, "ready after update");
    #1;
    check_tables();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    for (int e = 0; e < E; e++) begin r_v[e] = 0; r_val[e] = '0; r_dc[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t0 = cyc;
    check(busy && !upd_ready, "busy after reset");
    do @(posedge clk); while (busy);
    check(cyc - t0 == longint'(S), $sformatf("init took %0d", cyc - t0));
    #1;
    check_tables();
    for (int i = 0; i < 120; i++) begin
      int a;
      logic [N*W-1:0] d;
      a = $urandom_range(0, E - 1);
      d = '0;
      for (int b = 0; b < int'(N * W); b++) d[b] = ($urandom_range(0, 2) == 0);
      update(a, ($urandom_range(0, 4) != 0), (N*W)'($urandom), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
