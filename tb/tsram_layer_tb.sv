// tsram_layer_tb: test of one T-SRAM layer (W = 4, N = 2, K = 16).
//
// The testbench loads the VMs, the OATAMs (with a random permutation, so the
// OATA indirection is exercised) and the OATs directly through the write
// port, keeping its own copy. For every key it computes the activation as the
// AND of the VM bits, the K-bit AND of the OAT rows reached through the
// OATAMs and the lowest set bit, and compares them with out_act/out_hit/
// out_pma four clocks after the key entered. Keys are sent back to back.
// Forced read-back keys must return the OAT rows and OATAs three clocks later
// on the upd_* outputs without producing a search result.
module tsram_layer_tb;
  localparam int unsigned W  = 4;
  localparam int unsigned N  = 2;
  localparam int unsigned K  = 16;
  localparam int unsigned PW = $clog2(K);
  localparam int unsigned S  = 2 ** W;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                in_valid = 1'b0, in_force = 1'b0;
  logic [N-1:0][W-1:0] in_key = '0;
  logic                out_valid, out_act, out_hit;
  logic [PW-1:0]       out_pma;
  logic                wr_vm_en = 1'b0, wr_oatam_en = 1'b0, wr_oat_en = 1'b0;
  logic [W-1:0]        wr_sw = '0;
  logic [N-1:0]        wr_vm_data = '0;
  logic [W-1:0]        wr_oatam_data = '0;
  logic [N-1:0][W-1:0] wr_oat_addr = '0;
  logic [N-1:0][K-1:0] wr_oat_data = '0;
  logic                upd_rows_valid;
  logic [N-1:0][K-1:0] upd_rows;
  logic [N-1:0][W-1:0] upd_oata;

  tsram_layer #(.W(W), .N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  logic         m_vm    [N][S];
  logic [W-1:0] m_oatam [S];
  logic [K-1:0] m_oat   [N][S];
  int checks = 0, failures = 0;
  int n_act = 0, n_rej = 0, n_hit = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit force_rb; logic act; logic hit; logic [PW-1:0] pma;
                   logic [N-1:0][K-1:0] rows; logic [N-1:0][W-1:0] oata; longint t; } exp_t;
  exp_t q[$], rq[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic exp_t model(input logic [N-1:0][W-1:0] key, input bit f);
    exp_t x;
    logic [K-1:0] m;
    x.force_rb = f;
    x.act = 1'b1;
    for (int n = 0; n < N; n++) if (!m_vm[n][key[n]]) x.act = 1'b0;
    m = x.act ? '1 : '0;
    for (int n = 0; n < N; n++) begin
      x.oata[n] = m_oatam[key[n]];
      x.rows[n] = m_oat[n][x.oata[n]];
      m &= x.rows[n];
    end
    x.hit = |m;
    x.pma = '0;
    for (int k = K - 1; k >= 0; k--) if (m[k]) x.pma = PW'(k);
    return x;
  endfunction

  // monitors: search results at t4, read-back at t3
  always @(posedge clk) begin
    if (rst_n && upd_rows_valid) begin
      if (rq.size() == 0) check(0, "unexpected read-back");
      else begin
        exp_t x;
        x = rq.pop_front();
        check(cyc - x.t == 3, $sformatf("read-back latency %0d", cyc - x.t));
        check(upd_rows == x.rows && upd_oata == x.oata, "read-back data");
      end
    end
    if (rst_n && out_valid) begin
      if (q.size() == 0) check(0, "unexpected result");
      else begin
        exp_t x;
        x = q.pop_front();
        check(cyc - x.t == 4, $sformatf("search latency %0d", cyc - x.t));
        check(out_act == x.act, $sformatf("act %0b exp %0b", out_act, x.act));
        check(out_hit == x.hit, $sformatf("hit %0b exp %0b", out_hit, x.hit));
        if (x.hit) check(out_pma == x.pma, $sformatf("pma %0d exp %0d", out_pma, x.pma));
      end
    end
  end

  task automatic load_random(input int round);
    int perm [S];
    for (int s = 0; s < S; s++) perm[s] = s;
    perm.shuffle();
    for (int s = 0; s < S; s++) begin
      @(negedge clk);
      wr_vm_en = 1'b1; wr_oatam_en = 1'b1; wr_oat_en = 1'b1;
      wr_sw = W'(s);
      wr_oatam_data = W'(perm[s]);
      m_oatam[s] = W'(perm[s]);
      for (int n = 0; n < N; n++) begin
        wr_vm_data[n] = ($urandom_range(0, 4) != 0);
        m_vm[n][s] = wr_vm_data[n];
        wr_oat_addr[n] = W'(s);
        wr_oat_data[n] = (round % 2 == 0) ? K'($urandom | $urandom) : K'($urandom & $urandom & $urandom);
        m_oat[n][s] = wr_oat_data[n];
      end
    end
    @(negedge clk);
    wr_vm_en = 1'b0; wr_oatam_en = 1'b0; wr_oat_en = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 10; round++) begin
      load_random(round);
      for (int i = 0; i < 200; i++) begin
        bit f;
        exp_t x;
        @(negedge clk);
        f = ($urandom_range(0, 9) == 0);
        in_force = f;
        in_valid = !f && ($urandom_range(0, 4) != 0);
        for (int n = 0; n < N; n++) in_key[n] = W'($urandom);
        if (f || in_valid) begin
          x = model(in_key, f);
          x.t = cyc;
          if (f) rq.push_back(x);
          else q.push_back(x);
          if (!f) begin
            if (x.act) n_act++; else n_rej++;
            if (x.hit) n_hit++;
          end
        end
      end
      @(negedge clk);
      in_valid = 1'b0; in_force = 1'b0;
      repeat (6) @(negedge clk);
      check(q.size() == 0 && rq.size() == 0, "outputs missing");
    end
    check(n_act > 0 && n_rej > 0 && n_hit > 0 && n_hit < n_act, "coverage");
    $display("activated=%0d rejected=%0d hits=%0d", n_act, n_rej, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
