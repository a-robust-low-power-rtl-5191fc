// tsram_tb: end-to-end test of the T-SRAM at its default size (512 x 8).
//
// A reference TCAM (arrays of value, don't-care mask and valid flag, searched
// by a plain loop for the lowest matching address) runs beside the design.
// The test checks the initial clear time, the worked example of four
// overlapping entries at locations 0 to 3 that all match one key (location 0
// must win), then a random mix of inserts, overwrites, deletes and searches.
// Every result is compared with the reference, including the per-layer
// activation flags, and every latency is checked: 5 clocks per search,
// 4 * 2^W clocks of writing per update, upd_done one clock later. It counts how often each mechanism happened
// (VM early rejection, K-bit AND miss, LPE choice between several entries of
// a layer, CPE choice between layers, search stalled by an update,
// back-to-back searches, delete, overwrite) and fails a mechanism never seen.
module tsram_tb;
  import tsram_pkg::*;

  localparam int unsigned W  = W_DEF;
  localparam int unsigned N  = N_DEF;
  localparam int unsigned K  = K_DEF;
  localparam int unsigned L  = L_DEF;
  localparam int unsigned DW = N * W;
  localparam int unsigned E  = L * K;
  localparam int unsigned AW = $clog2(E);
  localparam longint SEARCH_LAT = 5;
  localparam longint UPD_LAT    = 4 * (2 ** W) + 1;  // upd_done one clock after the last write

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          search_valid = 1'b0;
  logic          search_ready;
  logic [DW-1:0] search_key = '0;
  logic          ma_valid, ma_match;
  logic [AW-1:0] ma;
  logic          upd_valid = 1'b0;
  logic          upd_ready;
  logic [AW-1:0] upd_addr = '0;
  logic [DW-1:0] upd_value = '0;
  logic [DW-1:0] upd_dc = '0;
  logic          upd_insert = 1'b0;
  logic          upd_done, busy;
  logic [L-1:0]  ma_layer_act;

  tsram dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference table
  logic [DW-1:0] ref_val [E];
  logic [DW-1:0] ref_dc  [E];
  logic          ref_v   [E];

  // mechanism counters
  int n_hit = 0, n_vm_reject = 0, n_kand_miss = 0, n_lpe_multi = 0, n_cpe_multi = 0;
  int n_stall = 0, n_b2b = 0, n_delete = 0, n_overwrite = 0, n_insert = 0;

  // expected results, pushed when a key is accepted
  typedef struct {
    logic         match;
    logic [AW-1:0] ma;
    logic [L-1:0] act;
    longint       t;
  } exp_t;
  exp_t expq[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic exp_t ref_search(input logic [DW-1:0] key);
    exp_t r;
    int first_layer_hits;
    int layers_hit;
    r.match = 1'b0; r.ma = '0; r.act = '0; r.t = 0;
    layers_hit = 0;
    first_layer_hits = 0;
    for (int l = 0; l < L; l++) begin
      bit any_hit = 0;
      bit all_parts = 1;
      for (int n = 0; n < N; n++) begin
        bit part = 0;
        for (int k = 0; k < K; k++) begin
          int e = l * K + k;
          if (ref_v[e] && subword_match(32'(key[n*W +: W]), 32'(ref_val[e][n*W +: W]),
                                        32'(ref_dc[e][n*W +: W]), W))
            part = 1;
        end
        if (!part) all_parts = 0;
      end
      r.act[l] = all_parts;
      for (int k = 0; k < K; k++) begin
        int e = l * K + k;
        if (ref_v[e] && (((key ^ ref_val[e]) & ~ref_dc[e]) == '0)) begin
          if (!r.match) begin
            r.match = 1'b1;
            r.ma = AW'(e);
          end
          if (layers_hit == 0) first_layer_hits++;
          any_hit = 1;
        end
      end
      if (any_hit) layers_hit++;
    end
    if (first_layer_hits > 1) n_lpe_multi++;
    if (layers_hit > 1) n_cpe_multi++;
    if (r.match) n_hit++;
    else if (r.act == '0) n_vm_reject++;
    else n_kand_miss++;
    return r;
  endfunction

  // result monitor
  always @(posedge clk) begin
    if (rst_n && ma_valid) begin
      if (expq.size() == 0) begin
        check(0, "result without a search");
      end else begin
        exp_t x;
        x = expq.pop_front();
        check(ma_match == x.match, $sformatf("match %0b expected %0b", ma_match, x.match));
        if (x.match) check(ma == x.ma, $sformatf("ma %0d expected %0d", ma, x.ma));
        check(ma_layer_act == x.act, $sformatf("layer act %b expected %b", ma_layer_act, x.act));
        check(cyc - x.t == SEARCH_LAT, $sformatf("search latency %0d", cyc - x.t));
      end
    end
  end

  // one search; waits while the design is busy
  task automatic do_search(input logic [DW-1:0] key, input bit idle_after);
    search_valid = 1'b1;
    search_key   = key;
    @(posedge clk);
    while (!search_ready) begin
      n_stall++;
      @(posedge clk);
    end
    begin
      exp_t x;
      x = ref_search(key);
      x.t = cyc;
      expq.push_back(x);
    end
    #1;
    if (idle_after) search_valid = 1'b0;
  endtask

  task automatic do_update(input int addr, input logic [DW-1:0] v, input logic [DW-1:0] d,
                           input bit ins);
    longint t0;
    upd_valid  = 1'b1;
    upd_addr   = AW'(addr);
    upd_value  = v;
    upd_dc     = d;
    upd_insert = ins;
    @(posedge clk);
    while (!upd_ready) @(posedge clk);
    t0 = cyc;
    #1;
    upd_valid = 1'b0;
    if (ins && ref_v[addr]) n_overwrite++;
    if (!ins) n_delete++; else n_insert++;
    ref_val[addr] = v;
    ref_dc[addr]  = d;
    ref_v[addr]   = ins;
    do @(posedge clk); while (!upd_done);
    check(cyc - t0 == UPD_LAT, $sformatf("update latency %0d", cyc - t0));
    #1;
  endtask

  task automatic drain();
    search_valid = 1'b0;
    repeat (int'(SEARCH_LAT) + 2) @(posedge clk);
    check(expq.size() == 0, "results missing");
    #1;
  endtask

  function automatic logic [DW-1:0] rand_dc();
    logic [DW-1:0] d = '0;
    for (int b = 0; b < DW; b++) if ($urandom_range(0, 3) == 0) d[b] = 1'b1;
    return d;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint t_init;
    for (int e = 0; e < E; e++) begin
      ref_val[e] = '0; ref_dc[e] = '0; ref_v[e] = 1'b0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t_init = cyc;
    do @(posedge clk); while (busy);
    check(cyc - t_init == longint'(2 ** W), $sformatf("init took %0d clocks", cyc - t_init));
    #1;

    // empty table: every key misses
    do_search(DW'(8'h55), 1);
    drain();

    // worked example: locations 0..3 all match the key, location 0 wins
    do_update(0, DW'(8'b0101_0101), '0, 1);
    do_search(DW'(8'b0101_1111), 1);   // low sub-word absent: VM rejects
    do_search(DW'(8'b0101_0101), 1);
    drain();
    do_update(1, DW'(8'b0101_0000), DW'(8'b0000_1111), 1);
    do_update(2, DW'(8'b0000_0101), DW'(8'b1111_0000), 1);
    do_update(3, DW'(8'b0000_0000), DW'(8'b1111_1111), 1);
    do_update(E - 1, DW'(8'b0011_1111), DW'(8'b1100_0000), 1);
    do_search(DW'(8'b0101_0101), 1);
    drain();
    do_update(0, '0, '0, 0);      // delete location 0: location 1 wins
    do_search(DW'(8'b0101_0101), 1);
    do_update(3, '0, '0, 0);
    do_search(DW'(8'b1111_1111), 1);   // only the last location matches
    drain();

    // random table contents and searches
    for (int round = 0; round < 12; round++) begin
      for (int u = 0; u < 20; u++) begin
        int a;
        a = $urandom_range(0, E - 1);
        if ($urandom_range(0, 5) == 0) do_update(a, '0, '0, 0);
        else do_update(a, DW'($urandom), rand_dc(), 1);
      end
      // stalled search: request while an update is running
      fork
        do_update($urandom_range(0, E - 1), DW'($urandom), rand_dc(), 1);
        begin
          @(posedge clk); #1;
          do_search(DW'($urandom), 1);
        end
      join
      drain();
      // back-to-back burst
      for (int q = 0; q < 64; q++) begin
        logic [DW-1:0] key;
        if (q % 2 == 0) begin
          int e;
          e = $urandom_range(0, E - 1);
          key = (ref_val[e] & ~ref_dc[e]) | (DW'($urandom) & ref_dc[e]);
        end else begin
          key = DW'($urandom);
        end
        do_search(key, 0);
        if (q > 0) n_b2b++;
      end
      drain();
    end

    $display("mechanisms: hit=%0d vm_reject=%0d kand_miss=%0d lpe_multi=%0d cpe_multi=%0d",
             n_hit, n_vm_reject, n_kand_miss, n_lpe_multi, n_cpe_multi);
    $display("            stall=%0d b2b=%0d insert=%0d delete=%0d overwrite=%0d",
             n_stall, n_b2b, n_insert, n_delete, n_overwrite);
    check(n_hit > 0, "no search hit");
    check(n_vm_reject > 0, "no VM early rejection");
    check(n_kand_miss > 0, "no K-bit AND miss");
    check(n_lpe_multi > 0, "LPE never chose between entries");
    check(n_cpe_multi > 0, "CPE never chose between layers");
    check(n_stall > 0, "no stalled search");
    check(n_b2b > 0, "no back-to-back search");
    check(n_delete > 0, "no delete");
    check(n_overwrite > 0, "no overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
