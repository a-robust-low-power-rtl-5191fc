// tsram_full_table_tb: the 512 x 8 table filled to capacity.
//
// Writes all L*K entries (random values, about one bit in four a don't care),
// then searches every one of the 2^(N*W) keys back to back and compares each
// result with a reference TCAM. It then deletes every other entry and
// searches all keys again. Default parameters throughout; a full fill takes
// L*K*(4*2^W+2) clocks.
module tsram_full_table_tb;
  import tsram_pkg::*;

  localparam int unsigned DW = N_DEF * W_DEF;
  localparam int unsigned E  = L_DEF * K_DEF;
  localparam int unsigned AW = $clog2(E);

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
  logic [L_DEF-1:0] ma_layer_act;

  tsram dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] r_val [E];
  logic [DW-1:0] r_dc  [E];
  logic          r_v   [E];
  int checks = 0, failures = 0, n_hits = 0;
  typedef struct { logic m; logic [AW-1:0] a; } exp_t;
  exp_t q[$];

  function automatic exp_t ref_search(input logic [DW-1:0] key);
    exp_t r;
    r.m = 1'b0; r.a = '0;
    for (int e = E - 1; e >= 0; e--)
      if (r_v[e] && (((key ^ r_val[e]) & ~r_dc[e]) == '0)) begin
        r.m = 1'b1; r.a = AW'(e);
      end
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && ma_valid) begin
      exp_t x;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: result without a search");
      end else begin
        x = q.pop_front();
        if (ma_match !== x.m || (x.m && ma !== x.a)) begin
          failures++;
          $display("FAIL: got %0b/%0d expected %0b/%0d", ma_match, ma, x.m, x.a);
        end
        if (x.m) n_hits++;
      end
    end
  end

  task automatic update(input int a, input bit ins, input logic [DW-1:0] v, input logic [DW-1:0] d);
    @(negedge clk);
    upd_valid = 1'b1; upd_addr = AW'(a); upd_insert = ins; upd_value = v; upd_dc = d;
    @(posedge clk);
    while (!upd_ready) @(posedge clk);
    #1 upd_valid = 1'b0;
    r_v[a] = ins; r_val[a] = v; r_dc[a] = d;
    do @(posedge clk); while (!upd_done);
  endtask

  task automatic search_all();
    for (int k = 0; k < 2 ** DW; k++) begin
      @(negedge clk);
      search_valid = 1'b1;
      search_key = DW'(k);
      @(posedge clk);
      while (!search_ready) @(posedge clk);
      q.push_back(ref_search(DW'(k)));
    end
    @(negedge clk);
    search_valid = 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) begin r_v[e] = 0; r_val[e] = '0; r_dc[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do @(posedge clk); while (busy);
    for (int e = 0; e < E; e++) begin
      logic [DW-1:0] d;
      for (int b = 0; b < int'(DW); b++) d[b] = ($urandom_range(0, 3) == 0);
      update(e, 1'b1, DW'($urandom), d);
    end
    search_all();
    for (int e = 0; e < E; e += 2) update(e, 1'b0, '0, '0);
    search_all();
    $display("searches that hit: %0d", n_hits);
    checks++;
    if (n_hits == 0) begin failures++; $display("FAIL: no hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
