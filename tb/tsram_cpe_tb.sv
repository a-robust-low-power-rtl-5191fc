// tsram_cpe_tb: test of the CAM priority encoder.
//
// Random per-layer hit flags and PMAs; the match address must be
// layer * K + PMA of the lowest layer that hits, registered one clock after
// in_valid, and ma_valid must follow in_valid by exactly one clock.
module tsram_cpe_tb;
  localparam int unsigned K  = 64;
  localparam int unsigned L  = 8;
  localparam int unsigned PW = $clog2(K);
  localparam int unsigned AW = $clog2(L * K);

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic [L-1:0]         hit = '0;
  logic [L-1:0][PW-1:0] pma = '0;
  logic                 ma_valid, ma_match;
  logic [AW-1:0]        ma;
  int checks = 0, failures = 0;

  tsram_cpe #(.K(K), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      logic v, em;
      int e;
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      in_valid = v;
      hit = L'($urandom) & L'($urandom);
      if (i % 10 == 0) hit = '0;
      for (int l = 0; l < L; l++) pma[l] = PW'($urandom);
      em = 1'b0; e = 0;
      for (int l = L - 1; l >= 0; l--) if (hit[l]) begin em = 1'b1; e = l * K + int'(pma[l]); end
      @(negedge clk);
      checks++;
      if (ma_valid !== v) begin
        failures++;
        $display("FAIL ma_valid=%0b expected %0b", ma_valid, v);
      end
      if (v) begin
        checks++;
        if (ma_match !== em || (em && int'(ma) != e)) begin
          failures++;
          $display("FAIL hit=%b ma=%0d/%0b expected %0d/%0b", hit, ma, ma_match, e, em);
        end
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
