// tsram_lpe_tb: test of the layer priority encoder.
//
// Applies one-hot vectors, vectors with several bits set and the empty
// vector; the PMA must be the index of the lowest set bit and hit must be 1
// exactly when some bit is set.
module tsram_lpe_tb;
  localparam int unsigned K = 64;
  logic [K-1:0]         match;
  logic                 hit;
  logic [$clog2(K)-1:0] pma;
  int checks = 0, failures = 0;

  tsram_lpe #(.K(K)) dut (.*);

  task automatic apply(input logic [K-1:0] m);
    int e;
    e = -1;
    for (int k = K - 1; k >= 0; k--) if (m[k]) e = k;
    match = m;
    #1;
    checks++;
    if (hit !== (e >= 0) || (e >= 0 && int'(pma) != e)) begin
      failures++;
      $display("FAIL match=%h hit=%0b pma=%0d expected %0d", m, hit, pma, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    for (int k = 0; k < K; k++) apply(K'(1) << k);
    for (int k = 0; k < K; k++) apply(~((K'(1) << k) - K'(1)));
    for (int i = 0; i < 500; i++) apply({$urandom, $urandom} & {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
