// tsram_andk_tb: random test of the layer's K-bit AND operation.
//
// Random rows (biased towards ones so that matches survive) are ANDed by a
// loop in the testbench; the result must agree bit for bit, and be all zero
// when the activation input is low.
module tsram_andk_tb;
  localparam int unsigned N = 3;
  localparam int unsigned K = 64;
  logic [N-1:0][K-1:0] rows;
  logic                act;
  logic [K-1:0]        match;
  int checks = 0, failures = 0;

  tsram_andk #(.N(N), .K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [K-1:0] e;
      for (int n = 0; n < N; n++)
        rows[n] = {$urandom, $urandom} | {$urandom, $urandom} | {$urandom, $urandom};
      act = ($urandom_range(0, 4) != 0);
      e = '0;
      for (int k = 0; k < K; k++) begin
        bit all;
        all = 1;
        for (int n = 0; n < N; n++) if (!rows[n][k]) all = 0;
        e[k] = act && all;
      end
      #1;
      checks++;
      if (match !== e) begin
        failures++;
        $display("FAIL act=%0b match=%h expected %h", act, match, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
