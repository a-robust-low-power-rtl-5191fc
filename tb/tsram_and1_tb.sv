// tsram_and1_tb: exhaustive test of the layer's 1-bit AND operation.
//
// For N = 4 every combination of the VM bits and of the force input is
// applied; the activation must be the AND of the bits, or 1 when forced.
module tsram_and1_tb;
  localparam int unsigned N = 4;
  logic [N-1:0] vm_bits;
  logic         force_act;
  logic         act;
  int checks = 0, failures = 0;

  tsram_and1 #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int v = 0; v < 2**N; v++) begin
        logic e;
        vm_bits = N'(v); force_act = f[0];
        e = (f == 1) || (v == 2**N - 1);
        #1;
        checks++;
        if (act !== e) begin
          failures++;
          $display("FAIL bits=%b force=%0d act=%b", vm_bits, f, act);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
