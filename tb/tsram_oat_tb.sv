// tsram_oat_tb: self-checking test of the original address table (2^W x K).
//
// Random writes and reads against an array model. Checks that read data
// appears one clock after rd_en, that the output holds while rd_en is low,
// and that a read and a write to the same row in one clock return the old
// contents (read-before-write).
module tsram_oat_tb;
  localparam int unsigned W = 4;
  localparam int unsigned K = 64;
  localparam int unsigned DW = K;

  logic          clk = 1'b0;
  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [W-1:0]  rd_addr = '0, wr_addr = '0;
  logic [DW-1:0] wr_data = '0;
  logic [DW-1:0] rd_data;
  logic [DW-1:0] model [2**W];
  logic [DW-1:0] expect_q;
  int checks = 0, failures = 0;

  tsram_oat #(.W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] rnd();
    logic [DW-1:0] v;
    for (int b = 0; b < int'(DW); b++) v[b] = 1'($urandom_range(0, 1));
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < 2**W; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = W'(a); wr_data = rnd(); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0; rd_en = 1'b1; rd_addr = '0;
    expect_q = model[0];
    for (int i = 0; i < 2000; i++) begin
      logic do_rd, do_wr;
      do_rd = ($urandom_range(0, 2) != 0);
      do_wr = ($urandom_range(0, 1) != 0);
      @(negedge clk);
      rd_en = do_rd; rd_addr = W'($urandom);
      wr_en = do_wr; wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : W'($urandom);
      wr_data = rnd();
      if (do_rd) expect_q = model[rd_addr];
      @(posedge clk);
      if (do_wr) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expect_q) begin
        failures++;
        $display("FAIL cycle %0d: read %h expected %h", i, rd_data, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
