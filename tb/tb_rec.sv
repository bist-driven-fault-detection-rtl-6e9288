// tb_rec: random access sequences with protection on and off; CEN' must be
// CEN OR SR with protection on (en_n = 0) and CEN otherwise, where SR is the
// successive-read condition computed here.
module tb_rec;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, wen, cen, en_n, cen_out, sr;
  logic [3:0] a, last_rd_addr;
  bit         prev_rd, exp_sr;
  int checks = 0, failures = 0, n_block = 0;

  rec dut (.clk, .rst_n, .a, .wen, .cen, .en_n, .cen_out, .sr);

  initial begin
    rst_n = 1'b0; a = '0; wen = 1'b0; cen = 1'b1; en_n = 1'b1;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    prev_rd = 1'b0; last_rd_addr = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a = 4'($urandom % 2); wen = ($urandom % 4) != 0; cen = ($urandom % 4) == 0;
      en_n = ($urandom % 2);
      #1;
      exp_sr = prev_rd && wen && a == last_rd_addr;
      checks++;
      if (cen_out !== (en_n ? cen : (cen || exp_sr))) begin
        failures++; $display("FAIL %0d: cen_out %b", i, cen_out);
      end
      if (!en_n && !cen && exp_sr) n_block++;
      @(posedge clk);
      prev_rd = !cen && wen;
      if (!cen && wen) last_rd_addr = a;
    end
    checks++;
    if (n_block == 0) begin failures++; $display("FAIL: no read suppressed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
