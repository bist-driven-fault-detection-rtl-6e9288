// tb_srd: random A / WEN / CEN sequences; SR must be 1 exactly when the cycle
// before was a read and this cycle presents, with WEN = 1, the address of the
// last read, as a reference kept here computes.
module tb_srd;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, wen, cen, sr;
  logic [3:0] a;
  logic [3:0] last_rd_addr;
  bit         prev_rd;
  int checks = 0, failures = 0, n_sr = 0;

  srd dut (.clk, .rst_n, .a, .wen, .cen, .sr);

  initial begin
    rst_n = 1'b0; a = '0; wen = 1'b0; cen = 1'b1;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    prev_rd = 1'b0; last_rd_addr = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a = 4'($urandom % 3); wen = ($urandom % 4) != 0; cen = ($urandom % 4) == 0;
      #1;
      checks++;
      if (sr !== (prev_rd && wen && a == last_rd_addr)) begin
        failures++; $display("FAIL %0d: sr %b", i, sr);
      end
      if (sr) n_sr++;
      @(posedge clk);
      prev_rd = !cen && wen;
      if (!cen && wen) last_rd_addr = a;
    end
    checks++;
    if (n_sr == 0) begin failures++; $display("FAIL: SR never raised"); end
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
