// tb_rw_control: checks RdEna / WrEna against the R/W bit on RWEna, the hold
// without it, and reset to both zero.
module tb_rw_control;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, rw_ena, wr_bit, rd_ena, wr_ena;
  logic exp_rd, exp_wr;
  int checks = 0, failures = 0;

  rw_control dut (.clk, .rst_n, .rw_ena, .wr_bit, .rd_ena, .wr_ena);

  initial begin
    rst_n = 1'b0; rw_ena = 1'b1; wr_bit = 1'b1;
    @(posedge clk); #1;
    checks++; if (rd_ena || wr_ena) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1'b1; rw_ena = 1'b0;
    exp_rd = 1'b0; exp_wr = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rw_ena = 1'($urandom); wr_bit = 1'($urandom);
      @(posedge clk); #1;
      if (rw_ena) begin exp_wr = wr_bit; exp_rd = !wr_bit; end
      checks++;
      if (rd_ena !== exp_rd || wr_ena !== exp_wr) begin
        failures++; $display("FAIL %0d: rd %b wr %b", i, rd_ena, wr_ena);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
