// tb_data_gen: checks all-ones / all-zeros words on DataEna, the hold without
// it, and reset, with an 8-bit word (the byte of the microcode description).
module tb_data_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, data_ena, data_bit;
  logic [7:0] data, held;
  int checks = 0, failures = 0;

  data_gen #(.DATA_W(8)) dut (.clk, .rst_n, .data_ena, .data_bit, .data);

  initial begin
    rst_n = 1'b0; data_ena = 1'b1; data_bit = 1'b1;
    @(posedge clk); #1;
    checks++; if (data !== 8'h00) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1'b1; data_ena = 1'b0;
    held = 8'h00;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      data_ena = 1'($urandom); data_bit = 1'($urandom);
      @(posedge clk); #1;
      if (data_ena) held = data_bit ? 8'hFF : 8'h00;
      checks++;
      if (data !== held) begin failures++; $display("FAIL %0d: %h exp %h", i, data, held); end
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
