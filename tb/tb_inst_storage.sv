// tb_inst_storage: reads every word of the instruction storage and compares it
// with the March SS encoding built here from the element list (operation,
// polarity, direction and position in the element), and checks the one-cycle
// registered read and the hold when IEna is 0.
module tb_inst_storage;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, i_ena;
  logic [4:0] inst_addr;
  logic [6:0] inst;
  logic [6:0] expv [32];
  int checks = 0, failures = 0;

  inst_storage dut (.clk, .rst_n, .i_ena, .inst_addr, .inst);

  // Build {valid, fo, io, lo, down, wr, data} for March SS.
  function automatic logic [6:0] w(bit fo, bit io, bit lo, bit down, bit wr, bit d);
    return {1'b1, fo, io, lo, down, wr, d};
  endfunction

  initial begin
    int k;
    bit down, d0;
    foreach (expv[i]) expv[i] = 7'h00;
    expv[0] = w(0, 0, 0, 0, 1, 0);                 // w0
    k = 1;
    for (int e = 0; e < 4; e++) begin              // M1..M4
      down = (e >= 2);
      d0   = (e % 2 == 1);                          // r0.. or r1..
      expv[k++] = w(1, 0, 0, down, 0, d0);         // r
      expv[k++] = w(0, 1, 0, down, 0, d0);         // r
      expv[k++] = w(0, 1, 0, down, 1, d0);         // w same
      expv[k++] = w(0, 1, 0, down, 0, d0);         // r
      expv[k++] = w(0, 0, 1, down, 1, !d0);        // w inverse
    end
    expv[k] = w(0, 0, 0, 1, 0, 0);                 // r0 (M5)

    rst_n = 1'b0; i_ena = 1'b0; inst_addr = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      inst_addr = 5'(i); i_ena = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (inst !== expv[i]) begin
        failures++;
        $display("FAIL word %0d: %h expected %h", i, inst, expv[i]);
      end
    end
    // Hold while IEna = 0.
    @(negedge clk); inst_addr = 5'd1; i_ena = 1'b1;
    @(negedge clk); inst_addr = 5'd2; i_ena = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (inst !== expv[1]) begin failures++; $display("FAIL hold"); end
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
