// tb_inst_reg: loads random words into the instruction register and checks
// every decoded field, the hold when IREna is 0 and the reset value.
module tb_inst_reg;
  import bisr_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, ir_ena;
  logic [6:0] inst, held;
  inst_t      ir;
  int checks = 0, failures = 0;

  inst_reg dut (.clk, .rst_n, .ir_ena, .inst, .ir);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; ir_ena = 1'b0; inst = 7'h7F;
    @(posedge clk); #1;
    check(ir.valid == 1'b0 && ir.data == 1'b0, "reset clears the register");
    @(negedge clk); rst_n = 1'b1;
    held = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      inst = 7'($urandom); ir_ena = 1'($urandom);
      @(posedge clk); #1;
      if (ir_ena) held = inst;
      check(ir.valid == held[6] && ir.fo == held[5] && ir.io == held[4] &&
            ir.lo == held[3] && ir.dir_down == held[2] && ir.wr == held[1] &&
            ir.data == held[0], $sformatf("fields of %h", held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
