// tb_inst_ptr: checks the instruction pointer's step, loop-back and advance
// rules against a reference pointer kept in the testbench, with random
// Fo/Io/Lo codes, Over and enables.
module tb_inst_ptr;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, clr, inst_ena, over;
  logic [2:0] fil;
  logic [4:0] inst_addr;
  int checks = 0, failures = 0;
  int ref_ptr, ref_start;

  inst_ptr dut (.clk, .rst_n, .clr, .inst_ena, .inst_op_fil(fil), .over, .inst_addr);

  initial begin
    rst_n = 1'b0; clr = 1'b0; inst_ena = 1'b0; over = 1'b0; fil = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    ref_ptr = 0; ref_start = 0;
    for (int i = 0; i < 2000; i++) begin
      inst_ena = 1'($urandom);
      over     = ($urandom % 4) == 0;
      case ($urandom % 4)
        0: fil = 3'b000; 1: fil = 3'b100; 2: fil = 3'b010; default: fil = 3'b001;
      endcase
      clr = ($urandom % 64) == 0;
      @(posedge clk);
      if (clr) begin
        ref_ptr = 0; ref_start = 0;
      end else if (inst_ena) begin
        if (fil == 3'b100 || fil == 3'b010) ref_ptr = (ref_ptr + 1) % 32;
        else if (over) begin ref_ptr = (ref_ptr + 1) % 32; ref_start = ref_ptr; end
        else ref_ptr = ref_start;
      end
      #1;
      checks++;
      if (inst_addr != 5'(ref_ptr)) begin
        failures++;
        $display("FAIL step %0d: ptr %0d expected %0d", i, inst_addr, ref_ptr);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
