// tb_fault_diag: random compares; a mismatch while FDEna is 1 must give a
// one-cycle pulse the next cycle with that address and the expected data, and
// the mismatch counter must match the count kept here.
module tb_fault_diag;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, fd_ena, fault;
  logic [0:0]  mem_out, mem_in, fault_data;
  logic [3:0]  addr, fault_addr;
  logic [15:0] fault_cnt;
  int checks = 0, failures = 0, n_mis = 0;

  fault_diag dut (.clk, .rst_n, .fd_ena, .mem_out, .mem_in, .addr, .fault,
                  .fault_addr, .fault_data, .fault_cnt);

  initial begin
    rst_n = 1'b0; fd_ena = 1'b0; mem_out = '0; mem_in = '0; addr = '0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      bit mis;
      @(negedge clk);
      fd_ena = 1'($urandom); mem_out = 1'($urandom); mem_in = 1'($urandom); addr = 4'($urandom);
      mis = fd_ena && (mem_out != mem_in);
      @(posedge clk); #1;
      if (mis) n_mis++;
      checks++;
      if (fault !== mis || (mis && (fault_addr !== addr || fault_data !== mem_in)) ||
          fault_cnt !== 16'(n_mis)) begin
        failures++;
        $display("FAIL %0d: fault %b addr %0d data %b cnt %0d", i, fault, fault_addr, fault_data, fault_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
