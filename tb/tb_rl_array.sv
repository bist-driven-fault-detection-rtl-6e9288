// tb_rl_array: with 4 redundant words, sends fault pulses for random addresses
// (some repeated), checks the words used, the sticky overflow and the stored
// correct data, then normal-mode reads and writes: hit and data one cycle after
// a read, write-through into repaired words, no hit for other addresses.
module tb_rl_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, rla_ena, fault, rd, wr, hit, overflow;
  logic [3:0] fault_addr, addr;
  logic [0:0] fault_data, din, dout;
  logic [2:0] used;
  logic [3:0] fa;
  int checks = 0, failures = 0;
  int         n_alloc;
  bit         ovf_exp;
  int         slot [16];
  logic [0:0] ref_data [16];

  rl_array #(.RL_WORDS(4)) dut (.clk, .rst_n, .rla_ena, .fault, .fault_addr,
    .fault_data, .addr, .din, .rd, .wr, .hit, .dout, .overflow, .used, .fa);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; rla_ena = 1'b0; fault = 1'b0; rd = 1'b0; wr = 1'b0;
    fault_addr = '0; addr = '0; fault_data = '0; din = '0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    foreach (slot[i]) slot[i] = -1;
    n_alloc = 0; ovf_exp = 1'b0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      fault = 1'b1; fault_addr = 4'($urandom % 7); fault_data = 1'($urandom);
      if (slot[fault_addr] >= 0) ref_data[fault_addr] = fault_data;
      else if (n_alloc < 4) begin
        slot[fault_addr] = n_alloc; n_alloc++; ref_data[fault_addr] = fault_data;
      end else ovf_exp = 1'b1;
      @(negedge clk);
      fault = 1'b0;
      check(int'(used) == n_alloc, $sformatf("used %0d expected %0d", used, n_alloc));
      check(overflow == ovf_exp, "overflow flag");
      check(fa == 4'((1 << n_alloc) - 1), "words filled in order");
    end
    rla_ena = 1'b1;
    for (int i = 0; i < 400; i++) begin
      bit isrd;
      @(negedge clk);
      addr = 4'($urandom % 10); isrd = 1'($urandom);
      rd = isrd; wr = !isrd; din = 1'($urandom);
      @(posedge clk); #1;
      if (!isrd && slot[addr] >= 0) ref_data[addr] = din;
      if (isrd) begin
        check(hit == (slot[addr] >= 0), $sformatf("hit for address %0d", addr));
        if (slot[addr] >= 0) check(dout == ref_data[addr], $sformatf("data for address %0d", addr));
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
