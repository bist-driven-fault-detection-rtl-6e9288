// tb_addr_gen: walks full up and down sequences and checks every address, the
// Over flag at the last address, wrap-around into the next element and clr.
module tb_addr_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, clr, addr_ena, dir_down, over;
  logic [3:0] address;
  int checks = 0, failures = 0;

  addr_gen dut (.clk, .rst_n, .clr, .addr_ena, .dir_down, .address, .over);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; clr = 1'b0; addr_ena = 1'b0; dir_down = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int e = 0; e < 4; e++) begin
      dir_down = (e >= 2);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        check(address == (dir_down ? 4'(15 - i) : 4'(i)),
              $sformatf("element %0d step %0d address %0d", e, i, address));
        check(over == (i == 15), $sformatf("over at step %0d", i));
        addr_ena = 1'b1;
        @(negedge clk);
        addr_ena = 1'b0;
        // Held while AddrEna is 0.
        check(address == (dir_down ? 4'(14 - i) : 4'(i + 1)) || i == 15,
              "advanced by one");
      end
    end
    addr_ena = 1'b1; dir_down = 1'b0;
    repeat (5) @(negedge clk);
    addr_ena = 1'b0; clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    check(address == 4'd0, "clr restarts at 0");
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
