// tb_rl_word: programs a word, then checks the comparator, the IE path (write
// only with a match, R/W = 1 and a request), the OE path (data out only on a
// matching read) and that an unprogrammed word never matches.
module tb_rl_word;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, prog, upd, rw, fa, match;
  logic [3:0] cmp_addr;
  logic [3:0] wdata, dout;
  int checks = 0, failures = 0;

  rl_word #(.DATA_W(4)) dut (.clk, .rst_n, .prog, .cmp_addr, .wdata, .upd, .rw,
                             .fa, .match, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] stored;
    rst_n = 1'b0; prog = 1'b0; upd = 1'b0; rw = 1'b0; cmp_addr = 4'd6; wdata = '0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    #1;
    check(!fa && !match && dout == 4'h0, "empty word never matches");
    @(negedge clk);
    prog = 1'b1; cmp_addr = 4'd6; wdata = 4'hA;
    @(negedge clk);
    prog = 1'b0; rw = 1'b0;
    #1;
    check(fa && match && dout == 4'hA, "programmed word reads its data");
    stored = 4'hA;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      cmp_addr = ($urandom % 2) ? 4'd6 : 4'($urandom);
      wdata = 4'($urandom); upd = 1'($urandom); rw = 1'($urandom);
      #1;
      check(match == (cmp_addr == 4'd6), "comparator");
      check(dout == ((match && !rw) ? stored : 4'h0), $sformatf("OE output %h", dout));
      @(posedge clk); #1;
      if (cmp_addr == 4'd6 && rw && upd) stored = wdata;
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
