// tb_sram: random reads and writes against a reference array, checking the
// one-cycle read latency, the held output, the enable rules (nothing happens
// with MemEna low or with both RdEna and WrEna high), stuck-at injection and
// the read-destructive latent defect (flips on the second back-to-back read).
module tb_sram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, mem_ena, rd_ena, wr_ena;
  logic [3:0]  addr;
  logic [7:0]  din, dout, exp_q;
  logic [15:0] sa_mask, sa_val, weak_m;
  logic [7:0]  ref_mem [16];
  int checks = 0, failures = 0;

  sram #(.DATA_W(8)) dut (.clk, .rst_n, .mem_ena, .rd_ena, .wr_ena, .addr, .din,
                          .dout, .inj_sa_mask(sa_mask), .inj_sa_val(sa_val),
                          .inj_weak_mask(weak_m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input bit me, input bit rd, input bit wr, input logic [3:0] a, input logic [7:0] d);
    @(negedge clk);
    mem_ena = me; rd_ena = rd; wr_ena = wr; addr = a; din = d;
    @(posedge clk); #1;
  endtask

  initial begin
    rst_n = 1'b0; mem_ena = 1'b0; rd_ena = 1'b0; wr_ena = 1'b0; addr = '0; din = '0;
    sa_mask = '0; sa_val = '0; weak_m = '0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      ref_mem[i] = 8'($urandom);
      op(1, 0, 1, 4'(i), ref_mem[i]);
    end
    exp_q = dout;
    for (int i = 0; i < 600; i++) begin
      logic me, rd, wr;
      logic [3:0] a;
      logic [7:0] d;
      me = ($urandom % 4) != 0; rd = 1'($urandom); wr = 1'($urandom);
      a = 4'($urandom); d = 8'($urandom);
      op(me, rd, wr, a, d);
      if (me && wr && !rd) ref_mem[a] = d;
      if (me && rd && !wr) exp_q = ref_mem[a];
      check(dout == exp_q, $sformatf("op %0d me%b rd%b wr%b a%0d: dout %h exp %h", i, me, rd, wr, a, dout, exp_q));
    end
    // Stuck-at: word 3 stuck at 1, word 4 stuck at 0.
    sa_mask[3] = 1'b1; sa_val[3] = 1'b1; sa_mask[4] = 1'b1;
    op(1, 0, 1, 4'd3, 8'h00);
    op(1, 1, 0, 4'd3, 8'h00);
    check(dout == 8'hFF, "stuck-at-1 word reads all ones");
    op(1, 0, 1, 4'd4, 8'hA5);
    op(1, 1, 0, 4'd4, 8'h00);
    check(dout == 8'h00, "stuck-at-0 word reads all zeros");
    sa_mask = '0;
    // Latent defect on word 9.
    weak_m[9] = 1'b1;
    op(1, 0, 1, 4'd9, 8'h3C);
    op(1, 1, 0, 4'd9, 8'h00);
    check(dout == 8'h3C, "first read of weak_m word");
    op(0, 0, 0, 4'd9, 8'h00);
    op(1, 1, 0, 4'd9, 8'h00);
    check(dout == 8'h3C, "separated read does not disturb");
    op(1, 1, 0, 4'd9, 8'h00);
    check(dout == 8'h3C, "second back-to-back read is deceptive");
    op(0, 0, 0, 4'd9, 8'h00);
    op(1, 1, 0, 4'd9, 8'h00);
    check(dout == 8'hC3, "word flipped by back-to-back reads");
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
