// tb_all_words_faulty: workload with every word of the 16 x 1 memory faulty
// (alternate words stuck at 0 and at 1), at the default parameters. March SS
// must find all 16 addresses, program 16 of the 32 redundant words without
// overflow, and normal-mode traffic must then be served entirely by the
// redundant words. The failing-read count is worked out here: a word stuck at 0
// fails the 6 expected-1 reads of March SS, a word stuck at 1 the 7 expected-0
// reads.
module tb_all_words_faulty;
  import bisr_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, smc_ena, r_ena, w_ena, rec_en_n;
  logic [1:0]  mode_type, mode_state;
  logic [3:0]  addr_in;
  logic [0:0]  data_in, mux_out;
  logic [15:0] sa_mask, sa_val, fault_cnt;
  logic        test_done, overflow, succ_read;
  logic [5:0]  rl_used;
  logic [0:0]  ref_mem [16];
  int checks = 0, failures = 0, cyc = 0, n_hits = 0;

  bisr_rec_top dut (
    .clk, .rst_n, .smc_ena, .mode_type, .addr_in, .data_in, .r_ena, .w_ena,
    .rec_en_n, .inj_sa_mask(sa_mask), .inj_sa_val(sa_val), .inj_weak_mask('0),
    .mux_out, .test_done, .overflow, .mode_state, .fault_cnt, .rl_used, .succ_read);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    sa_mask = 16'hFFFF; sa_val = 16'hAAAA;
    rst_n = 1'b0; smc_ena = 1'b0; mode_type = MODE_IDLE; r_ena = 1'b0; w_ena = 1'b0;
    addr_in = '0; data_in = '0; rec_en_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; smc_ena = 1'b1; mode_type = MODE_TEST;
    @(posedge clk);
    while (!test_done && cyc < 5000) begin @(posedge clk); #1; cyc++; end
    check(cyc == 5 * MARCH_SS_OPS * 16 + 3, $sformatf("test cycles %0d", cyc));
    check(fault_cnt == 16'(8 * 6 + 8 * 7), $sformatf("failing reads %0d", fault_cnt));
    check(rl_used == 6'd16, $sformatf("redundant words used %0d", rl_used));
    check(!overflow, "no overflow with 32 words");
    for (int w = 0; w < 16; w++)
      check(dut.u_rl_array.fa[w], $sformatf("word %0d programmed", w));
    for (int w = 16; w < 32; w++)
      check(!dut.u_rl_array.fa[w], $sformatf("word %0d free", w));
    @(negedge clk); mode_type = MODE_NORMAL;
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        addr_in = 4'(i); data_in = 1'($urandom); w_ena = 1'b1; r_ena = 1'b0;
        ref_mem[i] = data_in;
      end
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        addr_in = 4'($urandom); w_ena = 1'b0; r_ena = 1'b1;
        @(posedge clk); #1;
        if (dut.u_rl_array.hit) n_hits++;
        check(mux_out == ref_mem[addr_in], $sformatf("read addr %0d", addr_in));
      end
    end
    check(n_hits == 64, $sformatf("all reads served by redundant words (%0d)", n_hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
