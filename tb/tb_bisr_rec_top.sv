// tb_bisr_rec_top: end-to-end test of the BIST / self-repair / REC design.
//
// The main instance runs with every parameter at its default (16 x 1 memory,
// 32 redundant words). It checks, against values worked out here:
//  * a fault-free March SS run: 22 memory operations per address, 5*22*16+3
//    cycles to test_done, no fault recorded, automatic entry into normal mode;
//  * a run with stuck-at words: the number of failing reads (an expected-0 read
//    happens 7 times per address, an expected-1 read 6 times), one redundant
//    word per faulty address, and afterwards a normal-mode read/write pattern
//    that returns correct data through the redundant words;
//  * the REC on a word with a latent read-destructive defect: unprotected
//    back-to-back reads corrupt it, protected ones are suppressed and keep it;
//  * mode switches: idle, test, normal, back to idle and a second test.
// A second instance with only 4 redundant words is driven into overflow.
// Each mechanism is counted; one that never happened is a failure.
module tb_bisr_rec_top;
  import bisr_pkg::*;

  localparam int unsigned ADDR_W = 4;
  localparam int unsigned DATA_W = 1;
  localparam int unsigned DEPTH  = 2 ** ADDR_W;
  localparam int unsigned TEST_CYCLES = 5 * MARCH_SS_OPS * DEPTH + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, smc_ena, r_ena, w_ena, rec_en_n;
  logic [1:0]        mode_type;
  logic [ADDR_W-1:0] addr_in;
  logic [DATA_W-1:0] data_in, mux_out;
  logic [DEPTH-1:0]  sa_mask, sa_val, weak_mask;
  logic              test_done, overflow, succ_read;
  logic [1:0]        mode_state;
  logic [15:0]       fault_cnt;
  logic [5:0]        rl_used;

  bisr_rec_top dut (
    .clk(clk), .rst_n(rst_n), .smc_ena(smc_ena), .mode_type(mode_type),
    .addr_in(addr_in), .data_in(data_in), .r_ena(r_ena), .w_ena(w_ena),
    .rec_en_n(rec_en_n), .inj_sa_mask(sa_mask), .inj_sa_val(sa_val),
    .inj_weak_mask(weak_mask), .mux_out(mux_out), .test_done(test_done),
    .overflow(overflow), .mode_state(mode_state), .fault_cnt(fault_cnt),
    .rl_used(rl_used), .succ_read(succ_read)
  );

  // Small instance: 4 redundant words, shares the stimulus except the faults.
  logic [DEPTH-1:0]  s_sa_mask;
  logic [DATA_W-1:0] s_mux_out;
  logic              s_test_done, s_overflow, s_succ_read;
  logic [1:0]        s_mode_state;
  logic [15:0]       s_fault_cnt;
  logic [2:0]        s_rl_used;

  bisr_rec_top #(.RL_WORDS(4)) dut_small (
    .clk(clk), .rst_n(rst_n), .smc_ena(smc_ena), .mode_type(mode_type),
    .addr_in(addr_in), .data_in(data_in), .r_ena(r_ena), .w_ena(w_ena),
    .rec_en_n(rec_en_n), .inj_sa_mask(s_sa_mask), .inj_sa_val('0),
    .inj_weak_mask('0), .mux_out(s_mux_out), .test_done(s_test_done),
    .overflow(s_overflow), .mode_state(s_mode_state), .fault_cnt(s_fault_cnt),
    .rl_used(s_rl_used), .succ_read(s_succ_read)
  );

  int checks = 0, failures = 0;
  int n_test_runs = 0, n_repairs = 0, n_rl_reads = 0, n_succ_block = 0;
  int n_overflow = 0, n_corrupt_unprot = 0, n_idle = 0, n_auto_normal = 0;
  int n_mem_ops = 0;
  logic [DATA_W-1:0] ref_mem [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Memory operations issued by the BIST (accesses while in test mode).
  always @(posedge clk)
    if (mode_state == MODE_TEST && !dut.cen) n_mem_ops++;

  always @(posedge clk) if (succ_read) n_succ_block++;

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; smc_ena = 1'b0; mode_type = MODE_IDLE; r_ena = 1'b0;
    w_ena = 1'b0; addr_in = '0; data_in = '0; rec_en_n = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  // Start a test from idle and wait for its end; returns cycles taken.
  task automatic run_test(output int cycles);
    cycles = 0;
    @(negedge clk);
    smc_ena = 1'b1; mode_type = MODE_TEST;
    @(posedge clk); #1;
    check(mode_state == MODE_TEST, "entered test mode");
    while (!test_done && cycles < 10 * TEST_CYCLES) begin
      @(posedge clk); #1;
      cycles++;
    end
    n_test_runs++;
    if (mode_state == MODE_NORMAL) n_auto_normal++;
    check(mode_state == MODE_NORMAL, "normal mode after the test");
    @(negedge clk);
    mode_type = MODE_NORMAL;
  endtask

  task automatic nwrite(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    addr_in = a; data_in = d; w_ena = 1'b1; r_ena = 1'b0;
    ref_mem[a] = d;
    @(negedge clk);
    w_ena = 1'b0;
  endtask

  // Read; with back2back = 1 the read enable stays on for the next call.
  task automatic nread(input logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d,
                       input bit back2back);
    @(negedge clk);
    addr_in = a; r_ena = 1'b1; w_ena = 1'b0;
    @(posedge clk); #1;
    d = mux_out;
    if (dut.u_rl_array.hit) n_rl_reads++;
    if (!back2back) begin
      @(negedge clk);
      r_ena = 1'b0;
    end
  endtask

  task automatic normal_pattern(input string tag);
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DEPTH; i++) nwrite(ADDR_W'(i), DATA_W'($urandom));
    for (int i = 0; i < DEPTH; i++) begin
      nread(ADDR_W'(i), d, 1'b0);
      check(d == ref_mem[i], $sformatf("%s: read addr %0d got %0h exp %0h", tag, i, d, ref_mem[i]));
    end
    for (int i = 0; i < DEPTH; i++) nwrite(ADDR_W'(i), ~ref_mem[i]);
    for (int i = DEPTH - 1; i >= 0; i--) begin
      nread(ADDR_W'(i), d, 1'b0);
      check(d == ref_mem[i], $sformatf("%s: reread addr %0d got %0h exp %0h", tag, i, d, ref_mem[i]));
    end
  endtask

  initial begin
    int cyc, exp_faults, n_sa;
    logic [DATA_W-1:0] d;
    sa_mask = '0; sa_val = '0; weak_mask = '0; s_sa_mask = '0;

    // 1. Fault-free memory.
    do_reset();
    n_mem_ops = 0;
    run_test(cyc);
    check(cyc == TEST_CYCLES, $sformatf("test length %0d cycles, expected %0d", cyc, TEST_CYCLES));
    check(n_mem_ops == MARCH_SS_OPS * DEPTH, $sformatf("memory operations %0d, expected 22n = %0d", n_mem_ops, MARCH_SS_OPS * DEPTH));
    check(fault_cnt == 0, "no failing read on a good memory");
    check(rl_used == 0, "no redundant word used on a good memory");
    check(!overflow, "no overflow on a good memory");
    normal_pattern("good memory");

    // 2. Stuck-at words: 3 stuck at 0, 2 stuck at 1.
    sa_mask = '0; sa_val = '0;
    sa_mask[2] = 1'b1; sa_mask[7] = 1'b1; sa_mask[15] = 1'b1;
    sa_mask[0] = 1'b1; sa_val[0] = 1'b1;
    sa_mask[9] = 1'b1; sa_val[9] = 1'b1;
    n_sa = 5;
    exp_faults = 3 * 6 + 2 * 7;
    // Five faults on the small instance's memory too (4 redundant words).
    s_sa_mask = sa_mask;
    do_reset();
    n_mem_ops = 0;
    run_test(cyc);
    check(cyc == TEST_CYCLES, "test length with faults");
    check(fault_cnt == 16'(exp_faults), $sformatf("failing reads %0d, expected %0d", fault_cnt, exp_faults));
    check(rl_used == 6'(n_sa), $sformatf("redundant words used %0d, expected %0d", rl_used, n_sa));
    check(!overflow, "32 redundant words do not overflow");
    n_repairs += int'(rl_used);
    check(s_overflow, "4 redundant words overflow on 5 faulty addresses");
    check(s_rl_used == 3'd4, "small instance filled all 4 words");
    if (s_overflow) n_overflow++;
    for (int w = 0; w < 32; w++)
      if (w < n_sa) check(dut.u_rl_array.fa[w], $sformatf("word %0d programmed", w));
      else          check(!dut.u_rl_array.fa[w], $sformatf("word %0d free", w));
    normal_pattern("repaired memory");

    // 3. Mode switch: back to idle, then a second test keeps the repair.
    @(negedge clk);
    mode_type = MODE_IDLE;
    @(posedge clk); #1;
    check(mode_state == MODE_IDLE, "idle after mode_type = idle");
    if (mode_state == MODE_IDLE) n_idle++;
    repeat (2) @(negedge clk);
    run_test(cyc);
    check(cyc == TEST_CYCLES, "second test length");
    check(rl_used == 6'(n_sa), "second test reuses the words of known addresses");
    normal_pattern("after second test");

    // 4. Latent defect on word 5: back-to-back reads.
    sa_mask = '0; weak_mask = '0; weak_mask[5] = 1'b1; s_sa_mask = '0;
    do_reset();
    run_test(cyc);
    check(fault_cnt == 0, "latent defect escapes the March test");
    nwrite(4'd5, 1'b1);
    rec_en_n = 1'b1;                    // protection off
    nread(4'd5, d, 1'b1);
    check(d == 1'b1, "first read of weak word");
    nread(4'd5, d, 1'b0);
    check(d == 1'b1, "second read returns old value (deceptive)");
    nread(4'd5, d, 1'b0);
    check(d == 1'b0, "unprotected back-to-back reads destroyed the word");
    if (d == 1'b0) n_corrupt_unprot++;
    nwrite(4'd5, 1'b1);
    @(negedge clk); rec_en_n = 1'b0;    // protection on
    begin
      int blk0;
      blk0 = n_succ_block;
      for (int k = 0; k < 6; k++) begin
        nread(4'd5, d, k != 5);
        check(d == 1'b1, $sformatf("protected read %0d of weak word", k));
      end
      nread(4'd5, d, 1'b0);
      check(d == 1'b1, "weak word intact under protection");
      check(n_succ_block - blk0 == 5, $sformatf("suppressed reads %0d, expected 5", n_succ_block - blk0));
    end
    // A different address in between is not suppressed.
    nwrite(4'd6, 1'b0);
    nread(4'd5, d, 1'b1);
    nread(4'd6, d, 1'b0);
    check(d == 1'b0, "read of another address after a read");

    // Mechanism coverage.
    check(n_test_runs >= 4, "March SS runs");
    check(n_auto_normal >= 4, "automatic test-to-normal switch");
    check(n_idle >= 1, "switch to idle");
    check(n_repairs > 0, "faulty addresses repaired");
    check(n_rl_reads > 0, "reads served by redundant words");
    check(n_overflow > 0, "redundancy overflow");
    check(n_succ_block > 0, "successive reads suppressed by the REC");
    check(n_corrupt_unprot > 0, "latent defect manifests without the REC");
    $display("mechanisms: tests=%0d auto_normal=%0d idle=%0d repairs=%0d rl_reads=%0d overflow=%0d rec_blocks=%0d unprotected_corruptions=%0d",
             n_test_runs, n_auto_normal, n_idle, n_repairs, n_rl_reads, n_overflow, n_succ_block, n_corrupt_unprot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
