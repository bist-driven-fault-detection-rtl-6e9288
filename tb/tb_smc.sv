// tb_smc: drives the controller with a stream of random microcode words (the
// testbench plays the instruction register, loading a new word on IREna) and
// checks the five-phase enable sequence of every operation, FDEna only for
// reads, AddrEna only at the end of an element, the end-of-test switch to
// normal mode with test_done, and the idle / test / normal mode transitions.
module tb_smc;
  import bisr_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, smc_ena;
  logic [1:0] mode_type;
  inst_t      ir;
  logic i_ena, ir_ena, inst_ena, addr_ena, data_ena, rw_ena, mem_ena, fd_ena;
  logic rla_ena, clr, test_sel, test_done;
  mode_e mode_state;
  int checks = 0, failures = 0;
  int n_words;

  smc dut (.clk, .rst_n, .smc_ena, .mode_type, .ir, .i_ena, .ir_ena, .inst_ena,
           .addr_ena, .data_ena, .rw_ena, .mem_ena, .fd_ena, .rla_ena, .clr,
           .test_sel, .test_done, .mode_state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Enables expected in a given phase of a test operation.
  function automatic logic [9:0] exp_en(int ph, inst_t w);
    bit ee;
    ee = w.lo || !(w.fo || w.io || w.lo);
    //            i_ena   ir_ena  data    rw      mem     fd              inst    addr          rla   sel
    case (ph)
      0: return {1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
      1: return {1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
      2: return {1'b0, 1'b0, w.valid, w.valid, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
      3: return {1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
      default: return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, !w.wr, 1'b1, ee, 1'b0, 1'b1};
    endcase
  endfunction

  // The testbench's instruction register.
  always @(posedge clk) begin
    if (ir_ena) begin
      n_words++;
      if (n_words > 30) ir <= '0;
      else begin
        ir <= inst_t'(7'($urandom));
        ir.valid <= 1'b1;
      end
    end
  end

  initial begin
    int cyc;
    rst_n = 1'b0; smc_ena = 1'b0; mode_type = MODE_IDLE; ir = '0; n_words = 0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    #1;
    check(mode_state == MODE_IDLE && clr && !mem_ena && !test_sel, "idle after reset");
    // mode_type without smc_ena does nothing
    @(negedge clk); mode_type = MODE_TEST;
    @(negedge clk);
    check(mode_state == MODE_IDLE, "no start without SMCEna");
    smc_ena = 1'b1;
    @(negedge clk);
    check(mode_state == MODE_TEST && !test_done, "test mode entered");
    cyc = 0;
    while (mode_state == MODE_TEST && cyc < 1000) begin
      for (int ph = 0; ph < 5 && mode_state == MODE_TEST; ph++) begin
        #1;
        check({i_ena, ir_ena, data_ena, rw_ena, mem_ena, fd_ena, inst_ena, addr_ena, rla_ena, test_sel}
              == exp_en(ph, ir), $sformatf("enables in phase %0d of word %0d", ph, n_words));
        @(negedge clk);
        cyc++;
        if (ph == 2 && !ir.valid) break;
      end
    end
    check(cyc == 30 * 5 + 3, $sformatf("cycles %0d for 30 operations", cyc));
    check(mode_state == MODE_NORMAL && test_done, "end word switches to normal mode");
    check(mem_ena && rla_ena && !test_sel && !fd_ena, "normal-mode enables");
    // Stays in normal mode although mode_type still asks for test.
    repeat (3) @(negedge clk);
    check(mode_state == MODE_NORMAL, "no automatic restart");
    mode_type = MODE_IDLE;
    @(negedge clk);
    check(mode_state == MODE_IDLE && test_done, "idle keeps test_done");
    mode_type = MODE_NORMAL;
    @(negedge clk);
    check(mode_state == MODE_NORMAL, "idle to normal");
    smc_ena = 1'b0;
    @(negedge clk);
    check(mode_state == MODE_IDLE, "SMCEna low returns to idle");
    smc_ena = 1'b1; mode_type = MODE_TEST; n_words = 0;
    @(negedge clk);
    check(mode_state == MODE_TEST && !test_done, "second test clears test_done");
    repeat (7) @(negedge clk);
    mode_type = MODE_NORMAL;
    @(negedge clk);
    check(mode_state == MODE_NORMAL && !test_done, "normal request aborts the test");
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
