// smc: state machine controller of the BIST / self-repair design.
//
// Three modes, chosen by ModeType while SMCEna is 1: idle, test and normal.
// With SMCEna = 0, or ModeType = idle, the controller returns to idle, where it
// drives no enable and clears the instruction pointer and address counter.
//
// Test mode runs the microcode. Every March operation takes five cycles:
//   FETCH    IEna    the storage registers the word at InstAddr
//   LOAD     IREna   the instruction register takes it
//   DECODE   DataEna, RWEna  data and read/write registers are set from the
//                    word; a word with valid = 0 ends the test instead
//   ACCESS   MemEna  the memory performs the read or write
//   COMPARE  FDEna (reads only) checks the read data; InstEna moves the
//                    pointer; AddrEna steps the address after the last
//                    operation of an element
// so a March test of k operations per address on N words takes 5*k*N + 3
// cycles from entering test mode to test_done. When the end word is decoded the
// controller enters normal mode by itself and sets test_done; it goes back to
// test only through idle. ModeType = normal also ends a running test.
// Normal mode holds MemEna and RLAEna at 1 and switches the input multiplexer
// to the external signals. The three modes come from the source paper; the phase
// sequence and the transitions are this design's choices.
module smc
  import bisr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       smc_ena,
  input  logic [1:0] mode_type,
  input  inst_t      ir,
  output logic       i_ena,
  output logic       ir_ena,
  output logic       inst_ena,
  output logic       addr_ena,
  output logic       data_ena,
  output logic       rw_ena,
  output logic       mem_ena,
  output logic       fd_ena,
  output logic       rla_ena,
  output logic       clr,
  output logic       test_sel,
  output logic       test_done,
  output mode_e      mode_state
);

  typedef enum logic [2:0] {
    PH_FETCH   = 3'd0,
    PH_LOAD    = 3'd1,
    PH_DECODE  = 3'd2,
    PH_ACCESS  = 3'd3,
    PH_COMPARE = 3'd4
  } phase_e;

  mode_e  ps, ns;
  phase_e ph, ph_nxt;
  logic   in_test, elem_end, end_word;

  assign in_test  = (ps == MODE_TEST);
  assign elem_end = ir.lo || !(ir.fo || ir.io || ir.lo);
  assign end_word = in_test && ph == PH_DECODE && !ir.valid;

  always_comb begin
    ns     = ps;
    ph_nxt = ph;
    unique case (ps)
      MODE_IDLE: begin
        ph_nxt = PH_FETCH;
        if (smc_ena && mode_type == MODE_TEST)   ns = MODE_TEST;
        if (smc_ena && mode_type == MODE_NORMAL) ns = MODE_NORMAL;
      end
      MODE_TEST: begin
        if (!smc_ena || mode_type == MODE_IDLE)   ns = MODE_IDLE;
        else if (mode_type == MODE_NORMAL)        ns = MODE_NORMAL;
        else if (end_word)                        ns = MODE_NORMAL;
        unique case (ph)
          PH_FETCH:   ph_nxt = PH_LOAD;
          PH_LOAD:    ph_nxt = PH_DECODE;
          PH_DECODE:  ph_nxt = PH_ACCESS;
          PH_ACCESS:  ph_nxt = PH_COMPARE;
          default:    ph_nxt = PH_FETCH;
        endcase
      end
      MODE_NORMAL: begin
        if (!smc_ena || mode_type == MODE_IDLE) ns = MODE_IDLE;
      end
      default: ns = MODE_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ps        <= MODE_IDLE;
      ph        <= PH_FETCH;
      test_done <= 1'b0;
    end else begin
      ps <= ns;
      ph <= ph_nxt;
      if (ps == MODE_IDLE && ns == MODE_TEST) test_done <= 1'b0;
      else if (end_word)                      test_done <= 1'b1;
    end
  end

  assign i_ena      = in_test && ph == PH_FETCH;
  assign ir_ena     = in_test && ph == PH_LOAD;
  assign data_ena   = in_test && ph == PH_DECODE && ir.valid;
  assign rw_ena     = data_ena;
  assign mem_ena    = (in_test && ph == PH_ACCESS) || ps == MODE_NORMAL;
  assign fd_ena     = in_test && ph == PH_COMPARE && !ir.wr;
  assign inst_ena   = in_test && ph == PH_COMPARE;
  assign addr_ena   = inst_ena && elem_end;
  assign rla_ena    = (ps == MODE_NORMAL);
  assign clr        = (ps == MODE_IDLE);
  assign test_sel   = in_test;
  assign mode_state = ps;

  // At most one phase enable per cycle; memory access only in ACCESS or normal mode.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({i_ena, ir_ena, data_ena, mem_ena && in_test, inst_ena}));
  a_fd_in_test: assert property (@(posedge clk) disable iff (!rst_n)
    fd_ena |-> in_test);

endmodule
