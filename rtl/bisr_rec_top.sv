// bisr_rec_top: memory built-in self-test and self-repair with a reliability
// enhancement circuit.
//
// A microcode-driven BIST runs March SS (22 operations per address) over the
// memory, records every failing address in the redundant logic array together
// with the data the word should hold, and then hands the memory over to normal
// operation, where accesses to repaired addresses are served by the redundant
// words. A reliability enhancement circuit between the input multiplexer and
// the memory suppresses a read of the address read in the cycle before (the
// memory's held output already carries that word), which keeps latent
// read-disturb defects from turning into errors.
//
// Datapath: instruction pointer -> instruction storage -> instruction register
// -> address / data / read-write generators -> input multiplexer -> REC ->
// memory -> fault diagnosis -> redundant logic array -> output multiplexer.
// The state machine controller sequences the enables (five cycles per March
// operation; see smc). The source paper fixes the block structure, the microcode
// format and program, the redundant word and the REC; the cycle timing, mode
// encoding idle = 0, synchronous active-low reset and the fault-injection ports
// of the memory are this design's choices.
//
// Interface: mode_type 1 starts a test (from idle, with smc_ena = 1); test_done
// rises when it ends and the design is then in normal mode (mode_state = 2).
// In normal mode, r_ena / w_ena with addr_in / data_in access the memory; read
// data appears on mux_out one cycle after the read. rec_en_n = 0 turns the
// successive-read protection on. overflow says more faulty addresses were found
// than there are redundant words. fault_cnt counts failing reads of the test,
// rl_used the redundant words in use, and succ_read marks a cycle in which the
// REC suppressed a read.
module bisr_rec_top
  import bisr_pkg::*;
#(
  parameter int unsigned ADDR_W   = 4,
  parameter int unsigned DATA_W   = 1,
  parameter int unsigned RL_WORDS = 32,
  parameter int unsigned IADDR_W  = 5,
  parameter int unsigned DMRDF_K  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 smc_ena,
  input  logic [1:0]           mode_type,
  input  logic [ADDR_W-1:0]    addr_in,
  input  logic [DATA_W-1:0]    data_in,
  input  logic                 r_ena,
  input  logic                 w_ena,
  input  logic                 rec_en_n,
  input  logic [2**ADDR_W-1:0] inj_sa_mask,
  input  logic [2**ADDR_W-1:0] inj_sa_val,
  input  logic [2**ADDR_W-1:0] inj_weak_mask,
  output logic [DATA_W-1:0]    mux_out,
  output logic                 test_done,
  output logic                 overflow,
  output logic [1:0]           mode_state,
  output logic [15:0]          fault_cnt,
  output logic [$clog2(RL_WORDS+1)-1:0] rl_used,
  output logic                 succ_read
);

  // Controller enables
  logic i_ena, ir_ena, inst_ena, addr_ena, data_ena, rw_ena;
  logic mem_ena, fd_ena, rla_ena, clr, test_sel;
  mode_e ps;

  // Microcode path
  logic [IADDR_W-1:0] inst_addr;
  logic [6:0]         inst;
  inst_t              ir;

  // BIST datapath
  logic [ADDR_W-1:0]  t_addr;
  logic               over;
  logic [DATA_W-1:0]  t_data;
  logic               t_rd, t_wr;

  // Memory side
  logic [ADDR_W-1:0]  m_addr;
  logic [DATA_W-1:0]  m_data, mem_out;
  logic               m_rd, m_wr;
  logic               cen, wen, cen_out, sr;

  // Repair side
  logic               fault;
  logic [ADDR_W-1:0]  fault_addr;
  logic [DATA_W-1:0]  fault_data, rl_data;
  logic               rl_hit;
  logic [RL_WORDS-1:0] rl_fa;

  smc u_smc (
    .clk       (clk),
    .rst_n     (rst_n),
    .smc_ena   (smc_ena),
    .mode_type (mode_type),
    .ir        (ir),
    .i_ena     (i_ena),
    .ir_ena    (ir_ena),
    .inst_ena  (inst_ena),
    .addr_ena  (addr_ena),
    .data_ena  (data_ena),
    .rw_ena    (rw_ena),
    .mem_ena   (mem_ena),
    .fd_ena    (fd_ena),
    .rla_ena   (rla_ena),
    .clr       (clr),
    .test_sel  (test_sel),
    .test_done (test_done),
    .mode_state(ps)
  );
  assign mode_state = ps;

  inst_ptr #(.IADDR_W(IADDR_W)) u_inst_ptr (
    .clk        (clk),
    .rst_n      (rst_n),
    .clr        (clr),
    .inst_ena   (inst_ena),
    .inst_op_fil({ir.fo, ir.io, ir.lo}),
    .over       (over),
    .inst_addr  (inst_addr)
  );

  inst_storage #(.IADDR_W(IADDR_W)) u_inst_storage (
    .clk      (clk),
    .rst_n    (rst_n),
    .i_ena    (i_ena),
    .inst_addr(inst_addr),
    .inst     (inst)
  );

  inst_reg u_inst_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .ir_ena(ir_ena),
    .inst  (inst),
    .ir    (ir)
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (clr),
    .addr_ena(addr_ena),
    .dir_down(ir.dir_down),
    .address (t_addr),
    .over    (over)
  );

  data_gen #(.DATA_W(DATA_W)) u_data_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_ena(data_ena),
    .data_bit(ir.data),
    .data    (t_data)
  );

  rw_control u_rw_control (
    .clk   (clk),
    .rst_n (rst_n),
    .rw_ena(rw_ena),
    .wr_bit(ir.wr),
    .rd_ena(t_rd),
    .wr_ena(t_wr)
  );

  ip_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ip_mux (
    .test_sel(test_sel),
    .t_addr  (t_addr),
    .t_data  (t_data),
    .t_rd    (t_rd),
    .t_wr    (t_wr),
    .n_addr  (addr_in),
    .n_data  (data_in),
    .n_rd    (r_ena),
    .n_wr    (w_ena),
    .m_addr  (m_addr),
    .m_data  (m_data),
    .m_rd    (m_rd),
    .m_wr    (m_wr)
  );

  // SRAM-style active-low controls for the REC: chip enabled for any access,
  // WEN = 1 for a read.
  assign cen = !(mem_ena && (m_rd || m_wr));
  assign wen = !m_wr;

  rec #(.ADDR_W(ADDR_W)) u_rec (
    .clk    (clk),
    .rst_n  (rst_n),
    .a      (m_addr),
    .wen    (wen),
    .cen    (cen),
    .en_n   (rec_en_n),
    .cen_out(cen_out),
    .sr     (sr)
  );
  assign succ_read = sr && !rec_en_n && !cen;

  sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .DMRDF_K(DMRDF_K)) u_sram (
    .clk          (clk),
    .rst_n        (rst_n),
    .mem_ena      (!cen_out),
    .rd_ena       (m_rd),
    .wr_ena       (m_wr),
    .addr         (m_addr),
    .din          (m_data),
    .dout         (mem_out),
    .inj_sa_mask  (inj_sa_mask),
    .inj_sa_val   (inj_sa_val),
    .inj_weak_mask(inj_weak_mask)
  );

  fault_diag #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_fault_diag (
    .clk       (clk),
    .rst_n     (rst_n),
    .fd_ena    (fd_ena),
    .mem_out   (mem_out),
    .mem_in    (t_data),
    .addr      (t_addr),
    .fault     (fault),
    .fault_addr(fault_addr),
    .fault_data(fault_data),
    .fault_cnt (fault_cnt)
  );

  rl_array #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .RL_WORDS(RL_WORDS)) u_rl_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .rla_ena   (rla_ena),
    .fault     (fault),
    .fault_addr(fault_addr),
    .fault_data(fault_data),
    .addr      (m_addr),
    .din       (m_data),
    .rd        (m_rd),
    .wr        (m_wr),
    .hit       (rl_hit),
    .dout      (rl_data),
    .overflow  (overflow),
    .used      (rl_used),
    .fa        (rl_fa)
  );

  op_mux #(.DATA_W(DATA_W)) u_op_mux (
    .rl_hit (rl_hit),
    .rl_data(rl_data),
    .mem_out(mem_out),
    .mux_out(mux_out)
  );

endmodule
