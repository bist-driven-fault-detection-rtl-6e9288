// sram: the memory under test, a synchronous single-port RAM of 2**ADDR_W words.
//
// A write happens at the clock edge when mem_ena and wr_ena are 1 and rd_ena is
// 0; a read when mem_ena and rd_ena are 1 and wr_ena is 0. Read data is
// registered on dout, one cycle after the read, and held while the memory does
// not read, as the Q output of an SRAM macro does. Those enable rules follow the
// source paper; the timing is this design's choice.
//
// Defects can be injected for simulation (all-zero masks give a fault-free RAM):
//  * inj_sa_mask[i] makes word i read back as all inj_sa_val[i] (stuck-at).
//  * inj_weak_mask[i] gives word i a latent resistive-open defect that behaves
//    as a deceptive multiple read destructive fault: when the word is read in
//    DMRDF_K back-to-back cycles, the last of those reads still returns the
//    stored value but leaves the word inverted. Reads separated by any other
//    cycle do not build up. The threshold model is this design's choice.
module sram #(
  parameter int unsigned ADDR_W  = 4,
  parameter int unsigned DATA_W  = 1,
  parameter int unsigned DMRDF_K = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mem_ena,
  input  logic                 rd_ena,
  input  logic                 wr_ena,
  input  logic [ADDR_W-1:0]    addr,
  input  logic [DATA_W-1:0]    din,
  output logic [DATA_W-1:0]    dout,
  input  logic [2**ADDR_W-1:0] inj_sa_mask,
  input  logic [2**ADDR_W-1:0] inj_sa_val,
  input  logic [2**ADDR_W-1:0] inj_weak_mask
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic              do_rd, do_wr;
  logic              prev_rd;
  logic [ADDR_W-1:0] prev_addr;
  logic [7:0]        streak, streak_nxt;

  assign do_rd = mem_ena && rd_ena && !wr_ena;
  assign do_wr = mem_ena && wr_ena && !rd_ena;

  // Length of the run of back-to-back reads of this address, this read included.
  always_comb begin
    if (prev_rd && prev_addr == addr && streak != 8'hFF) streak_nxt = streak + 8'd1;
    else                                                 streak_nxt = 8'd1;
  end

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem[addr] <= din;
    end else if (do_rd && inj_weak_mask[addr] && 32'(streak_nxt) >= DMRDF_K) begin
      mem[addr] <= ~mem[addr];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout      <= '0;
      prev_rd   <= 1'b0;
      prev_addr <= '0;
      streak    <= '0;
    end else begin
      prev_rd   <= do_rd;
      prev_addr <= addr;
      if (do_rd) begin
        dout   <= inj_sa_mask[addr] ? {DATA_W{inj_sa_val[addr]}} : mem[addr];
        streak <= streak_nxt;
      end else begin
        streak <= '0;
      end
    end
  end

endmodule
