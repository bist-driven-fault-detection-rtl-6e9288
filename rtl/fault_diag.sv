// fault_diag: fault diagnosis (response comparator) of the BIST.
//
// When FDEna is 1 it compares the memory output with the expected data (the
// data generator's word, MemIn). A mismatch produces, one clock later, a
// one-cycle fault pulse together with the faulty address and the correct
// (expected) data, which program a redundant word. fault_cnt counts mismatches
// since reset and saturates; the counter and the registered outputs are this
// design's choices. Synchronous active-low reset.
module fault_diag #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fd_ena,
  input  logic [DATA_W-1:0] mem_out,
  input  logic [DATA_W-1:0] mem_in,
  input  logic [ADDR_W-1:0] addr,
  output logic              fault,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] fault_data,
  output logic [15:0]       fault_cnt
);

  logic mismatch;
  assign mismatch = fd_ena && (mem_out != mem_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fault      <= 1'b0;
      fault_addr <= '0;
      fault_data <= '0;
      fault_cnt  <= '0;
    end else begin
      fault <= mismatch;
      if (mismatch) begin
        fault_addr <= addr;
        fault_data <= mem_in;
        if (fault_cnt != 16'hFFFF) fault_cnt <= fault_cnt + 16'd1;
      end
    end
  end

endmodule
