// ip_mux: input multiplexer in front of the memory.
//
// In test mode (test_sel = 1) passes the BIST's address, data, read and write
// signals to the memory; otherwise the external ones of normal operation.
// Purely combinational.
module ip_mux #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1
) (
  input  logic              test_sel,
  input  logic [ADDR_W-1:0] t_addr,
  input  logic [DATA_W-1:0] t_data,
  input  logic              t_rd,
  input  logic              t_wr,
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [DATA_W-1:0] n_data,
  input  logic              n_rd,
  input  logic              n_wr,
  output logic [ADDR_W-1:0] m_addr,
  output logic [DATA_W-1:0] m_data,
  output logic              m_rd,
  output logic              m_wr
);

  always_comb begin
    if (test_sel) begin
      m_addr = t_addr;
      m_data = t_data;
      m_rd   = t_rd;
      m_wr   = t_wr;
    end else begin
      m_addr = n_addr;
      m_data = n_data;
      m_rd   = n_rd;
      m_wr   = n_wr;
    end
  end

endmodule
