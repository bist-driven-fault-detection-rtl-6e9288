// op_mux: output multiplexer.
//
// Returns the redundant word's data when the address just read is a repaired
// one (rl_hit), otherwise the memory output. Both inputs come from registers
// updated by the same read, so they are aligned. Combinational.
module op_mux #(
  parameter int unsigned DATA_W = 1
) (
  input  logic              rl_hit,
  input  logic [DATA_W-1:0] rl_data,
  input  logic [DATA_W-1:0] mem_out,
  output logic [DATA_W-1:0] mux_out
);

  assign mux_out = rl_hit ? rl_data : mem_out;

endmodule
