// inst_storage: microcode instruction storage.
//
// A read-only table of 2**IADDR_W seven-bit words holding the March SS program
// from bisr_pkg (22 operations and an end-of-test word); the remaining words
// are zero, which also reads as end of test. On IEna the word at InstAddr is
// registered onto Inst, so the word appears one cycle after the request. A
// different March algorithm is obtained by changing the table only. Holding the
// program as a constant table is this design's choice.
module inst_storage
  import bisr_pkg::*;
#(
  parameter int unsigned IADDR_W = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               i_ena,
  input  logic [IADDR_W-1:0] inst_addr,
  output logic [6:0]         inst
);

  localparam int unsigned DEPTH = 2 ** IADDR_W;

  function automatic logic [6:0] rom_word(input int unsigned idx);
    if (idx <= MARCH_SS_OPS) return MARCH_SS[idx];
    else                     return 7'h00;
  endfunction

  logic [6:0] rom [DEPTH];

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = rom_word(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     inst <= '0;
    else if (i_ena) inst <= rom[inst_addr];
  end

endmodule
