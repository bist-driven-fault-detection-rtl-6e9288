// inst_reg: the 7-bit instruction register.
//
// Loads the word from the instruction storage on IREna and presents it decoded
// as an inst_t (valid, Fo, Io, Lo, direction, read/write, data). The fields go
// to the pointer (Fo/Io/Lo), the address generator (direction), the read/write
// control and the data generator. Synchronous active-low reset clears it, which
// reads as "no valid instruction".
module inst_reg
  import bisr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ir_ena,
  input  logic [6:0] inst,
  output inst_t      ir
);

  always_ff @(posedge clk) begin
    if (!rst_n)      ir <= '0;
    else if (ir_ena) ir <= inst_t'(inst);
  end

endmodule
