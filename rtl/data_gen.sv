// data_gen: test data generator.
//
// On DataEna registers a word of all ones or all zeros, as the data bit of the
// instruction asks; the word is the data written to the memory and also the
// value a read is expected to return. Synchronous active-low reset clears it.
module data_gen #(
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              data_ena,
  input  logic              data_bit,
  output logic [DATA_W-1:0] data
);

  always_ff @(posedge clk) begin
    if (!rst_n)        data <= '0;
    else if (data_ena) data <= {DATA_W{data_bit}};
  end

endmodule
