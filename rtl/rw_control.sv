// rw_control: read/write control of the BIST.
//
// On RWEna registers WrEna from the instruction's R/W bit and RdEna as its
// complement, so exactly one of them is set after the first load. The memory
// acts on them only while the controller raises MemEna. Synchronous active-low
// reset clears both.
module rw_control (
  input  logic clk,
  input  logic rst_n,
  input  logic rw_ena,
  input  logic wr_bit,
  output logic rd_ena,
  output logic wr_ena
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ena <= 1'b0;
      wr_ena <= 1'b0;
    end else if (rw_ena) begin
      rd_ena <= !wr_bit;
      wr_ena <= wr_bit;
    end
  end

endmodule
