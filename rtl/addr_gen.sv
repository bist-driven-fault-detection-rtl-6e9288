// addr_gen: March address generator.
//
// Steps through every address of the memory once per March element, in
// increasing order, or in decreasing order when dir_down (the instruction's
// I/D bit) is 1. It keeps an up-counter and outputs either the count or its
// one's complement, so a decreasing element starts at the top address without a
// separate load; this is this design's choice and needs a power-of-two depth.
// The count advances on AddrEna and wraps to zero after the last address, ready
// for the next element. over is 1 while the last address of the element is
// presented. clr and the synchronous active-low reset clear the count.
module addr_gen #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              addr_ena,
  input  logic              dir_down,
  output logic [ADDR_W-1:0] address,
  output logic              over
);

  logic [ADDR_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || clr)  cnt <= '0;
    else if (addr_ena)  cnt <= cnt + 1'b1;
  end

  assign address = dir_down ? ~cnt : cnt;
  assign over    = &cnt;

endmodule
