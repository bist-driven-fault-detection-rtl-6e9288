// srd: successive read detector.
//
// A read is CEN = 0 (active low) with WEN = 1. Each read loads its address A
// into the address register (a 2:1 mux holds the register otherwise), and flip-
// flop Y records whether the previous cycle was a read. The comparator output Z
// says A equals the registered address. SR = Z AND Y AND WEN flags a read of
// the address read in the cycle before. This is the structure of the
// source paper's detailed diagram; the reset of the two registers is this design's
// addition. SR is combinational on A, WEN and the registers.
module srd #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] a,
  input  logic              wen,
  input  logic              cen,
  output logic              sr
);

  logic              rd_now, y, z;
  logic [ADDR_W-1:0] addr_reg;

  assign rd_now = !cen && wen;
  assign z      = (a == addr_reg);
  assign sr     = z && y && wen;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_reg <= '0;
      y        <= 1'b0;
    end else begin
      y <= rd_now;
      if (rd_now) addr_reg <= a;
    end
  end

endmodule
