// rec: reliability enhancement circuit in front of an SRAM.
//
// Lets the SRAM skip a read of the same address as the read in the previous
// cycle. Because the SRAM's output register still holds that word, the result
// is unchanged, while a cell with a latent resistive-open defect is spared the
// back-to-back reads that would otherwise flip it. The successive read
// detector's SR is gated by the protection enable: en_n = 0 turns protection
// on, and then CEN' = CEN OR SR; with en_n = 1, CEN' = CEN. The OR/AND gating
// and the active-low enable follow the source paper. Combinational from inputs to
// cen_out within the cycle.
module rec #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] a,
  input  logic              wen,
  input  logic              cen,
  input  logic              en_n,
  output logic              cen_out,
  output logic              sr
);

  srd #(.ADDR_W(ADDR_W)) u_srd (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .wen  (wen),
    .cen  (cen),
    .sr   (sr)
  );

  assign cen_out = cen || (sr && !en_n);

endmodule
